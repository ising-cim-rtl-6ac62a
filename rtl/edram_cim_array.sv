// Behavioural model of the 3T1C gain-cell eDRAM array used as the Ising spin store.
//
// This is a model of a custom memory macro, not synthesizable logic of the real
// part: the analog read-bitline current of each column is represented by an
// integer, the number of read ports that conduct. A 3T1C cell's read port conducts
// when its read wordline is driven and its storage node is high, so driving the
// J coefficient on a spin row and J-bar on the matching complement row makes a
// column conduct exactly when J == spin (the in-memory XNOR). Several RWLs may be
// active at once; their currents add on the shared read bitline.
//
// Row map (physical rows, ROWS spin rows in the logical grid):
//   [0, ROWS)          spin plane, written from the write bitline WBL
//   [ROWS, 2*ROWS)     complement plane (row ROWS+r holds ~spin of row r),
//                      written from the complementary write bitline WBLB
//   2*ROWS, 2*ROWS+1   two ping-pong rows that receive updated spins
// Columns: PCOLS = COLS + 2. Physical column 0 and PCOLS-1 are padding so that
// every target spin has a left and a right sampling capacitor; their cells are
// never read onto a capacitor with a wordline on.
//
// Interface and timing: rbl_cnt is combinational from rwl and the stored cells
// (a read is complete within the cycle the RWLs are on). Every row whose WWL is
// high at a rising clock edge is written in that edge; several rows may be written
// in one edge. Contents are not reset (a memory).
//
// The spin/complement storage, XNOR-by-wordline and separate update row follow the
// document; the padding columns, the complement plane being written through WBLB,
// and the two ping-pong rows are this design's choices.
module edram_cim_array #(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned COLS  = 100,
  parameter int unsigned PROWS = 2 * ROWS + 2,
  parameter int unsigned PCOLS = COLS + 2,
  parameter int unsigned CW    = $clog2(PROWS + 1)
) (
  input  logic                clk,
  input  logic [PROWS-1:0]    rwl,       // read wordlines (already gated by RWL_EN)
  input  logic [PROWS-1:0]    wwl,       // write wordlines
  input  logic [PCOLS-1:0]    wbl,       // write bitlines, spin plane and ping-pong rows
  input  logic [PCOLS-1:0]    wbl_b,     // complementary write bitlines, complement plane
  output logic [CW-1:0]       rbl_cnt [PCOLS]  // conducting read ports per column
);

  logic [PCOLS-1:0] cells [PROWS];

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < PROWS; r++) begin
      if (wwl[r]) begin
        if (r >= ROWS && r < 2 * ROWS) cells[r] <= wbl_b;
        else                           cells[r] <= wbl;
      end
    end
  end

  // One read bitline per column: the currents of all conducting read ports add.
  for (genvar c = 0; c < PCOLS; c++) begin : g_rbl
    always_comb begin
      rbl_cnt[c] = '0;
      for (int unsigned r = 0; r < PROWS; r++) begin
        rbl_cnt[c] = rbl_cnt[c] + CW'(rwl[r] & cells[r][c]);
      end
    end
  end

endmodule
