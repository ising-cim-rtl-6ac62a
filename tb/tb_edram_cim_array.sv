// Test of the eDRAM array model: row writes through WBL / WBLB, single-row reads,
// and multi-row reads whose per-column conducting count must equal the number of
// selected rows holding a 1 (the XNOR-and-add of the Hamiltonian computation).
// Expected values come from a shadow copy of the cells kept in the bench.
module tb_edram_cim_array;
  localparam int unsigned ROWS = 4, COLS = 6;
  localparam int unsigned PROWS = 2 * ROWS + 2, PCOLS = COLS + 2;
  localparam int unsigned CW = $clog2(PROWS + 1);

  logic clk = 1'b0;
  logic [PROWS-1:0] rwl = '0, wwl = '0;
  logic [PCOLS-1:0] wbl = '0, wbl_b = '0;
  logic [CW-1:0] rbl_cnt [PCOLS];
  bit   [PCOLS-1:0] shadow [PROWS];
  int checks = 0, failures = 0;

  edram_cim_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [PROWS-1:0] sel);
    rwl = sel;
    #1;
    for (int c = 0; c < PCOLS; c++) begin
      int e;
      e = 0;
      for (int r = 0; r < PROWS; r++) e += (sel[r] && shadow[r][c]) ? 1 : 0;
      checks++;
      if (int'(rbl_cnt[c]) != e) begin
        failures++;
        $display("FAIL col %0d rwl %b: got %0d exp %0d", c, sel, rbl_cnt[c], e);
      end
    end
  endtask

  initial begin
    // write every row once, plus pairs of rows (spin row with its complement row)
    for (int r = 0; r < PROWS; r++) begin
      @(negedge clk);
      wbl = PCOLS'($urandom); wbl_b = PCOLS'($urandom);
      wwl = '0; wwl[r] = 1'b1;
      shadow[r] = (r >= ROWS && r < 2 * ROWS) ? wbl_b : wbl;
    end
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wbl = PCOLS'($urandom); wbl_b = ~wbl;
      wwl = '0; wwl[r] = 1'b1; wwl[ROWS + r] = 1'b1;
      shadow[r] = wbl; shadow[ROWS + r] = wbl_b;
    end
    @(negedge clk);
    wwl = '0;
    @(negedge clk);
    for (int r = 0; r < PROWS; r++) check_read(PROWS'(1) << r);
    for (int k = 0; k < 60; k++) check_read(PROWS'($urandom));
    check_read('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
