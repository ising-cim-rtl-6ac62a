// Wordline controller: the memory's row decoder, reconfigured for Ising mode.
//
// In normal mode (RWL_ROW) it decodes one physical row address onto the read
// wordlines. In Ising mode (RWL_CIM) it drives the J coefficients of one target
// spin, and their complements, onto the six rows around the target row trow:
// spin rows trow-1, trow, trow+1 and the matching complement rows. One
// Hamiltonian computation takes three read iterations, one per neighbour column:
//
//   iteration   row trow-1   row trow   row trow+1     sampled column
//   ITER_LEFT       J0          J3          J5          c-1
//   ITER_MID        J1          off         J6          c
//   ITER_RIGHT      J2          J4          J7          c+1
//
// Complement rows get J-bar in the same positions. The target's own row is off in
// the middle iteration because the target spin is not its own neighbour. A
// neighbour that does not exist (nmask bit 0, at the edge of the grid) has both
// its J and J-bar wordline off, so it adds no current.
//
// Write wordlines: wwl_en writes physical row wr_row, and with wr_comp also the
// complement row ROWS + wr_row (the two are written in the same cycle, one from
// WBL and one from WBLB).
//
// Interface/timing: purely combinational; rwl_en gates all read wordlines
// (RWL_EN in the document's timing diagram).
//
// The iteration table comes from the document's schematic; the edge masking and
// the same-cycle complement write are this design's choices.
module wl_controller
  import ising_cim_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned PROWS = 2 * ROWS + 2,
  parameter int unsigned RAW   = $clog2(PROWS)
) (
  input  rwl_mode_e           mode,
  input  logic                rwl_en,
  input  iter_e               iter,
  input  logic [RAW-1:0]      trow,     // target spin row (logical)
  input  logic [NNEIGH-1:0]   j,        // 1-bit J coefficients, 1 = +1
  input  logic [NNEIGH-1:0]   nmask,    // neighbour exists
  input  logic [RAW-1:0]      rd_row,   // physical row for RWL_ROW
  input  logic                wwl_en,
  input  logic [RAW-1:0]      wr_row,   // physical row to write
  input  logic                wr_comp,  // also write complement row ROWS + wr_row
  output logic [PROWS-1:0]    rwl,
  output logic [PROWS-1:0]    wwl
);

  // Neighbour index driven on the upper, middle and lower row in each iteration;
  // NNEIGH marks "no neighbour" (the target itself).
  function automatic int unsigned nb_idx(input iter_e it, input int unsigned pos);
    unique case (it)
      ITER_LEFT:  return (pos == 0) ? 0 : (pos == 1) ? 3 : 5;
      ITER_MID:   return (pos == 0) ? 1 : (pos == 1) ? NNEIGH : 6;
      default:    return (pos == 0) ? 2 : (pos == 1) ? 4 : 7;
    endcase
  endfunction

  always_comb begin
    rwl = '0;
    unique case (mode)
      RWL_ROW: if (int'(rd_row) < int'(PROWS)) rwl[rd_row] = rwl_en;
      RWL_CIM: begin
        for (int unsigned pos = 0; pos < 3; pos++) begin
          int unsigned n;
          int          r;
          n = nb_idx(iter, pos);
          r = int'(trow) + int'(pos) - 1;
          if (n < NNEIGH && r >= 0 && r < int'(ROWS) && nmask[n]) begin
            rwl[r]        = rwl_en & j[n];
            rwl[ROWS + r] = rwl_en & ~j[n];
          end
        end
      end
      default: ;
    endcase
  end

  always_comb begin
    wwl = '0;
    if (wwl_en && int'(wr_row) < int'(PROWS)) begin
      wwl[wr_row] = 1'b1;
      if (wr_comp && int'(wr_row) < int'(ROWS)) wwl[ROWS + int'(wr_row)] = 1'b1;
    end
  end

endmodule
