// Test of the wordline controller. For random targets, J vectors and neighbour
// masks it checks every read wordline in each of the three iterations against a
// table written out in the bench (upper/middle/lower row take J0/J3/J5, J1/-/J6,
// J2/J4/J7; complement rows take the inverse; absent neighbours are off), plus
// row decoding, RWL_EN gating and single / paired write wordlines.
module tb_wl_controller;
  import ising_cim_pkg::*;
  localparam int unsigned ROWS = 6, PROWS = 2 * ROWS + 2, RAW = $clog2(PROWS);

  rwl_mode_e mode = RWL_OFF;
  logic rwl_en = 1'b0, wwl_en = 1'b0, wr_comp = 1'b0;
  iter_e iter = ITER_LEFT;
  logic [RAW-1:0] trow = '0, rd_row = '0, wr_row = '0;
  logic [NNEIGH-1:0] j = '0, nmask = '0;
  logic [PROWS-1:0] rwl, wwl;
  int checks = 0, failures = 0;

  wl_controller #(.ROWS(ROWS)) dut (.*);

  localparam int UP [3] = '{0, 1, 2};
  localparam int MID[3] = '{3, -1, 4};
  localparam int LO [3] = '{5, 6, 7};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [PROWS-1:0] e;
      int tr, it;
      tr = $urandom % ROWS;
      it = $urandom % 3;
      mode = RWL_CIM; rwl_en = ($urandom % 8) != 0;
      trow = RAW'(tr); iter = iter_e'(it);
      j = NNEIGH'($urandom); nmask = NNEIGH'($urandom);
      if (t % 5 == 0) nmask = '1;
      e = '0;
      for (int p = 0; p < 3; p++) begin
        int n, r;
        n = (p == 0) ? UP[it] : (p == 1) ? MID[it] : LO[it];
        r = tr + p - 1;
        if (n >= 0 && r >= 0 && r < ROWS && nmask[n] && rwl_en) begin
          e[r] = j[n];
          e[ROWS + r] = !j[n];
        end
      end
      #1;
      checks++;
      if (rwl !== e) begin
        failures++;
        $display("FAIL cim tr=%0d it=%0d j=%b m=%b got %b exp %b", tr, it, j, nmask, rwl, e);
      end
    end
    for (int r = 0; r < PROWS; r++) begin
      mode = RWL_ROW; rwl_en = 1'b1; rd_row = RAW'(r);
      wwl_en = 1'b1; wr_row = RAW'(r); wr_comp = (r % 2 == 0);
      #1;
      checks++;
      if (rwl != (PROWS'(1) << r)) begin failures++; $display("FAIL row decode %0d", r); end
      checks++;
      if (wwl != ((PROWS'(1) << r) | ((wr_comp && r < ROWS) ? (PROWS'(1) << (ROWS + r)) : '0))) begin
        failures++; $display("FAIL wwl %0d", r);
      end
    end
    mode = RWL_OFF; wwl_en = 1'b0;
    #1;
    checks++;
    if (rwl != '0 || wwl != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
