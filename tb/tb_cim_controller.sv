// Test of the CIM controller on its own. The bench plays the J loader (j_valid a
// few cycles after j_req) and the host, and checks, cycle by cycle, the control
// pattern of every spin update against the expected sequence: target order (row
// by row, left to right), neighbour mask, precharge / RWL iteration / SP column in
// the three read cycles, reference-column discharge (REF_WL count and pulse
// cycles = neighbour count), CS / SA column in the compare cycle, ping-pong row
// read-modify-write with the target SA off, copy-back of row r-1 after row r and
// of the last row at the end, the annealing pass, normal reads and writes and
// refresh waiting behind them.
module tb_cim_controller;
  import ising_cim_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 4;
  localparam int unsigned PROWS = 2 * ROWS + 2, PCOLS = COLS + 2, RAW = $clog2(PROWS);
  localparam int unsigned RW = $clog2(ROWS), CWB = $clog2(COLS);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, anneal_en = 1'b0, busy, done;
  logic j_req, j_clear, j_valid = 1'b0; logic [RW-1:0] tgt_row; logic [CWB-1:0] tgt_col;
  logic [NNEIGH-1:0] nmask;
  logic an_req, an_valid = 1'b0, an_apply; logic [RW-1:0] an_row;
  logic mem_req = 1'b0, mem_we = 1'b0, mem_ack, rd_latch, host_wr; logic [RW-1:0] mem_addr = '0;
  logic ref_req = 1'b0, ref_ack; logic [RW-1:0] ref_row = '0;
  logic precharge_b, rwl_en, wwl_en, wr_comp, update;
  rwl_mode_e rwl_mode; iter_e iter; sa_mode_e sa_mode;
  logic [RAW-1:0] trow, rd_row, wr_row;
  logic [PCOLS-1:0] sp, sa_en; logic [PCOLS-2:0] cs;
  logic ref_pre, ref_pulse; logic [NREF_WL-1:0] ref_wl;
  logic hsig_start, latch_result, hsig_done;
  int checks = 0, failures = 0;

  cim_controller #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_spin(input int r, input int c);
    int pc, nn, units;
    logic [PCOLS-1:0] allbut;
    pc = c + 1;
    nn = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (!(dr == 0 && dc == 0) && r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS) nn++;
    // J request
    check(j_req && int'(tgt_row) == r && int'(tgt_col) == c, $sformatf("j_req for (%0d,%0d)", r, c));
    check($countones(nmask) == nn, "neighbour mask");
    repeat (2) @(negedge clk);
    j_valid = 1'b1;
    #1;
    check(hsig_start, "hsig_start");
    @(negedge clk);
    // IT1
    check(!precharge_b && rwl_mode == RWL_CIM && rwl_en && iter == ITER_LEFT && sp == (PCOLS'(1) << (pc - 1)) && ref_pre, "IT1");
    check(int'(trow) == r, "target row");
    @(negedge clk);
    units = 0;
    check(rwl_mode == RWL_CIM && iter == ITER_MID && sp == (PCOLS'(1) << pc) && precharge_b, "IT2");
    if (ref_pulse) units += $countones(ref_wl);
    @(negedge clk);
    check(rwl_mode == RWL_CIM && iter == ITER_RIGHT && sp == (PCOLS'(1) << (pc + 1)), "IT3");
    if (ref_pulse) units += $countones(ref_wl);
    check(units == nn, $sformatf("reference units %0d for %0d neighbours", units, nn));
    @(negedge clk);
    check(cs == ((PCOLS-1)'(3) << (pc - 1)) && sa_en == (PCOLS'(1) << pc) && sa_mode == SA_CMP && latch_result && rwl_mode == RWL_OFF, "CMP");
    @(negedge clk);
    allbut = '1; allbut[pc] = 1'b0;
    check(rwl_mode == RWL_ROW && int'(rd_row) == 2 * ROWS + r % 2 && wwl_en && int'(wr_row) == 2 * ROWS + r % 2 && !wr_comp, "UPD rows");
    check(update && sa_en == allbut && sa_mode == SA_READ && hsig_done && j_clear, "UPD SA/update");
    j_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic copy_back(input int row);
    check(rwl_mode == RWL_ROW && int'(rd_row) == 2 * ROWS + row % 2 && wwl_en && int'(wr_row) == row && wr_comp && update && sa_en == '1 && !an_apply,
          $sformatf("copy-back of row %0d", row));
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(!busy, "idle after reset");
    // normal write and read go before a pending refresh; refresh follows
    mem_req = 1'b1; mem_we = 1'b1; mem_addr = 2; ref_req = 1'b1; ref_row = 1;
    #1;
    check(mem_ack && !ref_ack && host_wr && wwl_en && int'(wr_row) == 2 && wr_comp && rwl_mode == RWL_OFF, "normal write before refresh");
    @(negedge clk); mem_we = 1'b0; mem_addr = 1;
    #1;
    check(mem_ack && !ref_ack && rd_latch && rwl_mode == RWL_ROW && int'(rd_row) == 1 && sa_en == '1 && !wwl_en, "normal read");
    @(negedge clk); mem_req = 1'b0;
    #1;
    check(ref_ack && int'(wr_row) == 1 && wr_comp && update && int'(rd_row) == 1 && rwl_mode == RWL_ROW, "refresh after access");
    @(negedge clk); ref_req = 1'b0;
    // sweep with annealing
    start = 1'b1; anneal_en = 1'b1; @(negedge clk); start = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) one_spin(r, c);
      if (r > 0) copy_back(r - 1);
    end
    copy_back(ROWS - 1);
    for (int a = 0; a < ROWS; a++) begin
      check(an_req && int'(an_row) == a, "an_req");
      repeat (3) @(negedge clk);
      check(an_req, "an_req held");
      an_valid = 1'b1; @(negedge clk); an_valid = 1'b0;
      check(an_apply && update && wwl_en && int'(wr_row) == a && wr_comp && int'(rd_row) == a, "annealing write-back");
      @(negedge clk);
    end
    check(done, "done");
    @(negedge clk);
    check(!busy, "idle after sweep");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
