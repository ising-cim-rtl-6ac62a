// End-to-end test of one Ising compute-in-memory macro (no ghost cells) at a reduced grid size.
//
// A host model in this bench writes a random spin grid through the scan chain,
// reads rows back, then runs sweeps. For every target it answers j_req with four
// Load_J pulses carrying the eight 1-bit J coefficients of a fixed random,
// symmetric King's-graph problem; for every annealing row it shifts random AN bits
// into the scan chain. A reference model computes the expected grid independently
// (synchronous update sigma' = +1 iff sum_j J*sigma_j >= 0, i.e. H <= 0, then XOR
// with the AN bits) and the bench compares the whole grid after every sweep.
// It also checks the per-spin latency (five cycles from hsig_start to hsig_done)
// and counts each mechanism: interior / edge / corner targets, H = 0 ties,
// ping-pong copy-backs, annealing flips, refreshes, normal reads and writes.
module tb_ising_cim_macro;
  import ising_cim_pkg::*;

  localparam int unsigned ROWS = 5;
  localparam int unsigned COLS = 7;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned CWB  = $clog2(COLS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, anneal_en = 1'b0, busy, done;
  logic j_req; logic [RW-1:0] j_row; logic [CWB-1:0] j_col;
  logic load_j = 1'b0; logic [J_PER_LOAD-1:0] j_in = '0;
  logic an_req; logic [RW-1:0] an_row; logic an_valid = 1'b0;
  logic mem_req = 1'b0, mem_we = 1'b0; logic [RW-1:0] mem_addr = '0; logic mem_ack;
  logic scan_en = 1'b0, scan_in = 1'b0, scan_capture = 1'b0, scan_out;
  logic precharge_b, rwl_en, cs_any, sa_fire, hsig_start, latch_result, hsig_done, update;
  logic refresh_busy;
  logic pr_re = 1'b0, pr_we = 1'b0; logic [$clog2(ROWS + 2)-1:0] pr_row = '0;
  logic [COLS+1:0] pr_wdata = '0, pr_rdata;

  ising_cim_macro #(.ROWS(ROWS), .COLS(COLS), .REFRESH_INTERVAL(40)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned seed_j = 32'h1234_5678;

  // state of the host / reference
  bit grid [ROWS][COLS];
  bit an_bits [ROWS][COLS];
  int n_interior = 0, n_edge = 0, n_corner = 0, n_tie = 0, n_flip = 0, n_refresh = 0;
  int n_done = 0, n_copy = 0, n_read = 0, n_write = 0, n_lat_ok = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Symmetric random coupling between two grid sites (1 = +1, 0 = -1).
  function automatic bit jcoef(input int r1, input int c1, input int r2, input int c2);
    int unsigned a, b, h;
    a = r1 * COLS + c1;
    b = r2 * COLS + c2;
    if (a > b) begin h = a; a = b; b = h; end
    h = (a * 32'h9E37_79B1) ^ (b * 32'h85EB_CA77) ^ seed_j;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE3D;
    return h[17];
  endfunction

  localparam int DR [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
  localparam int DC [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};

  function automatic bit [7:0] jvec(input int r, input int c);
    bit [7:0] v;
    for (int k = 0; k < 8; k++) begin
      int rr, cc;
      rr = r + DR[k];
      cc = c + DC[k];
      v[k] = (rr >= 0 && rr < ROWS && cc >= 0 && cc < COLS) ? jcoef(r, c, rr, cc) : 1'b0;
    end
    return v;
  endfunction

  // Reference sweep: every spin from the old grid.
  task automatic ref_sweep();
    bit nxt [ROWS][COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int s, n;
        s = 0; n = 0;
        for (int k = 0; k < 8; k++) begin
          int rr, cc;
          rr = r + DR[k];
          cc = c + DC[k];
          if (rr >= 0 && rr < ROWS && cc >= 0 && cc < COLS) begin
            n++;
            s += (jcoef(r, c, rr, cc) == grid[rr][cc]) ? 1 : -1;
          end
        end
        if (s == 0) n_tie++;
        if (n == 8) n_interior++; else if (n == 5) n_edge++; else n_corner++;
        nxt[r][c] = (s >= 0);
      end
    grid = nxt;
  endtask

  task automatic tick(); @(negedge clk); endtask

  task automatic scan_load(input bit d [COLS]);
    for (int k = COLS - 1; k >= 0; k--) begin
      scan_en = 1'b1; scan_in = d[k]; tick();
    end
    scan_en = 1'b0;
  endtask

  task automatic mem_write(input int row, input bit d [COLS]);
    scan_load(d);
    mem_req = 1'b1; mem_we = 1'b1; mem_addr = RW'(row);
    do tick(); while (!mem_ack);
    tick();
    mem_req = 1'b0; mem_we = 1'b0;
    n_write++;
  endtask

  task automatic mem_read(input int row, output bit d [COLS]);
    mem_req = 1'b1; mem_we = 1'b0; mem_addr = RW'(row);
    // mem_ack is combinational in the idle state; the access happens at the next edge
    while (!mem_ack) tick();
    tick();
    mem_req = 1'b0;
    scan_capture = 1'b1; tick(); scan_capture = 1'b0;
    for (int k = COLS - 1; k >= 0; k--) begin
      d[k] = scan_out;
      scan_en = 1'b1; scan_in = 1'b0; tick();
    end
    scan_en = 1'b0;
    n_read++;
  endtask

  task automatic check_grid(input string tag);
    bit d [COLS];
    for (int r = 0; r < ROWS; r++) begin
      mem_read(r, d);
      for (int c = 0; c < COLS; c++)
        check(d[c] == grid[r][c], $sformatf("%s spin (%0d,%0d) got %0d exp %0d", tag, r, c, d[c], grid[r][c]));
    end
  endtask

  // Host answers to j_req and an_req while a sweep runs.
  task automatic run_sweep(input bit with_anneal, input int flip_pct);
    bit old [ROWS][COLS];
    old = grid;
    ref_sweep();
    anneal_en = with_anneal;
    start = 1'b1;
    tick();
    start = 1'b0;
    while (!done) begin
      if (j_req) begin
        bit [7:0] jv;
        jv = jvec(int'(j_row), int'(j_col));
        for (int p = 0; p < 4; p++) begin
          load_j = 1'b1; j_in = jv[2*p +: 2]; tick();
        end
        load_j = 1'b0;
        tick();
      end else if (an_req) begin
        bit d [COLS];
        int ar;
        ar = int'(an_row);
        for (int c = 0; c < COLS; c++) begin
          d[c] = (($urandom % 100) < flip_pct);
          if (d[c]) n_flip++;
          grid[ar][c] = grid[ar][c] ^ d[c];
        end
        scan_load(d);
        an_valid = 1'b1; tick(); an_valid = 1'b0;
      end else tick();
    end
    tick();
  endtask

  // latency and event counters
  int t_start = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (hsig_start) t_start <= cyc;
      if (hsig_done) begin
        n_done++;
        if (cyc - t_start == 5) n_lat_ok++;
        else begin
          failures++;
          $display("FAIL: spin latency %0d cycles", cyc - t_start);
        end
        checks++;
      end
      if (refresh_busy) n_refresh++;
      if (busy && dut.u_ctrl.wr_comp && update && !dut.u_ctrl.an_apply) n_copy++;
    end
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [COLS];
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    // random initial spins, written as a normal memory
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        grid[r][c] = $urandom % 2;
        d[c] = grid[r][c];
      end
      mem_write(r, d);
    end
    check_grid("init");
    // sweeps: plain, then with annealing, then plain again
    run_sweep(1'b0, 0);
    check_grid("sweep1");
    run_sweep(1'b1, 30);
    check_grid("sweep2+anneal");
    // idle long enough for refresh to visit every row, then check data survived
    repeat (40 * (ROWS + 1)) tick();
    check_grid("after refresh");
    run_sweep(1'b0, 0);
    check_grid("sweep3");
    // mechanism coverage
    check(n_done == 3 * ROWS * COLS, "spin updates counted");
    check(n_interior > 0, "interior targets");
    check(n_edge > 0, "edge targets");
    check(n_corner > 0, "corner targets");
    check(n_tie > 0, "H = 0 ties");
    check(n_flip > 0, "annealing flips");
    check(n_copy == 3 * ROWS, "ping-pong copy-backs");
    check(n_refresh >= ROWS, "refreshes");
    check(n_read > 0 && n_write > 0, "normal reads and writes");
    $display("mechanisms: updates=%0d latency_ok=%0d interior=%0d edge=%0d corner=%0d ties=%0d flips=%0d copies=%0d refreshes=%0d reads=%0d writes=%0d",
             n_done, n_lat_ok, n_interior, n_edge, n_corner, n_tie, n_flip, n_copy, n_refresh, n_read, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
