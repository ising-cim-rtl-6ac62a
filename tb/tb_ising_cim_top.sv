// End-to-end test of the multi-bank top: a 2 x 2 grid of banks, each owning a
// 4 x 5 block of an 8 x 10 King's graph, joined by ghost cells.
//
// One host model per bank answers its bank's J and annealing requests in
// parallel with the others, using global coordinates. A single reference model of
// the whole 8 x 10 grid computes the expected synchronous update (sigma' = +1 iff
// sum_j J*sigma_j >= 0) and the annealing flips. After every sweep the bench
// reads every stored row of every bank, ghost rows and columns included, and
// compares each cell with the global grid: a stale ghost shows up as a mismatch,
// and a stale ghost used during the next sweep shows up in the owned spins.
// Annealing bits are also given for ghost columns, so the exchange has to repair
// ghosts that the annealing pass disturbed.
// Mechanisms counted: spin updates per bank, spin latency, targets whose
// neighbours lie in another bank (read through ghosts), ties, flips, ghost column
// writes (phase A), ghost row writes (phase B), refreshes, reads and writes.
// Finally the 2-bit J unit beside the banks computes random targets, checked
// against sign(sum J*sigma) with 2-bit J = 0..3 (ties give +1).
module tb_ising_cim_top;
  import ising_cim_pkg::*;

  localparam int unsigned BR = 2, BC = 2, LR = 4, LC = 5;
  localparam int unsigned NB = BR * BC;
  localparam int unsigned GR_ = BR * LR, GC_ = BC * LC;   // global grid
  localparam int unsigned GRW = $clog2(GR_), GCW = $clog2(GC_), MAW = $clog2(LR + 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, anneal_en = 1'b0, busy, done;
  logic [NB-1:0] j_req, an_req, mem_ack, scan_out;
  logic [GRW-1:0] j_row [NB];
  logic [GCW-1:0] j_col [NB];
  logic [GRW-1:0] an_row [NB];
  logic [NB-1:0] load_j, an_valid, mem_req, mem_we, scan_en, scan_in, scan_capture;
  logic [J_PER_LOAD-1:0] j_in [NB];
  logic [MAW-1:0] mem_addr [NB];
  logic [NB-1:0] precharge_b, rwl_en, cs_any, sa_fire, hsig_start, latch_result, hsig_done;
  logic [NB-1:0] update, refresh_busy, bank_busy;
  logic ghost_busy;
  // 2-bit J unit
  logic mbj_seg_we = 1'b0, mbj_seg_spin = 1'b0, mbj_start = 1'b0;
  logic [2:0] mbj_seg_idx = '0;
  logic [15:0] mbj_j = '0;
  logic mbj_busy, mbj_done, mbj_spin;
  logic [15:0] mbj_bl_mv;

  // bench-side drivers, one element per bank
  bit lj [NB], av [NB], mr [NB], mw [NB], se [NB], si [NB], sc [NB];
  bit [1:0] ji [NB];
  int ma [NB];

  for (genvar b = 0; b < NB; b++) begin : g_drv
    assign load_j[b]       = lj[b];
    assign j_in[b]         = ji[b];
    assign an_valid[b]     = av[b];
    assign mem_req[b]      = mr[b];
    assign mem_we[b]       = mw[b];
    assign mem_addr[b]     = MAW'(ma[b]);
    assign scan_en[b]      = se[b];
    assign scan_in[b]      = si[b];
    assign scan_capture[b] = sc[b];
  end

  ising_cim_top #(.BR(BR), .BC(BC), .LR(LR), .LC(LC), .REFRESH_INTERVAL(40)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned seed_j = 32'h2468_ACE1;

  bit grid [GR_][GC_];
  int n_done = 0, n_lat_ok = 0, n_cross = 0, n_tie = 0, n_flip = 0, n_refresh = 0;
  int n_ghost_col = 0, n_ghost_row = 0, n_read = 0, n_write = 0, n_sweeps = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic bit jcoef(input int r1, input int c1, input int r2, input int c2);
    int unsigned a, b, h;
    a = r1 * GC_ + c1;
    b = r2 * GC_ + c2;
    if (a > b) begin h = a; a = b; b = h; end
    h = (a * 32'h9E37_79B1) ^ (b * 32'h85EB_CA77) ^ seed_j;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE3D;
    return h[17];
  endfunction

  localparam int DR [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
  localparam int DC [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};

  function automatic bit on_grid(input int r, input int c);
    return r >= 0 && r < int'(GR_) && c >= 0 && c < int'(GC_);
  endfunction

  function automatic bit [7:0] jvec(input int r, input int c);
    bit [7:0] v;
    for (int k = 0; k < 8; k++)
      v[k] = on_grid(r + DR[k], c + DC[k]) ? jcoef(r, c, r + DR[k], c + DC[k]) : 1'b0;
    return v;
  endfunction

  task automatic ref_sweep();
    bit nxt [GR_][GC_];
    for (int r = 0; r < int'(GR_); r++)
      for (int c = 0; c < int'(GC_); c++) begin
        int s;
        bit xb;
        s = 0;
        xb = 1'b0;
        for (int k = 0; k < 8; k++) begin
          int rr, cc;
          rr = r + DR[k];
          cc = c + DC[k];
          if (on_grid(rr, cc)) begin
            s += (jcoef(r, c, rr, cc) == grid[rr][cc]) ? 1 : -1;
            if (rr / int'(LR) != r / int'(LR) || cc / int'(LC) != c / int'(LC)) xb = 1'b1;
          end
        end
        if (s == 0) n_tie++;
        if (xb) n_cross++;
        nxt[r][c] = (s >= 0);
      end
    grid = nxt;
  endtask

  // bank geometry
  function automatic int gt(input int b); return (b / int'(BC) > 0) ? 1 : 0; endfunction
  function automatic int gl(input int b); return (b % int'(BC) > 0) ? 1 : 0; endfunction
  function automatic int nrows(input int b);
    return int'(LR) + gt(b) + ((b / int'(BC) < int'(BR) - 1) ? 1 : 0);
  endfunction
  function automatic int ncols(input int b);
    return int'(LC) + gl(b) + ((b % int'(BC) < int'(BC) - 1) ? 1 : 0);
  endfunction
  function automatic int grow(input int b, input int s); return (b / int'(BC)) * int'(LR) - gt(b) + s; endfunction
  function automatic int gcol(input int b, input int t); return (b % int'(BC)) * int'(LC) - gl(b) + t; endfunction

  task automatic tick(); @(negedge clk); endtask

  task automatic scan_load(input int b, input bit d [16], input int n);
    for (int k = n - 1; k >= 0; k--) begin
      se[b] = 1'b1; si[b] = d[k]; tick();
    end
    se[b] = 1'b0;
  endtask

  task automatic mem_write(input int b, input int row, input bit d [16]);
    scan_load(b, d, ncols(b));
    mr[b] = 1'b1; mw[b] = 1'b1; ma[b] = row;
    while (!mem_ack[b]) tick();
    tick();
    mr[b] = 1'b0; mw[b] = 1'b0;
    n_write++;
  endtask

  task automatic mem_read(input int b, input int row, output bit d [16]);
    mr[b] = 1'b1; mw[b] = 1'b0; ma[b] = row;
    while (!mem_ack[b]) tick();
    tick();
    mr[b] = 1'b0;
    sc[b] = 1'b1; tick(); sc[b] = 1'b0;
    for (int k = ncols(b) - 1; k >= 0; k--) begin
      d[k] = scan_out[b];
      se[b] = 1'b1; si[b] = 1'b0; tick();
    end
    se[b] = 1'b0;
    n_read++;
  endtask

  // every stored cell of every bank, ghosts included, against the global grid
  task automatic check_all(input string tag);
    bit d [16];
    for (int b = 0; b < int'(NB); b++)
      for (int s = 0; s < nrows(b); s++) begin
        mem_read(b, s, d);
        for (int t = 0; t < ncols(b); t++)
          check(d[t] == grid[grow(b, s)][gcol(b, t)],
                $sformatf("%s bank %0d stored (%0d,%0d) = global (%0d,%0d) got %0d exp %0d",
                          tag, b, s, t, grow(b, s), gcol(b, t), d[t], grid[grow(b, s)][gcol(b, t)]));
      end
  endtask

  // one host per bank, answering J and annealing requests
  int flip_pct = 0;
  task automatic host(input int b);
    forever begin
      tick();
      if (j_req[b]) begin
        bit [7:0] jv;
        jv = jvec(int'(j_row[b]), int'(j_col[b]));
        for (int p = 0; p < 4; p++) begin
          lj[b] = 1'b1; ji[b] = jv[2*p +: 2]; tick();
        end
        lj[b] = 1'b0;
      end else if (an_req[b]) begin
        bit d [16];
        int gr;
        gr = int'(an_row[b]);
        for (int t = 0; t < ncols(b); t++) begin
          int gc;
          gc = gcol(b, t);
          d[t] = (($urandom % 100) < flip_pct);
          // only the owner's flip counts; a flip of a ghost copy must be undone
          if (gc / int'(LC) == b % int'(BC) && d[t]) begin
            n_flip++;
            grid[gr][gc] = ~grid[gr][gc];
          end
        end
        scan_load(b, d, ncols(b));
        av[b] = 1'b1; tick(); av[b] = 1'b0;
      end
    end
  endtask

  int n_mbj = 0, n_mbj_tie = 0;
  task automatic run_mbj(input int n);
    for (int t = 0; t < n; t++) begin
      int sum, w;
      bit s;
      sum = 0;
      for (int m = 0; m < 8; m++) begin
        s = 1'($urandom);
        mbj_j[2*m +: 2] = 2'($urandom);
        sum += int'(mbj_j[2*m +: 2]) * (s ? 1 : -1);
        mbj_seg_we = 1'b1; mbj_seg_idx = 3'(m); mbj_seg_spin = s; tick();
      end
      mbj_seg_we = 1'b0;
      mbj_start = 1'b1; tick(); mbj_start = 1'b0;
      w = 0;
      while (!mbj_done && w < 40) begin tick(); w++; end
      check(mbj_done && mbj_spin == (sum >= 0), $sformatf("2-bit J target %0d: sum %0d spin %0d", t, sum, mbj_spin));
      n_mbj++;
      if (sum == 0) n_mbj_tie++;
    end
  endtask

  task automatic run_sweep(input bit with_anneal, input int pct);
    ref_sweep();
    flip_pct = pct;
    anneal_en = with_anneal;
    start = 1'b1; tick(); start = 1'b0;
    while (!done) tick();
    tick();
    n_sweeps++;
  endtask

  int t_start [NB];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int b = 0; b < int'(NB); b++) begin
        if (hsig_start[b]) t_start[b] <= cyc;
        if (hsig_done[b]) begin
          n_done++;
          checks++;
          if (cyc - t_start[b] == 5) n_lat_ok++;
          else begin
            failures++;
            $display("FAIL: bank %0d spin latency %0d cycles", b, cyc - t_start[b]);
          end
        end
        if (refresh_busy[b]) n_refresh++;
      end
      if (|dut.pr_we) begin
        if (dut.pr_row == '0 || int'(dut.pr_row) == int'(LR) + 1) n_ghost_row++;
        else n_ghost_col++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [16];
    for (int b = 0; b < int'(NB); b++) begin
      lj[b] = 0; av[b] = 0; mr[b] = 0; mw[b] = 0; se[b] = 0; si[b] = 0; sc[b] = 0;
      ji[b] = 0; ma[b] = 0; t_start[b] = 0;
    end
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    for (int r = 0; r < int'(GR_); r++)
      for (int c = 0; c < int'(GC_); c++) grid[r][c] = $urandom % 2;
    // initial state of every stored cell, ghost copies included
    for (int b = 0; b < int'(NB); b++)
      for (int s = 0; s < nrows(b); s++) begin
        for (int t = 0; t < ncols(b); t++) d[t] = grid[grow(b, s)][gcol(b, t)];
        mem_write(b, s, d);
      end
    check_all("init");
    for (int b = 0; b < int'(NB); b++)
      fork
        automatic int bb = b;
        host(bb);
      join_none
    run_sweep(1'b0, 0);
    check_all("sweep1");
    run_sweep(1'b1, 30);
    check_all("sweep2+anneal");
    run_sweep(1'b1, 20);
    check_all("sweep3+anneal");
    repeat (40 * (LR + 3)) tick();
    check_all("after refresh");
    run_sweep(1'b0, 0);
    check_all("sweep4");
    run_mbj(60);
    check(n_mbj_tie > 0, "2-bit J ties");
    check(n_done == n_sweeps * int'(GR_ * GC_), "spin updates counted");
    check(n_cross > 0, "targets with neighbours in another bank");
    check(n_tie > 0, "H = 0 ties");
    check(n_flip > 0, "annealing flips");
    check(n_ghost_col == n_sweeps * int'(LR), "ghost column exchanges (one per owned row per sweep)");
    check(n_ghost_row == n_sweeps * 2, "ghost row exchanges (two per sweep)");
    check(n_refresh >= int'(NB) * int'(LR), "refreshes");
    check(n_read > 0 && n_write > 0, "normal reads and writes");
    $display("mechanisms: sweeps=%0d updates=%0d latency_ok=%0d cross_bank=%0d ties=%0d flips=%0d ghost_col=%0d ghost_row=%0d refreshes=%0d reads=%0d writes=%0d mbj=%0d mbj_ties=%0d",
             n_sweeps, n_done, n_lat_ok, n_cross, n_tie, n_flip, n_ghost_col, n_ghost_row, n_refresh, n_read, n_write, n_mbj, n_mbj_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
