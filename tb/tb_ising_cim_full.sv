// Full-size run of the top (one bank of 64 x 100 spins, every parameter at its
// default) on a max-cut problem derived from a two-colour image.
//
// The image (an outlined frame, two filled blocks and a disc, computed in this
// bench) defines the couplings the usual way for image max-cut: J = +1 between
// King's-graph neighbours of the same colour and J = -1 across a colour edge, so
// the ground state is the image itself or its inverse, with energy -(number of
// edges). Starting from random spins the bench runs several sweeps with an
// annealing pass whose flip probability falls each sweep (a cooling schedule
// applied by the host, as the macro leaves the schedule to the outside). After
// every sweep it reads the whole grid back through the scan chain and compares it
// with an independent reference model of the same synchronous update followed by
// the same flips. It reports the energy path and checks that the energy fell and
// that the five-cycle spin latency held for all 6400 spins of each sweep.
module tb_ising_cim_full;
  import ising_cim_pkg::*;

  localparam int unsigned ROWS = 64;
  localparam int unsigned COLS = 100;
  localparam int unsigned RW   = 6;
  localparam int unsigned CWB  = 7;
  localparam int unsigned MAW  = 7;
  localparam int NSWEEP = 6;
  localparam int FLIP_PPM [NSWEEP] = '{20000, 10000, 5000, 2000, 0, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, anneal_en = 1'b0, busy, done;
  // the default top is a single bank: every per-bank port has one element
  logic [0:0] j_req, an_req, mem_ack, scan_out;
  logic [0:0] load_j = 1'b0, an_valid = 1'b0, mem_req = 1'b0, mem_we = 1'b0;
  logic [0:0] scan_en = 1'b0, scan_in = 1'b0, scan_capture = 1'b0;
  logic [RW-1:0] j_row [1];
  logic [CWB-1:0] j_col [1];
  logic [RW-1:0] an_row [1];
  logic [J_PER_LOAD-1:0] j_in [1] = '{'0};
  logic [MAW-1:0] mem_addr [1] = '{'0};
  logic [0:0] precharge_b, rwl_en, cs_any, sa_fire, hsig_start, latch_result, hsig_done, update;
  logic [0:0] refresh_busy, bank_busy;
  logic ghost_busy;
  // 2-bit J unit
  logic mbj_seg_we = 1'b0, mbj_seg_spin = 1'b0, mbj_start = 1'b0;
  logic [2:0] mbj_seg_idx = '0;
  logic [15:0] mbj_j = '0;
  logic mbj_busy, mbj_done, mbj_spin;
  logic [15:0] mbj_bl_mv;

  ising_cim_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit grid [ROWS][COLS];
  bit img  [ROWS][COLS];
  int n_done = 0, n_lat_bad = 0, n_flip = 0;

  localparam int DR [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
  localparam int DC [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  function automatic bit pixel(input int r, input int c);
    bit frame, blk1, blk2, disc;
    frame = (r >= 2 && r <= 61 && c >= 2 && c <= 97) && !(r >= 5 && r <= 58 && c >= 5 && c <= 94);
    blk1  = (r >= 12 && r <= 30 && c >= 12 && c <= 40);
    blk2  = (r >= 36 && r <= 52 && c >= 20 && c <= 34);
    disc  = ((r - 32) * (r - 32) + (c - 70) * (c - 70)) <= 220;
    return frame | blk1 | blk2 | disc;
  endfunction

  function automatic bit jcoef(input int r1, input int c1, input int r2, input int c2);
    return img[r1][c1] == img[r2][c2];
  endfunction

  function automatic bit on_grid(input int r, input int c);
    return r >= 0 && r < ROWS && c >= 0 && c < COLS;
  endfunction

  function automatic int energy();
    int e;
    e = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int k = 4; k < 8; k++) begin   // each edge once: right and lower neighbours
          int rr, cc;
          rr = r + DR[k]; cc = c + DC[k];
          if (on_grid(rr, cc)) e -= ((jcoef(r, c, rr, cc) ? 1 : -1) * ((grid[r][c] == grid[rr][cc]) ? 1 : -1));
        end
    return e;
  endfunction

  function automatic int ground();
    int e;
    e = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int k = 4; k < 8; k++) if (on_grid(r + DR[k], c + DC[k])) e--;
    return e;
  endfunction

  task automatic ref_sweep();
    bit nxt [ROWS][COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int s;
        s = 0;
        for (int k = 0; k < 8; k++) begin
          int rr, cc;
          rr = r + DR[k]; cc = c + DC[k];
          if (on_grid(rr, cc)) s += (jcoef(r, c, rr, cc) == grid[rr][cc]) ? 1 : -1;
        end
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
    mem_req = 1'b1; mem_we = 1'b1; mem_addr[0] = MAW'(row);
    while (!mem_ack) tick();
    tick();
    mem_req = 1'b0; mem_we = 1'b0;
  endtask

  task automatic mem_read(input int row, output bit d [COLS]);
    mem_req = 1'b1; mem_we = 1'b0; mem_addr[0] = MAW'(row);
    while (!mem_ack) tick();
    tick();
    mem_req = 1'b0;
    scan_capture = 1'b1; tick(); scan_capture = 1'b0;
    for (int k = COLS - 1; k >= 0; k--) begin
      d[k] = scan_out;
      scan_en = 1'b1; scan_in = 1'b0; tick();
    end
    scan_en = 1'b0;
  endtask

  task automatic check_grid(input string tag);
    bit d [COLS];
    int bad;
    bad = 0;
    for (int r = 0; r < ROWS; r++) begin
      mem_read(r, d);
      for (int c = 0; c < COLS; c++) if (d[c] != grid[r][c]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d spins differ from the reference", tag, bad));
  endtask

  task automatic run_sweep(input int flip_ppm);
    ref_sweep();
    anneal_en = (flip_ppm > 0);
    start = 1'b1; tick(); start = 1'b0;
    while (!done) begin
      if (j_req) begin
        bit [7:0] jv;
        for (int k = 0; k < 8; k++) begin
          int rr, cc;
          rr = int'(j_row[0]) + DR[k]; cc = int'(j_col[0]) + DC[k];
          jv[k] = on_grid(rr, cc) ? jcoef(int'(j_row[0]), int'(j_col[0]), rr, cc) : 1'b0;
        end
        for (int p = 0; p < 4; p++) begin
          load_j = 1'b1; j_in[0] = jv[2*p +: 2]; tick();
        end
        load_j = 1'b0;
        tick();
      end else if (an_req) begin
        bit d [COLS];
        int ar;
        ar = int'(an_row[0]);
        for (int c = 0; c < COLS; c++) begin
          d[c] = ($urandom % 1000000) < flip_ppm;
          if (d[c]) n_flip++;
          grid[ar][c] ^= d[c];
        end
        scan_load(d);
        an_valid = 1'b1; tick(); an_valid = 1'b0;
      end else tick();
    end
    tick();
  endtask

  int t_start = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (hsig_start) t_start <= cyc;
    if (hsig_done) begin
      n_done++;
      if (cyc - t_start != 5) n_lat_bad++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit d [COLS];
    int e0, e, eg, c0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) img[r][c] = pixel(r, c);
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        grid[r][c] = $urandom % 2;
        d[c] = grid[r][c];
      end
      mem_write(r, d);
    end
    check_grid("initial grid");
    e0 = energy();
    eg = ground();
    $display("energy: start %0d, ground state %0d", e0, eg);
    for (int s = 0; s < NSWEEP; s++) begin
      c0 = cyc;
      run_sweep(FLIP_PPM[s]);
      check_grid($sformatf("sweep %0d", s));
      e = energy();
      $display("sweep %0d: %0d cycles, flip rate %0d ppm, energy %0d", s, cyc - c0, FLIP_PPM[s], e);
    end
    check(n_done == NSWEEP * ROWS * COLS, "every spin updated in every sweep");
    check(n_lat_bad == 0, "five-cycle spin latency");
    check(n_flip > 0, "annealing flips applied");
    check(e < e0, "energy decreased");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
