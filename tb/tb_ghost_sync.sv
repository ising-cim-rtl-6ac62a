// Test of the ghost-cell synchroniser on a 2 x 3 grid of banks, each owning a
// 3 x 4 block, so that middle banks have ghosts on three or four sides.
//
// The banks are replaced by simple models: a window memory of (LR+2) x (LC+2)
// bits behind the row port (pr_rdata valid the cycle after pr_re, pr_we writes at
// the clock edge), which pulses done a random number of cycles after
// bank_start. Each round fills every window with random bits, runs one start,
// and then compares every window cell that lies on the global grid with the
// owning bank's value: owned cells must be unchanged and every ghost cell,
// corners included, must equal the owner's cell. It also checks that start
// reaches all banks in one pulse, that the exchange does not begin before the
// slowest bank is done, and the exchange time: done rises 2*LR + 4 cycles after
// the last bank_done (2*LR for the columns, 4 for the rows).
module tb_ghost_sync;

  localparam int unsigned BR = 2, BC = 3, LR = 3, LC = 4;
  localparam int unsigned NB = BR * BC, WC = LC + 2, WRW = $clog2(LR + 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, bank_start, busy, done;
  logic [NB-1:0] bank_done, pr_re, pr_we;
  logic [WRW-1:0] pr_row;
  logic [WC-1:0] pr_wdata [NB];
  logic [WC-1:0] pr_rdata [NB];

  ghost_sync #(.BR(BR), .BC(BC), .LR(LR), .LC(LC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit [WC-1:0] win [NB][LR + 2];
  int delay [NB];
  int cnt = 0, last_done = 0, cyc = 0, n_bank_start = 0, n_early = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // bank models
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int b = 0; b < int'(NB); b++) begin
      if (pr_re[b]) pr_rdata[b] <= win[b][pr_row];
      if (pr_we[b]) win[b][pr_row] = pr_wdata[b];
      if ((pr_re[b] || pr_we[b]) && cnt < last_done) n_early++;
    end
    if (bank_start) n_bank_start++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(negedge clk); endtask

  initial begin
    for (int b = 0; b < int'(NB); b++) pr_rdata[b] = '0;
    bank_done = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    for (int round = 0; round < 25; round++) begin
      bit [WC-1:0] own [NB][LR + 2];
      int t_done, nstart0;
      for (int b = 0; b < int'(NB); b++)
        for (int r = 0; r < int'(LR) + 2; r++)
          for (int c = 0; c < int'(WC); c++) win[b][r][c] = 1'($urandom);
      own = win;
      for (int b = 0; b < int'(NB); b++) delay[b] = 1 + int'($urandom % 20);
      last_done = 1000000;
      nstart0 = n_bank_start;
      start = 1'b1; tick(); start = 1'b0;
      check(n_bank_start == nstart0 + 1, "one bank_start pulse per start");
      check(busy, "busy after start");
      // banks finish at random times; count cycles from the start pulse
      cnt = 0;
      t_done = -1;
      last_done = 0;
      for (int b = 0; b < int'(NB); b++) if (delay[b] > last_done) last_done = delay[b];
      while (t_done < 0 && cnt < 200) begin
        for (int b = 0; b < int'(NB); b++) bank_done[b] = (cnt + 1 == delay[b]);
        tick();
        cnt++;
        if (done) t_done = cnt;
      end
      bank_done = '0;
      check(t_done - last_done == 2 * int'(LR) + 4,
            $sformatf("exchange took %0d cycles after the last bank, expected %0d",
                      t_done - last_done, 2 * LR + 4));
      tick();
      check(!busy, "idle after done");
      // every window cell on the global grid equals its owner's cell
      for (int b = 0; b < int'(NB); b++)
        for (int r = 0; r < int'(LR) + 2; r++)
          for (int c = 0; c < int'(WC); c++) begin
            int gr, gc, ob, orr, oc;
            gr = (b / int'(BC)) * int'(LR) + r - 1;
            gc = (b % int'(BC)) * int'(LC) + c - 1;
            if (gr >= 0 && gr < int'(BR * LR) && gc >= 0 && gc < int'(BC * LC)) begin
              ob  = (gr / int'(LR)) * int'(BC) + gc / int'(LC);
              orr = gr % int'(LR) + 1;
              oc  = gc % int'(LC) + 1;
              check(win[b][r][c] == own[ob][orr][oc],
                    $sformatf("round %0d bank %0d window (%0d,%0d) = %0d, owner bank %0d (%0d,%0d) = %0d",
                              round, b, r, c, win[b][r][c], ob, orr, oc, own[ob][orr][oc]));
            end
          end
    end
    check(n_early == 0, "no row access before every bank was done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
