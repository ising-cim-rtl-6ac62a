// Test of the sampling-capacitor / charge-share / sense-amplifier model.
// Random discharge counts are sampled onto three adjacent capacitors, shared
// and compared with a reference; the expected decision is worked out from the
// millivolt formula VDD - n*VX and the chain mean. Also checks read-mode sensing,
// the SA latch hold while SA is off, and isolation of capacitors outside the chain.
module tb_cs_sa_bank;
  import ising_cim_pkg::*;
  localparam int unsigned PCOLS = 8, CW = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW-1:0] rbl_cnt [PCOLS];
  logic [PCOLS-1:0] sp = '0, sa_en = '0, sa_out;
  logic [PCOLS-2:0] cs = '0;
  sa_mode_e sa_mode = SA_READ;
  logic [15:0] vref_mv = 16'd600;
  logic [15:0] cap_mv [PCOLS];
  int checks = 0, failures = 0, n_up = 0, n_dn = 0, n_tie = 0;

  cs_sa_bank #(.PCOLS(PCOLS), .CW(CW)) dut (.*);
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

  initial begin
    for (int k = 0; k < PCOLS; k++) rbl_cnt[k] = '0;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      int pc, n[3], sumv, ref_v, other;
      bit exp_up;
      pc = 1 + ($urandom % (PCOLS - 2));
      ref_v = 450 + 50 * ($urandom % 8);
      other = (pc + 3) % PCOLS;
      for (int i = 0; i < 3; i++) begin
        n[i] = $urandom % 4;
        if (t % 17 == 0) n[i] = 0;
      end
      // three sampling cycles
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        sp = '0; sp[pc - 1 + i] = 1'b1;
        rbl_cnt[pc - 1 + i] = CW'(n[i]);
      end
      @(negedge clk);
      sp = '0;
      for (int i = 0; i < 3; i++)
        check(int'(cap_mv[pc - 1 + i]) == VDD_MV - n[i] * VX_MV, "sampled voltage");
      // charge share and compare
      cs = '0; cs[pc - 1] = 1'b1; cs[pc] = 1'b1;
      sa_en = '0; sa_en[pc] = 1'b1; sa_mode = SA_CMP; vref_mv = 16'(ref_v);
      sumv = 3 * VDD_MV - (n[0] + n[1] + n[2]) * VX_MV;
      exp_up = (sumv <= 3 * ref_v);
      if (sumv == 3 * ref_v) n_tie++;
      if (exp_up) n_up++; else n_dn++;
      #1;
      check(sa_out[pc] == exp_up, $sformatf("compare n=%0d,%0d,%0d vref=%0d", n[0], n[1], n[2], ref_v));
      @(negedge clk);
      // SA off: latch holds; other columns read their bitlines
      cs = '0; sa_mode = SA_READ; sa_en = '1; sa_en[pc] = 1'b0;
      for (int k = 0; k < PCOLS; k++) rbl_cnt[k] = CW'($urandom % 2);
      #1;
      check(sa_out[pc] == exp_up, "latched result held");
      check(sa_out[other] == (rbl_cnt[other] != 0), "read-mode sensing");
      @(negedge clk);
      sa_en = '0;
      for (int i = 0; i < 3; i++)
        check(int'(cap_mv[pc - 1 + i]) == sumv / 3, "shared voltage");
    end
    check(n_up > 0 && n_dn > 0 && n_tie > 0, "both decisions and a tie seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
