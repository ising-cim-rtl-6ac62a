// Test of the reference-column model: after a precharge, each cycle of pulse
// lowers V_REF by REF_UNIT_MV per active REF_WL, clamped at 0 V. Checks the
// levels the controller uses (3, 5 and 4x2 units) and random sequences.
module tb_vref_gen;
  import ising_cim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ref_pre = 1'b0, ref_pulse = 1'b0;
  logic [NREF_WL-1:0] ref_wl = '0;
  logic [15:0] vref_mv;
  int checks = 0, failures = 0;

  vref_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    checks++; if (vref_mv != 16'(VDD_MV)) failures++;
    for (int t = 0; t < 200; t++) begin
      int width;
      ref_pre = 1'b1; @(negedge clk); ref_pre = 1'b0;
      expv = VDD_MV;
      checks++; if (int'(vref_mv) != expv) begin failures++; $display("FAIL precharge"); end
      width = 1 + $urandom % 3;
      ref_wl = NREF_WL'($urandom);
      if (t == 0) begin ref_wl = 6'b000111; width = 1; end
      if (t == 1) begin ref_wl = 6'b011111; width = 1; end
      if (t == 2) begin ref_wl = 6'b001111; width = 2; end
      for (int w = 0; w < width; w++) begin
        ref_pulse = 1'b1; @(negedge clk);
        expv = expv - $countones(ref_wl) * REF_UNIT_MV;
        if (expv < 0) expv = 0;
      end
      ref_pulse = 1'b0;
      @(negedge clk);
      checks++;
      if (int'(vref_mv) != expv) begin failures++; $display("FAIL wl=%b w=%0d got %0d exp %0d", ref_wl, width, vref_mv, expv); end
      if (t == 2) begin checks++; if (vref_mv != 16'd600) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
