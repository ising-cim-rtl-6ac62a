// Test of the 2-bit J Hamiltonian unit.
//
// First every row of the cell truth table (spin -1/+1 against the four 2-bit J
// codes) is checked on its own: the bitline voltage of a computation must be
// VDD - (3 + J*sigma) * VX. Then random targets: random neighbour spins and
// 2-bit J values, some neighbours absent (J = 0), and the new spin is compared
// with sign(sum J*sigma) worked out here, ties (sum = 0) giving +1. The latency
// (done ten cycles after start) is checked on every run; ties and both results
// are counted and must occur.
module tb_multibit_j_unit;
  import ising_cim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic seg_we = 1'b0, seg_spin = 1'b0, start = 1'b0;
  logic [2:0] seg_idx = '0;
  logic [15:0] j = '0;
  logic busy, done, spin_out;
  logic [15:0] bl_mv;

  multibit_j_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_tie = 0, n_up = 0, n_down = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  task automatic tick(); @(negedge clk); endtask

  task automatic store(input int k, input bit s);
    seg_we = 1'b1; seg_idx = 3'(k); seg_spin = s; tick(); seg_we = 1'b0;
  endtask

  // run one target; bl[k] is the bitline voltage seen in computation k
  task automatic run(output bit res, output int bl [8]);
    int n;
    start = 1'b1; tick(); start = 1'b0;
    n = 0;
    while (!done && n < 50) begin
      if (n < 8) bl[n] = int'(bl_mv);
      tick();
      n++;
    end
    check(n == 9, $sformatf("done %0d cycles after start, expected 10", n + 1));
    res = spin_out;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s [8];
    int jv [8];
    int bl [8];
    bit res;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    // truth table: neighbour k gets spin s and code J; the others are neutral
    for (int sv = 0; sv < 2; sv++)
      for (int code = 0; code < 4; code++) begin
        int k;
        k = int'($urandom % 8);
        for (int m = 0; m < 8; m++) store(m, 1'($urandom));
        store(k, 1'(sv));
        j = '0;
        j[2*k +: 2] = 2'(code);
        run(res, bl);
        check(bl[k] == VDD_MV - (3 + code * (sv ? 1 : -1)) * VX2B_MV,
              $sformatf("sigma=%0d J=%0d: bitline %0d mV, expected %0d", sv ? 1 : -1, code, bl[k],
                        VDD_MV - (3 + code * (sv ? 1 : -1)) * VX2B_MV));
        // with only one non-neutral neighbour the sign is J*sigma (0 counts as +1)
        check(res == (code == 0 || sv == 1), $sformatf("sigma=%0d J=%0d: spin %0d", sv, code, res));
      end
    // random targets
    for (int t = 0; t < 400; t++) begin
      int sum;
      sum = 0;
      for (int m = 0; m < 8; m++) begin
        s[m]  = 1'($urandom);
        jv[m] = int'($urandom % 4);
        if ($urandom % 8 == 0) jv[m] = 0;          // absent neighbour
        store(m, s[m]);
        j[2*m +: 2] = 2'(jv[m]);
        sum += jv[m] * (s[m] ? 1 : -1);
      end
      run(res, bl);
      for (int m = 0; m < 8; m++)
        check(bl[m] == VDD_MV - (3 + jv[m] * (s[m] ? 1 : -1)) * VX2B_MV, $sformatf("target %0d computation %0d bitline %0d s=%0d j=%0d", t, m, bl[m], s[m], jv[m]));
      check(res == (sum >= 0), $sformatf("target %0d: sum %0d, spin %0d", t, sum, res));
      if (sum == 0) n_tie++;
      if (sum >= 0) n_up++; else n_down++;
    end
    check(n_tie > 0, "ties (sum J*sigma = 0) occurred");
    check(n_up > 0 && n_down > 0, "both results occurred");
    $display("ties=%0d up=%0d down=%0d", n_tie, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
