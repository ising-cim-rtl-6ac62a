// Test of the J loader: four Load_J pulses with idle gaps fill the eight
// coefficients in order, j_valid rises exactly after the fourth pulse, extra
// pulses are ignored and clear restarts the collection.
module tb_j_loader;
  import ising_cim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, load_j = 1'b0;
  logic [J_PER_LOAD-1:0] j_in = '0;
  logic [NNEIGH-1:0] j;
  logic j_valid;
  int checks = 0, failures = 0;

  j_loader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      logic [NNEIGH-1:0] e;
      e = NNEIGH'($urandom);
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      for (int p = 0; p < J_LOADS; p++) begin
        checks++; if (j_valid) begin failures++; $display("FAIL early valid"); end
        repeat ($urandom % 3) @(negedge clk);
        load_j = 1'b1; j_in = e[p*J_PER_LOAD +: J_PER_LOAD];
        @(negedge clk);
        load_j = 1'b0;
      end
      checks++; if (!j_valid) begin failures++; $display("FAIL no valid"); end
      checks++; if (j != e) begin failures++; $display("FAIL j=%b exp %b", j, e); end
      load_j = 1'b1; j_in = ~j_in; @(negedge clk); load_j = 1'b0;
      checks++; if (j != e || !j_valid) begin failures++; $display("FAIL extra pulse changed j"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
