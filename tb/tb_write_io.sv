// Test of the write driver: with UPDATE the write bitline is the SA output,
// inverted where AN is 1 (annealing flip) and straight where AN is 0; without
// UPDATE it is the host data; WBLB is always the inverse. The read register
// captures SA outputs only when rd_latch is high. Includes the 0101 / AN 0101
// -> 0000 case.
module tb_write_io;
  localparam int unsigned PCOLS = 12;
  logic clk = 1'b0, rst_n = 1'b0, update = 1'b0, rd_latch = 1'b0;
  logic [PCOLS-1:0] an = '0, sa_out = '0, host_wdata = '0, wbl, wbl_b, rdata;
  int checks = 0, failures = 0;

  write_io #(.PCOLS(PCOLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PCOLS-1:0] held;
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    update = 1'b1; sa_out = PCOLS'(4'b0101); an = PCOLS'(4'b0101);
    #1;
    checks++; if (wbl != '0) begin failures++; $display("FAIL 0101 anneal"); end
    held = rdata;
    for (int t = 0; t < 300; t++) begin
      logic [PCOLS-1:0] e;
      @(negedge clk);
      update = $urandom % 2; an = PCOLS'($urandom); sa_out = PCOLS'($urandom);
      host_wdata = PCOLS'($urandom); rd_latch = $urandom % 2;
      #1;
      e = '0;
      for (int k = 0; k < PCOLS; k++) e[k] = update ? (sa_out[k] ^ an[k]) : host_wdata[k];
      checks++; if (wbl != e) begin failures++; $display("FAIL wbl"); end
      checks++; if (wbl_b != ~e) begin failures++; $display("FAIL wbl_b"); end
      checks++; if (rdata != held) begin failures++; $display("FAIL rdata"); end
      if (rd_latch) held = sa_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
