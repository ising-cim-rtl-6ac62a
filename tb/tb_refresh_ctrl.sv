// Test of the refresh controller: a request appears every INTERVAL enabled
// cycles, is held until acknowledged, the row pointer walks through all rows and
// wraps, and the timer stops while enable is low.
module tb_refresh_ctrl;
  localparam int unsigned ROWS = 5, INTERVAL = 7, RAW = $clog2(ROWS);
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, ack = 1'b0, req;
  logic [RAW-1:0] row;
  int checks = 0, failures = 0;

  refresh_ctrl #(.ROWS(ROWS), .INTERVAL(INTERVAL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    repeat (3 * INTERVAL) @(negedge clk);
    checks++; if (req) begin failures++; $display("FAIL req while disabled"); end
    enable = 1'b1;
    for (int t = 0; t < 3 * ROWS; t++) begin
      int wait_cyc;
      wait_cyc = 0;
      while (!req) begin @(negedge clk); wait_cyc++; end
      checks++; if (wait_cyc != INTERVAL) begin failures++; $display("FAIL interval %0d", wait_cyc); end
      checks++; if (int'(row) != t % ROWS) begin failures++; $display("FAIL row %0d exp %0d", row, t % ROWS); end
      repeat ($urandom % 4) @(negedge clk);
      checks++; if (!req) begin failures++; $display("FAIL req dropped"); end
      ack = 1'b1; @(negedge clk); ack = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
