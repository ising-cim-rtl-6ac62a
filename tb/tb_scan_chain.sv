// Test of the scan chain: data shifted in appears in parallel at q after LEN
// shifts, a capture loads a word that then comes out of scan_out most
// significant bit first, and nothing moves while shift_en is low.
module tb_scan_chain;
  localparam int unsigned LEN = 13;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, scan_in = 1'b0, capture = 1'b0;
  logic [LEN-1:0] cap_data = '0, q;
  logic scan_out;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(LEN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      logic [LEN-1:0] d, got;
      d = LEN'($urandom);
      for (int k = LEN - 1; k >= 0; k--) begin
        shift_en = 1'b1; scan_in = d[k]; @(negedge clk);
        shift_en = 1'b0; repeat ($urandom % 2) @(negedge clk);
      end
      checks++; if (q != d) begin failures++; $display("FAIL shift in %h got %h", d, q); end
      d = LEN'($urandom);
      cap_data = d; capture = 1'b1; shift_en = 1'b1; @(negedge clk); capture = 1'b0;
      checks++; if (q != d) begin failures++; $display("FAIL capture"); end
      for (int k = LEN - 1; k >= 0; k--) begin
        got[k] = scan_out;
        shift_en = 1'b1; scan_in = 1'b0; @(negedge clk);
      end
      shift_en = 1'b0;
      checks++; if (got != d) begin failures++; $display("FAIL shift out %h got %h", d, got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
