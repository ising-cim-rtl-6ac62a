// Scan chain between the macro and an external controller.
//
// A LEN-bit shift register. While shift_en is high, one bit moves in per clock
// from scan_in at bit 0 and the register moves towards bit LEN-1, which drives
// scan_out. capture loads cap_data in parallel (used to read a memory row out).
// The parallel contents q supply memory write data and the annealing bits AN.
//
// Interface/timing: all actions at the rising edge of clk; capture has priority
// over shift_en. shift_en plays the role of SCAN_CLK, taken as a clock enable
// so the chain lives in the macro's clock domain. rst_n is active low and
// synchronous.
//
// That memory read/write data and the random annealing bits go through a scan
// chain follows the document; its length, direction and capture port are this
// design's choices.
module scan_chain #(
  parameter int unsigned LEN = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift_en,
  input  logic            scan_in,
  input  logic            capture,
  input  logic [LEN-1:0]  cap_data,
  output logic [LEN-1:0]  q,
  output logic            scan_out
);

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (capture)  q <= cap_data;
    else if (shift_en) q <= {q[LEN-2:0], scan_in};
  end

  assign scan_out = q[LEN-1];

endmodule
