// eDRAM refresh controller.
//
// Gain-cell eDRAM loses its stored charge, so each spin row (with its complement
// row) is rewritten periodically. A timer counts INTERVAL cycles; when it expires
// the controller raises req with the next row address and holds it until ack.
// On ack the row pointer advances (wrapping after ROWS rows) and the timer
// restarts. The refresh itself is a read of the spin row followed by a write-back
// into both the spin row and its complement row, done by the CIM controller.
// While an Ising sweep runs, every row is rewritten by the update step anyway;
// the pending request then simply waits.
//
// Interface/timing: req/row registered; ack sampled at the rising edge; enable low
// stops the timer. rst_n is active low and synchronous.
//
// The document names a refresh controller and notes that Ising write-backs
// refresh the cells; the timer, the interval and the row order are this design's.
module refresh_ctrl #(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned INTERVAL = 1024,
  parameter int unsigned RAW      = (ROWS <= 2) ? 1 : $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            ack,
  output logic            req,
  output logic [RAW-1:0]  row
);

  logic [$clog2(INTERVAL+1)-1:0] timer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer <= '0;
      req   <= 1'b0;
      row   <= '0;
    end else if (req) begin
      if (ack) begin
        req   <= 1'b0;
        timer <= '0;
        row   <= (int'(row) == int'(ROWS) - 1) ? '0 : row + 1'b1;
      end
    end else if (enable) begin
      if (int'(timer) == int'(INTERVAL) - 1) req <= 1'b1;
      else                                   timer <= timer + 1'b1;
    end
  end

endmodule
