// Write driver and read I/O at the foot of each column.
//
// The write bitline of every column is driven from one of two sources:
//   update = 1 : the column's sense-amplifier output, passed either straight
//                (non-inverting path, AN = 0) or inverted (inverting path,
//                AN = 1). This is the write-after-read path used for the spin
//                update, for copying the ping-pong row back, for refresh and
//                for annealing, where AN<k> = 1 flips spin k.
//   update = 0 : host write data (normal memory write).
// WBLB always carries the complement of WBL, so a spin row and its complement row
// can be written in one cycle. A read-data register captures the SA outputs when
// rd_latch is high (the read I/O).
//
// Interface/timing: wbl/wbl_b are combinational; rdata is registered at the
// rising edge. rst_n is active low and synchronous.
//
// The UPDATE and AN inverting/non-inverting paths follow the document's
// schematic; the complementary write bitline is this design's choice.
module write_io #(
  parameter int unsigned PCOLS = 102
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              update,
  input  logic [PCOLS-1:0]  an,
  input  logic [PCOLS-1:0]  sa_out,
  input  logic [PCOLS-1:0]  host_wdata,
  input  logic              rd_latch,
  output logic [PCOLS-1:0]  wbl,
  output logic [PCOLS-1:0]  wbl_b,
  output logic [PCOLS-1:0]  rdata
);

  always_comb begin
    for (int unsigned k = 0; k < PCOLS; k++) begin
      if (update) wbl[k] = an[k] ? ~sa_out[k] : sa_out[k];
      else        wbl[k] = host_wdata[k];
    end
    wbl_b = ~wbl;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        rdata <= '0;
    else if (rd_latch) rdata <= sa_out;
  end

endmodule
