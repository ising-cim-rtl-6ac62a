// J coefficient loader.
//
// Before each Hamiltonian computation the controller gathers the eight 1-bit J
// coefficients of the target spin's King's graph. They arrive J_PER_LOAD at a
// time, one group per Load_J pulse, so four pulses fill the register: pulse k
// writes J[2k+1:2k]. j_valid rises after the fourth pulse and stays high until
// clear. Pulses arriving while j_valid is high are ignored.
//
// Interface/timing: clear and load_j are sampled at the rising edge; clear wins.
// j_valid and j are registered. rst_n is active low and synchronous.
//
// Four Load_J pulses for eight coefficients follow the document; two coefficients
// per pulse and their order are this design's choice.
module j_loader
  import ising_cim_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      load_j,
  input  logic [J_PER_LOAD-1:0]     j_in,
  output logic [NNEIGH-1:0]         j,
  output logic                      j_valid
);

  logic [$clog2(J_LOADS+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt     <= '0;
      j_valid <= 1'b0;
      if (!rst_n) j <= '0;
    end else if (load_j && !j_valid) begin
      j[cnt*J_PER_LOAD +: J_PER_LOAD] <= j_in;
      cnt     <= cnt + 1'b1;
      j_valid <= (int'(cnt) == int'(J_LOADS) - 1);
    end
  end

endmodule
