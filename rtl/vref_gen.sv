// Behavioural model of the reference column that makes V_REF.
//
// One memory column is set aside as a reference: its read bitline (REF_RBL) is
// precharged to VDD, then a number of reference wordlines REF_WL<5:0> are pulsed
// for a chosen width, each conducting cell pulling the bitline down. V_REF is the
// voltage left on REF_RBL. The level is tuned by how many REF_WLs are on and for
// how long, as in the document; here each active REF_WL lowers the bitline by
// REF_UNIT_MV per clock cycle of pulse (a linear model of the discharge ramp).
//
// Interface/timing: ref_pre (one cycle) restores VDD at the next edge; each edge
// with ref_pulse high subtracts popcount(ref_wl) * REF_UNIT_MV, clamped at 0 V.
// vref_mv is the registered level. rst_n is active low and synchronous.
module vref_gen
  import ising_cim_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ref_pre,
  input  logic                 ref_pulse,
  input  logic [NREF_WL-1:0]   ref_wl,
  output logic [15:0]          vref_mv
);

  int unsigned drop;

  always_comb begin
    drop = 0;
    for (int unsigned k = 0; k < NREF_WL; k++) drop += ref_wl[k] ? REF_UNIT_MV : 0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || ref_pre) vref_mv <= 16'(VDD_MV);
    else if (ref_pulse)    vref_mv <= (int'(vref_mv) > int'(drop)) ? 16'(int'(vref_mv) - int'(drop)) : 16'd0;
  end

endmodule
