// Behavioural model of the per-column sampling capacitors, charge-share switches
// and sense amplifiers at the foot of the read bitlines.
//
// Voltages are integers in millivolts. A sampling capacitor C_sigma is connected
// to its read bitline while its SP bit is high; at the rising edge it keeps
// VDD - n*VX, where n is the number of conducting read ports on the column and
// VX the unit drop (a parameter, VX_MV by default), clamped at 0 V. CS<k>
// closes the switch between capacitors k and k+1; the capacitors of a closed
// chain share their charge, so each sees the mean of the chain. A sense
// amplifier whose SA bit is high resolves in the same cycle:
//   SA_CMP  : out = 1 when the shared capacitor voltage is at or below V_REF
//             (much discharge, so sum(J*sigma) >= 0 and H_sigma <= 0: spin up),
//             compared as sum(v) <= V_REF * chain_length to stay exact;
//   SA_READ : out = 1 when the read bitline is discharged (a stored 1 is read).
// An SA whose bit is low keeps driving the value it resolved last (the latch in
// the SA), which is how the target column's comparison result survives the
// following read of the update row.
//
// Interface/timing: sa_out is combinational while sa_en is high and held after;
// capacitors and SA latches change only at rising clock edges. rst_n (active low,
// synchronous) sets every capacitor to VDD and every latch to 0.
//
// The sample / charge-share / compare sequence and the tie going to +1 (H <= 0)
// follow the document; the millivolt scale and the read trip point are this
// design's own choices.
module cs_sa_bank
  import ising_cim_pkg::*;
#(
  parameter int unsigned PCOLS = 102,
  parameter int unsigned CW    = 8,
  parameter int          VX    = VX_MV      // RBL drop per conducting port, mV
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CW-1:0]     rbl_cnt [PCOLS],
  input  logic [PCOLS-1:0]  sp,          // SP<0:n>, sample RBL onto C_sigma
  input  logic [PCOLS-2:0]  cs,          // CS<0:n-1>, charge-share switches
  input  logic [PCOLS-1:0]  sa_en,       // SA<0:n>, fire sense amplifiers
  input  sa_mode_e          sa_mode,
  input  logic [15:0]       vref_mv,
  output logic [PCOLS-1:0]  sa_out,
  output logic [15:0]       cap_mv [PCOLS]
);

  localparam int unsigned NW = $clog2(PCOLS + 1);   // chain length width
  localparam int unsigned SW = 16 + NW;               // chain voltage sum width

  logic [PCOLS-1:0] sa_q;
  logic [SW-1:0]    run_sum [PCOLS];
  logic [SW-1:0]    grp_sum [PCOLS];
  logic [NW-1:0]    run_cnt [PCOLS];
  logic [NW-1:0]    grp_cnt [PCOLS];
  logic [PCOLS-1:0] cmp_bit, rd_bit;

  function automatic logic [15:0] rbl_mv(input logic [CW-1:0] n);
    int drop;
    drop = int'(n) * VX;
    return (drop >= VDD_MV) ? 16'd0 : 16'(VDD_MV - drop);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < PCOLS; k++) cap_mv[k] <= 16'(VDD_MV);
      sa_q <= '0;
    end else begin
      for (int unsigned k = 0; k < PCOLS; k++) begin
        if (sp[k]) cap_mv[k] <= rbl_mv(rbl_cnt[k]);
        else if (grp_cnt[k] > NW'(1)) cap_mv[k] <= 16'(grp_sum[k] / grp_cnt[k]);
      end
      sa_q <= sa_out;
    end
  end

  // Chains of capacitors joined by closed CS switches: a left-to-right running
  // sum that restarts at every open switch, then the chain total spread back.
  always_comb begin
    run_sum[0] = SW'(cap_mv[0]);
    run_cnt[0] = NW'(1);
    for (int unsigned k = 1; k < PCOLS; k++) begin
      if (cs[k-1]) begin
        run_sum[k] = run_sum[k-1] + SW'(cap_mv[k]);
        run_cnt[k] = run_cnt[k-1] + NW'(1);
      end else begin
        run_sum[k] = SW'(cap_mv[k]);
        run_cnt[k] = NW'(1);
      end
    end
    grp_sum[PCOLS-1] = run_sum[PCOLS-1];
    grp_cnt[PCOLS-1] = run_cnt[PCOLS-1];
    for (int k = int'(PCOLS) - 2; k >= 0; k--) begin
      grp_sum[k] = cs[k] ? grp_sum[k+1] : run_sum[k];
      grp_cnt[k] = cs[k] ? grp_cnt[k+1] : run_cnt[k];
    end
    for (int unsigned k = 0; k < PCOLS; k++) begin
      cmp_bit[k] = grp_sum[k] <= SW'(vref_mv) * SW'(grp_cnt[k]);
      rd_bit[k]  = rbl_cnt[k] != '0;
      sa_out[k]  = sa_en[k] ? ((sa_mode == SA_CMP) ? cmp_bit[k] : rd_bit[k]) : sa_q[k];
    end
  end

endmodule
