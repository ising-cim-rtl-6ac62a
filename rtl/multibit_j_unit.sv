// Hamiltonian computation of one target spin with 2-bit J coefficients.
//
// In the 2-bit J mode a spin occupies nine bitcells of one column instead of two
// cells in two rows: three cells hold the spin on a wordline that is always on
// (a constant offset of three units), two cells hold the spin on the wordline of
// J bit 1, one cell holds it on the wordline of J bit 0, and three cells hold the
// complement on the wordlines of the inverted J bits (two on ~Jb1, one on ~Jb0).
// With J = 2*Jb1 + Jb0 (0..3) the number of conducting read ports is therefore
// 3 + J for an up-spin and 3 - J for a down-spin, i.e. 3 + J*sigma: the bitline
// drops by (3 + J*sigma) * VX. Because every neighbour has its own nine cells on
// a bitline, the eight neighbours take eight computation cycles; computation k
// samples its bitline onto sampling capacitor k. The eight capacitors then share
// their charge and one sense amplifier compares the mean with
// V_REF = VDD - 3*VX, the level of sum(J*sigma) = 0: at or below V_REF the
// target becomes +1 (H_sigma <= 0), above it -1. An absent neighbour (grid edge)
// is given J = 0, which draws exactly the neutral three units.
//
// The unit holds the nine-cell segments of the eight neighbours of one target
// (written through seg_we / seg_idx / seg_spin while not busy; a write stores
// the spin in six cells and the complement in the other three), the sampling
// capacitors and sense amplifier (cs_sa_bank with eight capacitors and the
// smaller, underdriven unit drop VX2B_MV) and a reference column (vref_gen:
// six REF_WLs for one cycle give VDD - 3*VX2B_MV).
//
// Interface/timing: start is a one-cycle pulse taking j (J_k = j[2k+1:2k], bit 1
// is Jb1); j must stay stable until done. busy is high for nine cycles (eight
// computations, then charge share and compare); done pulses in the tenth with
// spin_out valid from then on. bl_mv shows the bitline voltage of the current
// computation. rst_n is active low and synchronous.
//
// The cell arrangement, the 3 + J*sigma current and the eight computations follow
// the document; how the segments of the eight neighbours are placed in the array
// and the use of eight sampling capacitors are this design's own choice, as the
// document does not give them. The unit is not wired to the 1-bit macro's array.
module multibit_j_unit
  import ising_cim_pkg::*;
#(
  parameter int VX = VX2B_MV
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  seg_we,
  input  logic [2:0]            seg_idx,
  input  logic                  seg_spin,
  input  logic                  start,
  input  logic [2*NNEIGH-1:0]   j,
  output logic                  busy,
  output logic                  done,
  output logic                  spin_out,
  output logic [15:0]           bl_mv
);

  localparam int unsigned NCELL = 9;
  localparam int unsigned CW    = 4;

  // cell k of a segment: 0..2 spin (always on), 3..4 spin (Jb1), 5 spin (Jb0),
  // 6..7 complement (~Jb1), 8 complement (~Jb0)
  logic [NCELL-1:0] seg [NNEIGH];
  logic [2:0]       step;
  logic             computing, comparing, spin_q;
  logic [NCELL-1:0] rwl;
  logic [CW-1:0]    cnt;
  logic [CW-1:0]    rbl_cnt [NNEIGH];
  logic [NNEIGH-1:0] sp, sa_en, sa_out;
  logic [NNEIGH-2:0] cs;
  logic             ref_pre, ref_pulse;
  logic [NREF_WL-1:0] ref_wl;
  logic [15:0]      vref_mv;
  logic [15:0]      cap_mv [NNEIGH];

  typedef enum logic [1:0] {M_IDLE, M_COMP, M_CMP, M_DONE} mstate_e;
  mstate_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= M_IDLE;
      step   <= '0;
      spin_q <= 1'b0;
      for (int unsigned k = 0; k < NNEIGH; k++) seg[k] <= '0;
    end else begin
      if (seg_we && !busy)
        seg[seg_idx] <= {{3{~seg_spin}}, {6{seg_spin}}};
      unique case (state)
        M_IDLE: if (start) begin
          step  <= '0;
          state <= M_COMP;
        end
        M_COMP: begin
          step <= step + 1'b1;
          if (step == 3'(NNEIGH - 1)) state <= M_CMP;
        end
        M_CMP: begin
          spin_q <= sa_out[0];
          state  <= M_DONE;
        end
        M_DONE:  state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  assign computing = (state == M_COMP);
  assign comparing = (state == M_CMP);
  assign busy      = computing || comparing;
  assign done      = (state == M_DONE);
  assign spin_out  = spin_q;

  // read wordlines of the segment being computed, and its conducting ports
  always_comb begin
    logic jb1, jb0;
    jb1 = j[2 * step + 1];
    jb0 = j[2 * step];
    rwl = {~jb0, ~jb1, ~jb1, jb0, jb1, jb1, 3'b111};
    cnt = '0;
    for (int unsigned k = 0; k < NCELL; k++) cnt += CW'(rwl[k] & seg[step][k]);
    for (int unsigned k = 0; k < NNEIGH; k++) rbl_cnt[k] = (computing && k == 32'(step)) ? cnt : '0;
    sp = computing ? (NNEIGH'(1) << step) : '0;
    bl_mv = computing ? 16'(VDD_MV - int'(cnt) * VX) : 16'(VDD_MV);
  end

  // all eight capacitors shared, one sense amplifier fired
  assign cs        = comparing ? '1 : '0;
  assign sa_en     = comparing ? NNEIGH'(1) : '0;
  // reference: precharge in the first computation, six REF_WLs for one cycle in
  // the second (each REF_WL step is VX2B_MV / 2)
  assign ref_pre   = computing && step == 3'd0;
  assign ref_pulse = computing && step == 3'd1;
  assign ref_wl    = '1;

  cs_sa_bank #(.PCOLS(NNEIGH), .CW(CW), .VX(VX)) u_sa (
    .clk, .rst_n, .rbl_cnt, .sp, .cs, .sa_en, .sa_mode(SA_CMP), .vref_mv, .sa_out, .cap_mv
  );

  vref_gen u_vref (
    .clk, .rst_n, .ref_pre, .ref_pulse, .ref_wl, .vref_mv
  );

endmodule
