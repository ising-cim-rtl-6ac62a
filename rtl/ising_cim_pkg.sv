// Shared constants and types of the Ising compute-in-memory macro.
//
// Spins are stored as one bit: 1 is the up-spin (+1, bitcell node at VDD), 0 the
// down-spin (-1, node at VSS). A 1-bit J coefficient uses the same code: 1 is +1
// (RWL driven), 0 is -1 (RWL held low). The eight King's-graph neighbours of a
// target spin at (r, c) are numbered as in the usual 3x3 picture:
//
//     0 1 2        (r-1, c-1) (r-1, c) (r-1, c+1)
//     3 . 4        (r,   c-1)          (r,   c+1)
//     5 6 7        (r+1, c-1) (r+1, c) (r+1, c+1)
//
// The analog quantities of the macro (bitline and capacitor voltages) are
// represented by integers in millivolts in the behavioural models. The unit
// discharge VX_MV and the reference step REF_UNIT_MV are this design's own
// choice, picked so that every comparison is exact in integer arithmetic.
package ising_cim_pkg;

  // Number of King's-graph neighbours of one spin.
  localparam int unsigned NNEIGH = 8;
  // Coefficients delivered per Load_J pulse (eight coefficients, four pulses).
  localparam int unsigned J_PER_LOAD = 2;
  localparam int unsigned J_LOADS    = NNEIGH / J_PER_LOAD;

  // Behavioural voltage scale.
  localparam int VDD_MV      = 1000;  // supply
  localparam int VX_MV       = 300;   // RBL drop per conducting read port
  localparam int REF_UNIT_MV = 50;    // reference drop per REF_WL and pulse cycle (= VX_MV / 6)
  localparam int NREF_WL     = 6;     // REF_WL<5:0>
  // 2-bit J mode: the read wordlines are underdriven so that one cell discharges
  // less and six conducting cells (the most one neighbour can turn on) still
  // leave the bitline well above 0 V.
  localparam int VX2B_MV     = 100;   // RBL drop per conducting port, 2-bit J mode

  // Read iterations of one Hamiltonian computation (left, centre, right column).
  typedef enum logic [1:0] {
    ITER_LEFT  = 2'd0,
    ITER_MID   = 2'd1,
    ITER_RIGHT = 2'd2
  } iter_e;

  // Which rows the read wordlines select.
  typedef enum logic [1:0] {
    RWL_OFF = 2'd0,   // no row
    RWL_ROW = 2'd1,   // one physical row (normal read, refresh, copy, update)
    RWL_CIM = 2'd2    // J / J-bar applied on the six rows around a target row
  } rwl_mode_e;

  // Sense-amplifier input.
  typedef enum logic {
    SA_READ = 1'b0,   // sense the read bitline (normal read)
    SA_CMP  = 1'b1    // compare the charge-shared capacitor voltage with V_REF
  } sa_mode_e;


endpackage
