// Controller of the Ising compute-in-memory macro.
//
// It runs the macro as a normal memory (row read, row write, refresh) or, after
// start, as an Ising engine that sweeps every spin of the ROWS x COLS grid once
// and then, if anneal_en is set, runs one annealing pass.
//
// One spin update (target at row r, column c; physical column pc = c + 1):
//   S_JREQ  ask for the target's eight J coefficients (j_req, four Load_J pulses)
//   S_IT1   PRECHARGE low; RWLs carry J0/J3/J5 (and bars); SP<pc-1> samples
//   S_IT2   RWLs carry J1/J6; SP<pc> samples
//   S_IT3   RWLs carry J2/J4/J7; SP<pc+1> samples
//   S_CMP   CS<pc-1>, CS<pc> share the three capacitors; SA<pc> compares the
//           shared voltage with V_REF and latches the new spin
//   S_UPD   read the ping-pong row of row r with every SA but SA<pc>, write it
//           back with UPDATE, so column pc takes the new spin (read-modify-write)
// That is three computation cycles, one compare cycle and one update cycle from
// the moment the J coefficients are present (hsig_start to hsig_done).
//
// Ping-pong rows: new spins of row r go to ping-pong row r mod 2, never over the
// original row, because the old value of every spin is still needed by its
// neighbours. Once row r is finished the old row r-1 is no longer needed, so the
// ping-pong row of r-1 is copied back into spin row r-1 and its complement row
// (S_COPY). The last row is copied after the sweep. All spins of a sweep are thus
// updated from the same old state.
//
// Annealing (S_ANREQ, S_ANRW): for each row a, an_req asks for the row's random
// flip bits; when an_valid arrives the row is read, every bit whose AN bit is 1
// is inverted on the way back, and spin and complement rows are rewritten.
//
// V_REF: the reference column is precharged in S_IT1 and discharged in S_IT2
// (and S_IT3) by as many REF_WLs as the target has neighbours (n <= 6), or by
// n/2 REF_WLs for two cycles (n = 8), so the threshold sits at H_sigma = 0 for
// interior, edge and corner spins alike.
//
// Normal memory access (from S_IDLE, one cycle each): read of spin row mem_addr
// into the read register (rd_latch), or write of spin row mem_addr and its
// complement from the host data. Normal access and start go before a pending
// refresh, which waits in idle.
//
// Ghost cells (parameters GT/GB/GL/GR): when the macro is one bank of a larger
// grid it also stores copies of its neighbours' edge rows and columns. Those are
// read as neighbours but not updated: the sweep covers only the owned window, and
// with ghost columns each row starts with S_SEED, which copies the old row into
// its ping-pong row so the ghost columns come back unchanged.
//
// The five steps and their order follow the document; the state encoding, the
// handshakes (j_req / j_valid, an_req / an_valid, mem_req / mem_ack) and the
// sweep order (row by row, left to right) are this design's choices.
module cim_controller
  import ising_cim_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned COLS  = 100,
  parameter int unsigned PROWS = 2 * ROWS + 2,
  parameter int unsigned PCOLS = COLS + 2,
  parameter int unsigned RAW   = $clog2(PROWS),
  parameter int unsigned RW    = (ROWS <= 2) ? 1 : $clog2(ROWS),
  parameter int unsigned CWB   = (COLS <= 2) ? 1 : $clog2(COLS),
  // Ghost rows / columns held by this macro (1 = present on that side). Ghost
  // spins are neighbours but are not updated here; they belong to another bank.
  parameter bit          GT    = 1'b0,
  parameter bit          GB    = 1'b0,
  parameter bit          GL    = 1'b0,
  parameter bit          GR    = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  // sweep control
  input  logic                start,
  input  logic                anneal_en,
  output logic                busy,
  output logic                done,
  // J coefficients
  output logic                j_req,
  output logic [RW-1:0]       tgt_row,
  output logic [CWB-1:0]      tgt_col,
  output logic                j_clear,
  input  logic                j_valid,
  output logic [NNEIGH-1:0]   nmask,
  // annealing bits
  output logic                an_req,
  output logic [RW-1:0]       an_row,
  input  logic                an_valid,
  output logic                an_apply,
  // normal memory access
  input  logic                mem_req,
  input  logic                mem_we,
  input  logic [RW-1:0]       mem_addr,
  output logic                mem_ack,
  output logic                rd_latch,
  output logic                host_wr,
  // refresh
  input  logic                ref_req,
  input  logic [RW-1:0]       ref_row,
  output logic                ref_ack,
  // array, wordlines, capacitors and sense amplifiers
  output logic                precharge_b,
  output rwl_mode_e           rwl_mode,
  output logic                rwl_en,
  output iter_e               iter,
  output logic [RAW-1:0]      trow,
  output logic [RAW-1:0]      rd_row,
  output logic                wwl_en,
  output logic [RAW-1:0]      wr_row,
  output logic                wr_comp,
  output logic [PCOLS-1:0]    sp,
  output logic [PCOLS-2:0]    cs,
  output logic [PCOLS-1:0]    sa_en,
  output sa_mode_e            sa_mode,
  output logic                update,
  // reference column
  output logic                ref_pre,
  output logic                ref_pulse,
  output logic [NREF_WL-1:0]  ref_wl,
  // status
  output logic                hsig_start,
  output logic                latch_result,
  output logic                hsig_done
);

  typedef enum logic [3:0] {
    S_IDLE, S_SEED, S_JREQ, S_IT1, S_IT2, S_IT3, S_CMP, S_UPD, S_COPY,
    S_ANREQ, S_ANRW, S_DONE
  } state_e;

  // Owned (updated) window of the stored grid.
  localparam int unsigned R0 = 32'(GT);
  localparam int unsigned R1 = ROWS - 1 - GB;
  localparam int unsigned C0 = 32'(GL);
  localparam int unsigned C1 = COLS - 1 - GR;
  // With ghost columns the ping-pong row is first seeded with the old row, so
  // the ghost columns survive the copy-back unchanged.
  localparam bit SEED = GL | GR;

  state_e          state;
  logic [RW-1:0]   r, copy_row, a;
  logic [CWB-1:0]  c;
  logic            ann;
  int unsigned     pc;
  int unsigned     nn;

  // Neighbour mask of the current target (grid edges have fewer neighbours).
  always_comb begin
    logic top, bot, lft, rgt;
    top = (r != '0);
    bot = (int'(r) != int'(ROWS) - 1);
    lft = (c != '0);
    rgt = (int'(c) != int'(COLS) - 1);
    nmask = {bot & rgt, bot, bot & lft, rgt, lft, top & rgt, top, top & lft};
    nn = 0;
    for (int unsigned k = 0; k < NNEIGH; k++) nn += nmask[k] ? 1 : 0;
  end

  assign pc       = int'(c) + 1;
  assign tgt_row  = r;
  assign tgt_col  = c;
  assign an_row   = a;
  assign trow     = RAW'(r);
  assign busy     = (state != S_IDLE);

  // Row-level actions of the sweep.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      r        <= '0;
      c        <= '0;
      a        <= '0;
      copy_row <= '0;
      ann      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (!mem_req && start) begin
            r     <= RW'(R0);
            c     <= CWB'(C0);
            ann   <= anneal_en;
            state <= SEED ? S_SEED : S_JREQ;
          end
        end
        S_SEED: state <= S_JREQ;
        S_JREQ: if (j_valid) state <= S_IT1;
        S_IT1:  state <= S_IT2;
        S_IT2:  state <= S_IT3;
        S_IT3:  state <= S_CMP;
        S_CMP:  state <= S_UPD;
        S_UPD: begin
          if (int'(c) != int'(C1)) begin
            c     <= c + 1'b1;
            state <= S_JREQ;
          end else if (int'(r) != int'(R0)) begin
            copy_row <= r - 1'b1;
            state    <= S_COPY;
          end else if (R0 == R1) begin
            copy_row <= r;
            state    <= S_COPY;
          end else begin
            r     <= r + 1'b1;
            c     <= CWB'(C0);
            state <= SEED ? S_SEED : S_JREQ;
          end
        end
        S_COPY: begin
          if (int'(copy_row) == int'(R1)) begin
            a     <= RW'(R0);
            state <= ann ? S_ANREQ : S_DONE;
          end else if (int'(r) == int'(R1)) begin
            copy_row <= RW'(R1);
          end else begin
            r     <= r + 1'b1;
            c     <= CWB'(C0);
            state <= SEED ? S_SEED : S_JREQ;
          end
        end
        S_ANREQ: if (an_valid) state <= S_ANRW;
        S_ANRW: begin
          if (int'(a) == int'(R1)) state <= S_DONE;
          else begin
            a     <= a + 1'b1;
            state <= S_ANREQ;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Control outputs of each state.
  always_comb begin
    j_req        = 1'b0;
    j_clear      = 1'b0;
    an_req       = 1'b0;
    an_apply     = 1'b0;
    mem_ack      = 1'b0;
    rd_latch     = 1'b0;
    host_wr      = 1'b0;
    ref_ack      = 1'b0;
    precharge_b  = 1'b1;
    rwl_mode     = RWL_OFF;
    rwl_en       = 1'b0;
    iter         = ITER_LEFT;
    rd_row       = '0;
    wwl_en       = 1'b0;
    wr_row       = '0;
    wr_comp      = 1'b0;
    sp           = '0;
    cs           = '0;
    sa_en        = '0;
    sa_mode      = SA_READ;
    update       = 1'b0;
    ref_pre      = 1'b0;
    ref_pulse    = 1'b0;
    ref_wl       = '0;
    hsig_start   = 1'b0;
    latch_result = 1'b0;
    hsig_done    = 1'b0;
    done         = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (mem_req) begin
          mem_ack     = 1'b1;
          if (mem_we) begin
            host_wr = 1'b1;
            wwl_en  = 1'b1;
            wr_row  = RAW'(mem_addr);
            wr_comp = 1'b1;
          end else begin
            precharge_b = 1'b0;
            rwl_mode    = RWL_ROW;
            rwl_en      = 1'b1;
            rd_row      = RAW'(mem_addr);
            sa_en       = '1;
            rd_latch    = 1'b1;
          end
        end else if (ref_req && !start) begin
          // refresh: read spin row, write it back into spin and complement rows
          ref_ack     = 1'b1;
          precharge_b = 1'b0;
          rwl_mode    = RWL_ROW;
          rwl_en      = 1'b1;
          rd_row      = RAW'(ref_row);
          sa_en       = '1;
          update      = 1'b1;
          wwl_en      = 1'b1;
          wr_row      = RAW'(ref_row);
          wr_comp     = 1'b1;
        end
      end
      S_SEED: begin
        precharge_b = 1'b0;
        rwl_mode    = RWL_ROW;
        rwl_en      = 1'b1;
        rd_row      = RAW'(r);
        sa_en       = '1;
        update      = 1'b1;
        wwl_en      = 1'b1;
        wr_row      = RAW'(2 * ROWS) + RAW'(r[0]);
      end
      S_JREQ: begin
        j_req = !j_valid;
        hsig_start = j_valid;
      end
      S_IT1: begin
        precharge_b = 1'b0;
        rwl_mode    = RWL_CIM;
        rwl_en      = 1'b1;
        iter        = ITER_LEFT;
        sp[pc-1]    = 1'b1;
        ref_pre     = 1'b1;
      end
      S_IT2: begin
        rwl_mode    = RWL_CIM;
        rwl_en      = 1'b1;
        iter        = ITER_MID;
        sp[pc]      = 1'b1;
        ref_pulse   = 1'b1;
        ref_wl      = (nn > NREF_WL) ? NREF_WL'((1 << (nn / 2)) - 1) : NREF_WL'((1 << nn) - 1);
      end
      S_IT3: begin
        rwl_mode    = RWL_CIM;
        rwl_en      = 1'b1;
        iter        = ITER_RIGHT;
        sp[pc+1]    = 1'b1;
        ref_pulse   = (nn > NREF_WL);
        ref_wl      = (nn > NREF_WL) ? NREF_WL'((1 << (nn / 2)) - 1) : '0;
      end
      S_CMP: begin
        cs[pc-1]     = 1'b1;
        cs[pc]       = 1'b1;
        sa_en[pc]    = 1'b1;
        sa_mode      = SA_CMP;
        latch_result = 1'b1;
      end
      S_UPD: begin
        precharge_b = 1'b0;
        rwl_mode    = RWL_ROW;
        rwl_en      = 1'b1;
        rd_row      = RAW'(2 * ROWS) + RAW'(r[0]);
        sa_en       = '1;
        sa_en[pc]   = 1'b0;
        update      = 1'b1;
        wwl_en      = 1'b1;
        wr_row      = RAW'(2 * ROWS) + RAW'(r[0]);
        j_clear     = 1'b1;
        hsig_done   = 1'b1;
      end
      S_COPY: begin
        precharge_b = 1'b0;
        rwl_mode    = RWL_ROW;
        rwl_en      = 1'b1;
        rd_row      = RAW'(2 * ROWS) + RAW'(copy_row[0]);
        sa_en       = '1;
        update      = 1'b1;
        wwl_en      = 1'b1;
        wr_row      = RAW'(copy_row);
        wr_comp     = 1'b1;
      end
      S_ANREQ: an_req = 1'b1;
      S_ANRW: begin
        precharge_b = 1'b0;
        rwl_mode    = RWL_ROW;
        rwl_en      = 1'b1;
        rd_row      = RAW'(a);
        sa_en       = '1;
        update      = 1'b1;
        an_apply    = 1'b1;
        wwl_en      = 1'b1;
        wr_row      = RAW'(a);
        wr_comp     = 1'b1;
      end
      S_DONE: done = 1'b1;
      default: ;
    endcase
  end

endmodule
