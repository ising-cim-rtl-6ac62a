// Ghost-cell synchroniser for a grid split over BR x BC banks.
//
// A large King's graph is cut into sub-grids of LR x LC spins, one per memory
// bank. Each bank also stores "ghost cells": a copy of the neighbouring banks'
// edge rows and columns, so that its own edge spins see all eight neighbours. The
// ghosts are read but never updated by their bank; after every sweep they must be
// brought up to date from the banks that own them. This block starts all banks
// together, waits until each has finished its sweep (and annealing pass), then:
//
//   phase A, ghost columns (only if BC > 1): for every owned row k = 1..LR, all
//     banks read row k in parallel; next cycle every bank writes row k back with
//     its left ghost bit taken from the left bank's last owned column and its
//     right ghost bit from the right bank's first owned column (a read-modify-
//     write of the whole row; the other bits are simply rewritten).
//   phase B, ghost rows (only if BR > 1): all banks read their first and then
//     their last owned row; banks with a bank above write that bank's last row
//     into their top ghost row, banks with a bank below write that bank's first
//     row into their bottom ghost row. Rows are passed whole, ghost columns
//     included, so the diagonal (corner) ghosts are right too.
//
// Row and column numbers on the pr_* ports are window coordinates, the same for
// every bank: row 0 / column 0 is the ghost line above / left of the owned
// window, 1..LR and 1..LC are owned, LR+1 / LC+1 the ghost line below / right.
// Bank b = bi * BC + bj.
//
// Interface/timing: start is a one-cycle pulse; bank_start is a one-cycle pulse
// to every bank; bank_done are the banks' one-cycle done pulses; pr_rdata is
// valid the cycle after pr_re; done pulses once the exchange is complete. One
// exchange takes 2*LR cycles for phase A and 4 for phase B. rst_n is active low
// and synchronous.
//
// That edge rows are passed whole after all spin updates, and edge columns by a
// read-modify-write of each row, follows the document. The document latches each
// updated edge-column spin right after its update; here the columns are exchanged
// after the sweep, like the rows, so every bank computes a sweep from the same
// old state. The two-phase order is this design's choice.
module ghost_sync #(
  parameter int unsigned BR  = 2,
  parameter int unsigned BC  = 2,
  parameter int unsigned LR  = 64,
  parameter int unsigned LC  = 100,
  parameter int unsigned NB  = BR * BC,
  parameter int unsigned WC  = LC + 2,
  parameter int unsigned WRW = $clog2(LR + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             bank_start,
  input  logic [NB-1:0]    bank_done,
  output logic             busy,
  output logic             done,
  output logic [NB-1:0]    pr_re,
  output logic [NB-1:0]    pr_we,
  output logic [WRW-1:0]   pr_row,
  output logic [WC-1:0]    pr_wdata [NB],
  input  logic [WC-1:0]    pr_rdata [NB]
);

  typedef enum logic [3:0] {
    G_IDLE, G_RUN, G_ARD, G_AWR, G_BRT, G_BRB, G_BWT, G_BWB, G_DONE
  } gstate_e;

  gstate_e          state;
  logic [NB-1:0]    fin;
  logic [WRW-1:0]   k;
  logic [WC-1:0]    top_row [NB];

  assign busy = (state != G_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= G_IDLE;
      fin   <= '0;
      k     <= '0;
      for (int unsigned b = 0; b < NB; b++) top_row[b] <= '0;
    end else begin
      unique case (state)
        G_IDLE: if (start) begin
          fin   <= '0;
          state <= G_RUN;
        end
        G_RUN: begin
          fin <= fin | bank_done;
          if (&(fin | bank_done)) begin
            k <= WRW'(1);
            if (NB == 1)     state <= G_DONE;
            else if (BC > 1) state <= G_ARD;
            else             state <= G_BRT;
          end
        end
        G_ARD: state <= G_AWR;
        G_AWR: begin
          if (int'(k) == int'(LR)) state <= (BR > 1) ? G_BRT : G_DONE;
          else begin
            k     <= k + 1'b1;
            state <= G_ARD;
          end
        end
        G_BRT: state <= G_BRB;
        G_BRB: begin
          for (int unsigned b = 0; b < NB; b++) top_row[b] <= pr_rdata[b];
          state <= G_BWT;
        end
        G_BWT:   state <= G_BWB;
        G_BWB:   state <= G_DONE;
        G_DONE:  state <= G_IDLE;
        default: state <= G_IDLE;
      endcase
    end
  end

  always_comb begin
    bank_start = 1'b0;
    done       = 1'b0;
    pr_re      = '0;
    pr_we      = '0;
    pr_row     = '0;
    for (int unsigned b = 0; b < NB; b++) pr_wdata[b] = '0;
    unique case (state)
      G_IDLE: bank_start = start;
      G_ARD: begin
        pr_re  = '1;
        pr_row = k;
      end
      G_AWR: begin
        pr_we  = '1;
        pr_row = k;
        for (int unsigned b = 0; b < NB; b++) begin
          pr_wdata[b] = pr_rdata[b];
          if (b % BC != 0)      pr_wdata[b][0]      = pr_rdata[b - 1][LC];
          if (b % BC != BC - 1) pr_wdata[b][LC + 1] = pr_rdata[b + 1][1];
        end
      end
      G_BRT: begin
        pr_re  = '1;
        pr_row = WRW'(1);
      end
      G_BRB: begin
        pr_re  = '1;
        pr_row = WRW'(LR);
      end
      G_BWT: begin
        pr_row = '0;
        for (int unsigned b = BC; b < NB; b++) begin
          pr_we[b]    = 1'b1;
          pr_wdata[b] = pr_rdata[b - BC];
        end
      end
      G_BWB: begin
        pr_row = WRW'(LR + 1);
        for (int unsigned b = 0; b + BC < NB; b++) begin
          pr_we[b]    = 1'b1;
          pr_wdata[b] = top_row[b + BC];
        end
      end
      G_DONE: done = 1'b1;
      default: ;
    endcase
  end

endmodule
