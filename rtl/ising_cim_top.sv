// Top level: a BR x BC grid of Ising compute-in-memory banks joined by ghost cells.
//
// The whole King's graph has (BR*LR) x (BC*LC) spins. Bank (bi, bj) owns the
// LR x LC block starting at global row bi*LR, column bj*LC, and also stores one
// ghost row / column on every side that has a neighbouring bank: a copy of that
// bank's edge spins, which its own edge spins read as neighbours. All banks
// sweep in parallel; then ghost_sync refreshes the ghost copies (see
// ghost_sync.sv). With BR = BC = 1 (the default) this is a single macro of
// 64 x 100 spins and the exchange is skipped.
//
// Every bank keeps its own host port (J, annealing bits, scan chain, row access),
// bank b = bi*BC + bj. A bank with ghosts stores ROWS_b = LR + GT + GB rows and
// COLS_b = LC + GL + GR columns (GT = bank above exists, GB = below, GL = left,
// GR = right):
//   j_row / j_col / an_row   global spin coordinates of the target / row
//   mem_addr                 stored row in the bank, 0 .. ROWS_b-1; stored row s
//                            is global row bi*LR - GT + s
//   scan chain               COLS_b bits; bit t is global column bj*LC - GL + t
// The host writes the initial state of every stored cell, ghosts included, so
// the copies start equal; after that the design keeps them equal. The host must
// not use mem_req while busy is high.
//
// Interface/timing: start is a one-cycle pulse that starts one sweep (and an
// annealing pass if anneal_en) in every bank; done pulses once every bank has
// finished and the ghosts are up to date; busy is high in between. rst_n is
// active low and synchronous.
//
// Beside the banks stands the 2-bit J Hamiltonian unit (multibit_j_unit) with
// its own mbj_* ports: it computes one target spin from eight neighbours with
// 2-bit J coefficients, using the nine-cell spin layout of that mode. It is
// not connected to the banks, which use 1-bit J.
module ising_cim_top
  import ising_cim_pkg::*;
#(
  parameter int unsigned BR               = 1,
  parameter int unsigned BC               = 1,
  parameter int unsigned LR               = 64,
  parameter int unsigned LC               = 100,
  parameter int unsigned REFRESH_INTERVAL = 1024,
  parameter int unsigned NB               = BR * BC,
  parameter int unsigned GRW              = (BR * LR <= 2) ? 1 : $clog2(BR * LR),
  parameter int unsigned GCW              = (BC * LC <= 2) ? 1 : $clog2(BC * LC),
  parameter int unsigned MAW              = $clog2(LR + 2)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   anneal_en,
  output logic                   busy,
  output logic                   done,
  output logic [NB-1:0]          j_req,
  output logic [GRW-1:0]         j_row [NB],
  output logic [GCW-1:0]         j_col [NB],
  input  logic [NB-1:0]          load_j,
  input  logic [J_PER_LOAD-1:0]  j_in [NB],
  output logic [NB-1:0]          an_req,
  output logic [GRW-1:0]         an_row [NB],
  input  logic [NB-1:0]          an_valid,
  input  logic [NB-1:0]          mem_req,
  input  logic [NB-1:0]          mem_we,
  input  logic [MAW-1:0]         mem_addr [NB],
  output logic [NB-1:0]          mem_ack,
  input  logic [NB-1:0]          scan_en,
  input  logic [NB-1:0]          scan_in,
  input  logic [NB-1:0]          scan_capture,
  output logic [NB-1:0]          scan_out,
  // observation, one bit per bank
  output logic [NB-1:0]          precharge_b,
  output logic [NB-1:0]          rwl_en,
  output logic [NB-1:0]          cs_any,
  output logic [NB-1:0]          sa_fire,
  output logic [NB-1:0]          hsig_start,
  output logic [NB-1:0]          latch_result,
  output logic [NB-1:0]          hsig_done,
  output logic [NB-1:0]          update,
  output logic [NB-1:0]          refresh_busy,
  output logic [NB-1:0]          bank_busy,
  output logic                   ghost_busy,
  // 2-bit J unit
  input  logic                   mbj_seg_we,
  input  logic [2:0]             mbj_seg_idx,
  input  logic                   mbj_seg_spin,
  input  logic                   mbj_start,
  input  logic [2*NNEIGH-1:0]    mbj_j,
  output logic                   mbj_busy,
  output logic                   mbj_done,
  output logic                   mbj_spin,
  output logic [15:0]            mbj_bl_mv
);

  localparam int unsigned WC  = LC + 2;
  localparam int unsigned WRW = $clog2(LR + 2);

  logic                bank_start;
  logic [NB-1:0]       bank_done, pr_re, pr_we;
  logic [WRW-1:0]      pr_row;
  logic [WC-1:0]       pr_wdata [NB];
  logic [WC-1:0]       pr_rdata [NB];
  logic                sync_busy;

  ghost_sync #(.BR(BR), .BC(BC), .LR(LR), .LC(LC)) u_sync (
    .clk, .rst_n, .start, .bank_start, .bank_done, .busy(sync_busy), .done,
    .pr_re, .pr_we, .pr_row, .pr_wdata, .pr_rdata
  );

  multibit_j_unit u_mbj (
    .clk, .rst_n, .seg_we(mbj_seg_we), .seg_idx(mbj_seg_idx), .seg_spin(mbj_seg_spin),
    .start(mbj_start), .j(mbj_j), .busy(mbj_busy), .done(mbj_done), .spin_out(mbj_spin),
    .bl_mv(mbj_bl_mv)
  );

  assign busy       = sync_busy;
  assign ghost_busy = |(pr_re | pr_we);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    localparam int unsigned BI = b / BC;
    localparam int unsigned BJ = b % BC;
    localparam bit          GT = (BI > 0);
    localparam bit          GB = (BI < BR - 1);
    localparam bit          GL = (BJ > 0);
    localparam bit          GR = (BJ < BC - 1);
    localparam int unsigned ROWS_B = LR + 32'(GT) + 32'(GB);
    localparam int unsigned COLS_B = LC + 32'(GL) + 32'(GR);
    localparam int unsigned RW_B   = (ROWS_B <= 2) ? 1 : $clog2(ROWS_B);
    localparam int unsigned CW_B   = (COLS_B <= 2) ? 1 : $clog2(COLS_B);

    logic [RW_B-1:0] jr, ar;
    logic [CW_B-1:0] jc;

    ising_cim_macro #(
      .ROWS(ROWS_B), .COLS(COLS_B), .REFRESH_INTERVAL(REFRESH_INTERVAL),
      .GT(GT), .GB(GB), .GL(GL), .GR(GR)
    ) u_macro (
      .clk, .rst_n, .start(bank_start), .anneal_en,
      .busy(bank_busy[b]), .done(bank_done[b]),
      .j_req(j_req[b]), .j_row(jr), .j_col(jc),
      .load_j(load_j[b]), .j_in(j_in[b]),
      .an_req(an_req[b]), .an_row(ar), .an_valid(an_valid[b]),
      .mem_req(mem_req[b]), .mem_we(mem_we[b]), .mem_addr(RW_B'(mem_addr[b])),
      .mem_ack(mem_ack[b]),
      .scan_en(scan_en[b]), .scan_in(scan_in[b]), .scan_capture(scan_capture[b]),
      .scan_out(scan_out[b]),
      .precharge_b(precharge_b[b]), .rwl_en(rwl_en[b]), .cs_any(cs_any[b]),
      .sa_fire(sa_fire[b]), .hsig_start(hsig_start[b]),
      .latch_result(latch_result[b]), .hsig_done(hsig_done[b]),
      .update(update[b]), .refresh_busy(refresh_busy[b]),
      .pr_re(pr_re[b]), .pr_we(pr_we[b]), .pr_row(pr_row),
      .pr_wdata(pr_wdata[b]), .pr_rdata(pr_rdata[b])
    );

    // stored coordinates to global ones
    assign j_row[b]  = GRW'(BI * LR + 32'(jr) - 32'(GT));
    assign an_row[b] = GRW'(BI * LR + 32'(ar) - 32'(GT));
    assign j_col[b]  = GCW'(BJ * LC + 32'(jc) - 32'(GL));
  end

endmodule
