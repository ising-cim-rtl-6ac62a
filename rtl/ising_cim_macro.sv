// Ising compute-in-memory macro: an eDRAM array that also solves Ising problems.
// It is one bank of the design; ising_cim_top tiles several of them.
//
// The macro stores a ROWS x COLS grid of spins, each with its complement, in a
// gain-cell eDRAM array. In Ising mode it updates every spin from its eight
// King's-graph neighbours without any adder: the neighbours' J coefficients are
// driven onto read wordlines, the read ports that conduct (J == spin) discharge
// the bitlines, three sampling capacitors collect the left, middle and right
// neighbour columns, share their charge, and the column's sense amplifier
// compares the result with V_REF. The latched sense-amplifier output is the new
// spin, written back with a read-modify-write of a ping-pong row. After a sweep an
// annealing pass inverts randomly chosen spins as instructed by the host.
//
// Blocks: cim_controller (sequencing), j_loader (Load_J), wl_controller
// (reconfigured row decoder), edram_cim_array (cells), cs_sa_bank (sampling
// capacitors, charge sharing, sense amplifiers), vref_gen (reference column),
// write_io (write driver with UPDATE / AN paths, read register), scan_chain (serial
// data), refresh_ctrl (eDRAM refresh).
//
// Host interface (all synchronous to clk, rst_n active low and synchronous):
//   start / anneal_en / busy / done   one sweep, optionally with an annealing pass
//   j_req, j_row, j_col               J coefficients wanted for target (j_row, j_col)
//   load_j, j_in                      Load_J: two coefficients per pulse, 4 pulses
//   an_req, an_row, an_valid          annealing bits of row an_row are in the scan
//                                     chain; an_valid (one cycle) lets the pass go on
//   mem_req, mem_we, mem_addr, mem_ack  normal row read / write (one cycle, from idle)
//   scan_en, scan_in, scan_out, scan_capture  scan chain: write data and AN bits are
//                                     shifted in; scan_capture loads the last read row
// Scan bit k is stored spin column k (ghost columns included).
//   pr_re, pr_we, pr_row, pr_wdata, pr_rdata  parallel row port used by the
//                                     ghost-cell exchange (pr_rdata is valid the
//                                     cycle after pr_re)
// Ghost parameters GT/GB/GL/GR add one stored ghost row / column on that side:
// a copy of the neighbouring bank's edge spins, read as neighbours, never updated
// here. Observation outputs mirror the document's test
// signals: precharge_b, rwl_en, cs_any, sa_fire, hsig_start, latch_result,
// hsig_done, update.
//
// Timing: one spin takes four Load_J pulses plus five cycles (three read
// iterations, compare, update); a row adds one copy-back cycle; annealing takes one
// cycle per row once its bits are in.
module ising_cim_macro
  import ising_cim_pkg::*;
#(
  parameter int unsigned ROWS             = 64,
  parameter int unsigned COLS             = 100,
  parameter int unsigned REFRESH_INTERVAL = 1024,
  parameter bit          GT               = 1'b0,
  parameter bit          GB               = 1'b0,
  parameter bit          GL               = 1'b0,
  parameter bit          GR               = 1'b0,
  parameter int unsigned RW               = (ROWS <= 2) ? 1 : $clog2(ROWS),
  parameter int unsigned CWB              = (COLS <= 2) ? 1 : $clog2(COLS),
  // owned window and its frame of one ghost row / column on every side
  parameter int unsigned WROWS            = ROWS - 32'(GT) - 32'(GB) + 2,
  parameter int unsigned WCOLS            = COLS - 32'(GL) - 32'(GR) + 2,
  parameter int unsigned WRW              = $clog2(WROWS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   anneal_en,
  output logic                   busy,
  output logic                   done,
  output logic                   j_req,
  output logic [RW-1:0]          j_row,
  output logic [CWB-1:0]         j_col,
  input  logic                   load_j,
  input  logic [J_PER_LOAD-1:0]  j_in,
  output logic                   an_req,
  output logic [RW-1:0]          an_row,
  input  logic                   an_valid,
  input  logic                   mem_req,
  input  logic                   mem_we,
  input  logic [RW-1:0]          mem_addr,
  output logic                   mem_ack,
  input  logic                   scan_en,
  input  logic                   scan_in,
  input  logic                   scan_capture,
  output logic                   scan_out,
  output logic                   precharge_b,
  output logic                   rwl_en,
  output logic                   cs_any,
  output logic                   sa_fire,
  output logic                   hsig_start,
  output logic                   latch_result,
  output logic                   hsig_done,
  output logic                   update,
  output logic                   refresh_busy,
  // parallel row port for ghost-cell exchange, in window coordinates: row 0 and
  // column 0 are the ghost row / column above and left of the owned window
  input  logic                   pr_re,
  input  logic                   pr_we,
  input  logic [WRW-1:0]         pr_row,
  input  logic [WCOLS-1:0]       pr_wdata,
  output logic [WCOLS-1:0]       pr_rdata
);

  localparam int unsigned PROWS = 2 * ROWS + 2;
  localparam int unsigned PCOLS = COLS + 2;
  localparam int unsigned RAW   = $clog2(PROWS);
  localparam int unsigned CW    = $clog2(PROWS + 1);

  logic                 j_clear, j_valid, mem_ack_i;
  logic [NNEIGH-1:0]    j, nmask;
  logic                 an_apply, rd_latch, host_wr;
  logic                 ref_req, ref_ack;
  logic [RW-1:0]        ref_row;
  rwl_mode_e            rwl_mode;
  iter_e                iter;
  logic [RAW-1:0]       trow, rd_row, wr_row;
  logic                 wwl_en, wr_comp;
  logic [PCOLS-1:0]     sp, sa_en, sa_out, wbl, wbl_b, rdata;
  logic [PCOLS-2:0]     cs;
  sa_mode_e             sa_mode;
  logic                 ref_pre, ref_pulse;
  logic [NREF_WL-1:0]   ref_wl;
  logic [15:0]          vref_mv;
  logic [15:0]          cap_mv [PCOLS];
  logic [PROWS-1:0]     rwl, wwl;
  logic [CW-1:0]        rbl_cnt [PCOLS];
  logic [COLS-1:0]      scan_q;
  logic [PCOLS-1:0]     scan_cols;

  logic                 pr_any, mreq, mwe;
  logic [RW-1:0]        maddr;
  logic [COLS-1:0]      pr_cols;
  logic [PCOLS-1:0]     wdata_cols;

  // Row port: window row w is stored row w - 1 + GT, window column w is stored
  // column w - 1 + GL. The row port shares the controller's access path with the
  // host and goes first; refresh waits while it is used.
  assign pr_any = pr_re | pr_we;
  assign mreq   = mem_req | pr_any;
  assign mwe    = pr_any ? pr_we : mem_we;
  assign maddr  = pr_any ? RW'(int'(pr_row) - 1 + int'(GT)) : mem_addr;
  always_comb begin
    for (int unsigned k = 0; k < COLS; k++) pr_cols[k] = pr_wdata[k + 1 - 32'(GL)];
    for (int unsigned w = 0; w < WCOLS; w++) begin
      if (int'(w) - 1 + int'(GL) >= 0 && int'(w) - 1 + int'(GL) < int'(COLS))
        pr_rdata[w] = rdata[int'(w) + int'(GL)];
      else
        pr_rdata[w] = 1'b0;
    end
  end

  assign scan_cols    = {1'b0, scan_q, 1'b0};
  assign wdata_cols   = pr_we ? {1'b0, pr_cols, 1'b0} : scan_cols;
  assign mem_ack      = mem_ack_i & ~pr_any;
  assign cs_any       = |cs;
  assign sa_fire      = |sa_en;
  assign refresh_busy = ref_ack;

  cim_controller #(.ROWS(ROWS), .COLS(COLS), .GT(GT), .GB(GB), .GL(GL), .GR(GR)) u_ctrl (
    .clk, .rst_n, .start, .anneal_en, .busy, .done,
    .j_req, .tgt_row(j_row), .tgt_col(j_col), .j_clear, .j_valid, .nmask,
    .an_req, .an_row, .an_valid, .an_apply,
    .mem_req(mreq), .mem_we(mwe), .mem_addr(maddr), .mem_ack(mem_ack_i), .rd_latch, .host_wr,
    .ref_req(ref_req & ~pr_any), .ref_row, .ref_ack,
    .precharge_b, .rwl_mode, .rwl_en, .iter, .trow, .rd_row, .wwl_en, .wr_row,
    .wr_comp, .sp, .cs, .sa_en, .sa_mode, .update,
    .ref_pre, .ref_pulse, .ref_wl,
    .hsig_start, .latch_result, .hsig_done
  );

  j_loader u_jld (
    .clk, .rst_n, .clear(j_clear), .load_j, .j_in, .j, .j_valid
  );

  wl_controller #(.ROWS(ROWS)) u_wl (
    .mode(rwl_mode), .rwl_en, .iter, .trow, .j, .nmask, .rd_row,
    .wwl_en, .wr_row, .wr_comp, .rwl, .wwl
  );

  edram_cim_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rwl, .wwl, .wbl, .wbl_b, .rbl_cnt
  );

  cs_sa_bank #(.PCOLS(PCOLS), .CW(CW)) u_sa (
    .clk, .rst_n, .rbl_cnt, .sp, .cs, .sa_en, .sa_mode, .vref_mv, .sa_out, .cap_mv
  );

  vref_gen u_vref (
    .clk, .rst_n, .ref_pre, .ref_pulse, .ref_wl, .vref_mv
  );

  write_io #(.PCOLS(PCOLS)) u_wio (
    .clk, .rst_n, .update(update & ~host_wr),
    .an(an_apply ? scan_cols : '0),
    .sa_out, .host_wdata(wdata_cols), .rd_latch, .wbl, .wbl_b, .rdata
  );

  scan_chain #(.LEN(COLS)) u_scan (
    .clk, .rst_n, .shift_en(scan_en), .scan_in, .capture(scan_capture),
    .cap_data(rdata[COLS:1]), .q(scan_q), .scan_out
  );

  refresh_ctrl #(.ROWS(ROWS), .INTERVAL(REFRESH_INTERVAL)) u_ref (
    .clk, .rst_n, .enable(1'b1), .ack(ref_ack), .req(ref_req), .row(ref_row)
  );

endmodule
