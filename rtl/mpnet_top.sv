// Multiprocessor network top level.
//
// Three networks for N processing elements, built from the same components
// (queues, cables, round-robin Scheduler, crossbar fabric), stand side by
// side, each with its own processing-element ports so the same traffic can be
// driven into all of them and their delivery compared:
//   wh_*  wormhole switching: NICs with Single Queues, an input-buffered
//         switch with one N-Queue per input and one Scheduler;
//   cs_*  circuit switching: NICs with N-Queues, a central controller that
//         sets up and tears down circuits on request;
//   ps_*  predictive circuit switching: as cs_, with a table of pre-loaded
//         switch settings rotated round robin.
// A serial cable link (parallel-to-serial, serial cable, serial-to-parallel)
// is brought out on the sl_* ports as the bit-level model of one cable.
// The processing elements themselves (traffic sources and sinks) are outside.
// Defaults: 32 ports, 16-word (128-byte) buffers, one-cycle (10 ns) cables,
// 32 predictive settings.
module mpnet_top
  import mpnet_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned W       = 16,
  parameter int unsigned L_CABLE = 1,
  parameter int unsigned K       = 32,
  parameter int unsigned SLOT_W  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // wormhole network
  input  logic [N-1:0]           wh_pe_valid,
  input  flit_kind_e             wh_pe_kind [N],
  input  logic [WORD_W-1:0]      wh_pe_data [N],
  output logic [N-1:0]           wh_pe_ready,
  output flit_t                  wh_rx_flit [N],
  output logic [N-1:0]           wh_nic_stalled,
  output logic                   wh_ev_grant_dropped,
  // circuit-switched network
  input  logic [N-1:0]           cs_pe_valid,
  input  logic [$clog2(N)-1:0]   cs_pe_dest [N],
  input  logic [WORD_W-1:0]      cs_pe_data [N],
  output logic [N-1:0]           cs_pe_ready,
  output flit_t                  cs_rx_flit [N],
  output logic                   cs_ev_setup,
  output logic                   cs_ev_teardown,
  // predictive circuit-switched network
  input  logic [N-1:0]           ps_pe_valid,
  input  logic [$clog2(N)-1:0]   ps_pe_dest [N],
  input  logic [WORD_W-1:0]      ps_pe_data [N],
  output logic [N-1:0]           ps_pe_ready,
  output flit_t                  ps_rx_flit [N],
  input  logic                   ps_dyn_mode,
  input  logic [$clog2(K+1)-1:0] ps_num_cfg,
  input  logic [SLOT_W-1:0]      ps_slot_len,
  input  logic                   ps_tbl_we,
  input  logic [$clog2(K)-1:0]   ps_tbl_row,
  input  logic [$clog2(N)-1:0]   ps_tbl_col,
  input  logic                   ps_tbl_valid,
  input  logic [$clog2(N)-1:0]   ps_tbl_dest,
  output logic [$clog2(K)-1:0]   ps_cur_entry,
  output logic                   ps_ev_slot,
  // serial cable link
  input  logic                   sl_in_valid,
  input  logic [WORD_W-1:0]      sl_in_data,
  output logic                   sl_in_ready,
  output logic                   sl_out_valid,
  output logic [WORD_W-1:0]      sl_out_data
);
  wh_network #(.N(N), .W(W), .L_CABLE(L_CABLE)) u_wh (
    .clk, .rst_n,
    .pe_valid(wh_pe_valid), .pe_kind(wh_pe_kind), .pe_data(wh_pe_data), .pe_ready(wh_pe_ready),
    .rx_flit(wh_rx_flit), .nic_stalled(wh_nic_stalled), .ev_grant_dropped(wh_ev_grant_dropped));

  cs_network #(.N(N), .W(W), .L_CABLE(L_CABLE)) u_cs (
    .clk, .rst_n,
    .pe_valid(cs_pe_valid), .pe_dest(cs_pe_dest), .pe_data(cs_pe_data), .pe_ready(cs_pe_ready),
    .rx_flit(cs_rx_flit), .ev_setup(cs_ev_setup), .ev_teardown(cs_ev_teardown));

  ps_network #(.N(N), .W(W), .L_CABLE(L_CABLE), .K(K), .SLOT_W(SLOT_W)) u_ps (
    .clk, .rst_n,
    .pe_valid(ps_pe_valid), .pe_dest(ps_pe_dest), .pe_data(ps_pe_data), .pe_ready(ps_pe_ready),
    .rx_flit(ps_rx_flit), .dyn_mode(ps_dyn_mode), .num_cfg(ps_num_cfg), .slot_len(ps_slot_len),
    .tbl_we(ps_tbl_we), .tbl_row(ps_tbl_row), .tbl_col(ps_tbl_col), .tbl_valid(ps_tbl_valid),
    .tbl_dest(ps_tbl_dest), .cur_entry(ps_cur_entry), .ev_slot(ps_ev_slot));

  serial_link #(.WIDTH(WORD_W), .CABLE_LAT(L_CABLE)) u_serial (
    .clk, .rst_n, .in_valid(sl_in_valid), .in_data(sl_in_data), .in_ready(sl_in_ready),
    .out_valid(sl_out_valid), .out_data(sl_out_data));
endmodule
