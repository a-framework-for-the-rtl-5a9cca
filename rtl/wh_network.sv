// Wormhole switching network: N processing-element ports, each with a
// wormhole NIC, joined by cables to one input-buffered wormhole switch.
//
// Per port there are three cables, all Parallel Wire Delays of L_CABLE
// cycles: NIC to switch (data), switch to NIC (credits for the switch's
// input sub-queues) and switch to NIC (data). The processing element writes
// worms (header with the destination in its low bits, payload, tail) through
// pe_valid/pe_kind/pe_data while pe_ready is high, and receives one word per
// cycle on rx_flit. Cable latency, queue sizes and the switch structure are
// parameters; the defaults are a 32-port network with 16-word buffers and
// ten-foot (one-cycle) cables. The credit cable is this design's addition.
module wh_network
  import mpnet_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = 16,
  parameter int unsigned L_CABLE   = 1,
  parameter int unsigned L_SW_WIRE = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      pe_valid,
  input  flit_kind_e        pe_kind  [N],
  input  logic [WORD_W-1:0] pe_data  [N],
  output logic [N-1:0]      pe_ready,
  output flit_t             rx_flit  [N],
  output logic [N-1:0]      nic_stalled,
  output logic              ev_grant_dropped
);
  localparam int unsigned IW = $clog2(N);

  flit_t          nic_tx [N], sw_in [N], sw_out [N], nic_rx [N];
  logic [N-1:0]   sw_cr_v, nic_cr_v;
  logic [IW-1:0]  sw_cr_d [N], nic_cr_d [N];

  for (genvar p = 0; p < N; p++) begin : g_port
    wh_nic #(.N(N), .W(W), .Q(W)) u_nic (
      .clk, .rst_n,
      .pe_valid(pe_valid[p]), .pe_kind(pe_kind[p]), .pe_data(pe_data[p]), .pe_ready(pe_ready[p]),
      .rx_flit(rx_flit[p]), .tx_link(nic_tx[p]),
      .credit_valid(nic_cr_v[p]), .credit_dest(nic_cr_d[p]),
      .rx_link(nic_rx[p]), .stalled(nic_stalled[p]));

    wire_delay #(.WIDTH(FLIT_W), .LATENCY(L_CABLE)) u_up (
      .clk, .rst_n, .d(nic_tx[p]), .q(sw_in[p]));
    wire_delay #(.WIDTH(FLIT_W), .LATENCY(L_CABLE)) u_down (
      .clk, .rst_n, .d(sw_out[p]), .q(nic_rx[p]));
    wire_delay #(.WIDTH(IW + 1), .LATENCY(L_CABLE)) u_credit (
      .clk, .rst_n, .d({sw_cr_v[p], sw_cr_d[p]}), .q({nic_cr_v[p], nic_cr_d[p]}));
  end

  wh_switch #(.N(N), .W(W), .L_SW_WIRE(L_SW_WIRE)) u_switch (
    .clk, .rst_n, .in_link(sw_in), .credit_valid(sw_cr_v), .credit_dest(sw_cr_d),
    .out_link(sw_out), .ev_grant_dropped);
endmodule
