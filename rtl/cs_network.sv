// Circuit switching network: N processing-element ports with circuit NICs,
// a central circuit controller (scheduler) and a crossbar fabric.
//
// Per port there are four cables of L_CABLE cycles: request (NIC to
// controller), grant (controller to NIC), data to the switch and data from
// the switch. A NIC asks for every destination it holds data for; the
// controller sets up a circuit, tells the NIC where it leads, and the NIC
// streams that sub-queue through the fabric until it is empty.
//
// The fabric is configured with the controller's decision delayed by the
// round trip 2*L_CABLE + 1 (grant cable, N-Queue read, data cable), so a word
// pulled because of a grant crosses the fabric under exactly the
// configuration that granted it; when a circuit is torn down and its output
// given to another input, the words of the two circuits cannot collide. This
// alignment is this design's choice; the components and their placement
// follow the described circuit-switched network.
module cs_network
  import mpnet_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned W       = 16,
  parameter int unsigned L_CABLE = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         pe_valid,
  input  logic [$clog2(N)-1:0] pe_dest [N],
  input  logic [WORD_W-1:0]    pe_data [N],
  output logic [N-1:0]         pe_ready,
  output flit_t                rx_flit [N],
  output logic                 ev_setup,
  output logic                 ev_teardown
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned RT = 2 * L_CABLE + 1;

  logic [N-1:0]       nic_req [N], ctl_req [N];
  logic [N-1:0]       ctl_gv, nic_gv, ctl_cv;
  logic [IW-1:0]      ctl_gd [N], nic_gd [N], ctl_cs [N];
  flit_t              nic_tx [N], nic_rx [N];
  logic [FLIT_W-1:0]  fab_in [N], fab_out [N];
  logic [N-1:0]       f_cv;
  logic [IW-1:0]      f_cs [N];

  for (genvar p = 0; p < N; p++) begin : g_port
    cs_nic #(.N(N), .W(W)) u_nic (
      .clk, .rst_n,
      .pe_valid(pe_valid[p]), .pe_dest(pe_dest[p]), .pe_data(pe_data[p]), .pe_ready(pe_ready[p]),
      .rx_flit(rx_flit[p]), .req(nic_req[p]),
      .grant_valid(nic_gv[p]), .grant_dest(nic_gd[p]),
      .tx_link(nic_tx[p]), .rx_link(nic_rx[p]));

    wire_delay #(.WIDTH(N), .LATENCY(L_CABLE)) u_req (
      .clk, .rst_n, .d(nic_req[p]), .q(ctl_req[p]));
    wire_delay #(.WIDTH(IW + 1), .LATENCY(L_CABLE)) u_grant (
      .clk, .rst_n, .d({ctl_gv[p], ctl_gd[p]}), .q({nic_gv[p], nic_gd[p]}));
    wire_delay #(.WIDTH(FLIT_W), .LATENCY(L_CABLE)) u_up (
      .clk, .rst_n, .d(nic_tx[p]), .q(fab_in[p]));
    wire_delay #(.WIDTH(FLIT_W), .LATENCY(L_CABLE)) u_down (
      .clk, .rst_n, .d(fab_out[p]), .q(nic_rx[p]));
    wire_delay #(.WIDTH(IW + 1), .LATENCY(RT)) u_cfg (
      .clk, .rst_n, .d({ctl_cv[p], ctl_cs[p]}), .q({f_cv[p], f_cs[p]}));
  end

  cs_controller #(.N(N)) u_ctl (
    .clk, .rst_n, .req(ctl_req), .grant_valid(ctl_gv), .grant_dest(ctl_gd),
    .cfg_valid(ctl_cv), .cfg_src(ctl_cs), .ev_setup, .ev_teardown);

  switch_fabric #(.N(N), .WIDTH(FLIT_W)) u_fabric (
    .clk, .rst_n, .cfg_valid(f_cv), .cfg_src(f_cs), .in_data(fab_in), .out_data(fab_out));

  // every word that reaches the fabric has a circuit
  for (genvar p = 0; p < N; p++) begin : g_chk
    logic routed;
    always_comb begin
      routed = 1'b0;
      for (int o = 0; o < N; o++) if (f_cv[o] && f_cs[o] == IW'(p)) routed = 1'b1;
    end
    a_routed: assert property (@(posedge clk) disable iff (!rst_n)
      fab_in[p][FLIT_W-1] |-> routed);   // valid bit of the flit
  end
endmodule
