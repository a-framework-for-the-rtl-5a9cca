// NIC of the circuit-switched and predictive circuit-switched networks.
//
// The outbound buffer is an N-Queue with one W-word sub-queue per
// destination: the processing element writes a word together with its
// destination (pe_ready tells that this destination's sub-queue has room).
// The inverted Empty vector is the NIC's request to the central scheduler,
// sent on the request cable. The scheduler answers on the grant cable with
// the destination this NIC's circuit currently leads to; while a grant is
// present and its sub-queue is not empty, the NIC pulls one word per cycle
// from that sub-queue onto the data cable. No header is sent: the circuit
// carries raw words. Inbound words are buffered in a Single Queue and handed
// to the processing element one per cycle.
//
// Timing: a word pulled in cycle t is on tx_link in t+1. The structure
// follows the described NIC; the request/grant encoding is this design's.
module cs_nic
  import mpnet_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pe_valid,
  input  logic [$clog2(N)-1:0] pe_dest,
  input  logic [WORD_W-1:0]    pe_data,
  output logic                 pe_ready,
  output flit_t                rx_flit,
  output logic [N-1:0]         req,         // request cable: sub-queues holding data
  input  logic                 grant_valid, // grant cable
  input  logic [$clog2(N)-1:0] grant_dest,
  output flit_t                tx_link,
  input  flit_t                rx_link
);
  logic [N-1:0]        full, empty;
  logic [WORD_W-1:0]   tx_out;
  logic                tx_out_v;
  logic [WORD_W+1:0]   rx_out;
  logic                rx_out_v, rx_full, rx_empty;

  assign pe_ready = !full[pe_dest];
  assign req      = ~empty;

  n_queue #(.N(N), .W(W), .WIDTH(WORD_W)) u_nq (
    .clk, .rst_n,
    .push(pe_valid && !full[pe_dest]), .dest(pe_dest), .data_in(pe_data),
    .pull(grant_valid && !empty[grant_dest]), .src(grant_dest),
    .data_out(tx_out), .data_out_valid(tx_out_v), .full, .empty);

  assign tx_link = '{valid: tx_out_v, kind: FL_BODY, data: tx_out};

  single_queue #(.WIDTH(WORD_W + 2), .DEPTH(W)) u_rxq (
    .clk, .rst_n,
    .push(rx_link.valid), .data_in({rx_link.kind, rx_link.data}),
    .pull(!rx_empty), .data_out(rx_out), .data_out_valid(rx_out_v), .peek(),
    .full(rx_full), .empty(rx_empty));

  assign rx_flit = '{valid: rx_out_v, kind: flit_kind_e'(rx_out[WORD_W+1 -: 2]),
                     data: rx_out[WORD_W-1:0]};
endmodule
