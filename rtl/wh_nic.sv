// Wormhole network interface controller (NIC).
//
// Two Single Queues: the outbound queue takes the worms the processing
// element writes (header, payload flits, tail) and sends them onto the cable
// to the switch, one word per cycle; the inbound queue takes the words coming
// from the switch and hands them to the processing element, which reads one
// per cycle whenever the queue is not empty.
//
// Backpressure: the switch buffers each input in an N-Queue with one W-word
// sub-queue per destination. The NIC keeps one credit counter per destination,
// starting at W, spends a credit for each word it sends to that destination,
// and gets it back when the switch returns that destination on the credit
// line (a word left the sub-queue). A word whose destination has no credit
// waits at the head of the outbound queue. The destination of a body or tail
// word is the one of the last header sent.
//
// Timing: a word at the head of the outbound queue with a credit is pulled in
// the cycle it is checked and is on tx_link in the next cycle. An inbound word
// is pushed on arrival and is on rx_flit one cycle after it can be pulled.
// The two queues follow the described NIC; the credit scheme is this design's
// choice for the backpressure logic the NIC is said to contain.
module wh_nic
  import mpnet_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16,   // words per switch sub-queue (credits)
  parameter int unsigned Q = 16    // depth of each NIC Single Queue
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the processing element
  input  logic                 pe_valid,
  input  flit_kind_e           pe_kind,
  input  logic [WORD_W-1:0]    pe_data,
  output logic                 pe_ready,
  // to the processing element
  output flit_t                rx_flit,
  // cable to the switch, and credits back from it
  output flit_t                tx_link,
  input  logic                 credit_valid,
  input  logic [$clog2(N)-1:0] credit_dest,
  // cable from the switch
  input  flit_t                rx_link,
  // status
  output logic                 stalled    // head word waits for a credit
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = $clog2(W + 1);
  localparam int unsigned QD = 2 + WORD_W;

  logic [QD-1:0] tx_peek, tx_out, rx_out;
  logic          tx_out_v, rx_out_v, tx_full, tx_empty, rx_full, rx_empty;
  logic          send;
  logic [IW-1:0] cur_dest, head_dest;
  logic [CW-1:0] credit [N];
  flit_kind_e    peek_kind;

  single_queue #(.WIDTH(QD), .DEPTH(Q)) u_txq (
    .clk, .rst_n,
    .push(pe_valid && !tx_full), .data_in({pe_kind, pe_data}),
    .pull(send), .data_out(tx_out), .data_out_valid(tx_out_v), .peek(tx_peek),
    .full(tx_full), .empty(tx_empty));

  assign pe_ready  = !tx_full;
  assign peek_kind = flit_kind_e'(tx_peek[QD-1 -: 2]);
  assign head_dest = (peek_kind == FL_HEAD) ? tx_peek[IW-1:0] : cur_dest;
  assign send      = !tx_empty && (credit[head_dest] != '0);
  assign stalled   = !tx_empty && !send;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_dest <= '0;
      for (int d = 0; d < N; d++) credit[d] <= CW'(W);
    end else begin
      if (send && peek_kind == FL_HEAD) cur_dest <= head_dest;
      for (int d = 0; d < N; d++) begin
        credit[d] <= credit[d]
                   - CW'(send && head_dest == IW'(d))
                   + CW'(credit_valid && credit_dest == IW'(d));
      end
    end
  end

  assign tx_link = '{valid: tx_out_v, kind: flit_kind_e'(tx_out[QD-1 -: 2]),
                     data: tx_out[WORD_W-1:0]};

  single_queue #(.WIDTH(QD), .DEPTH(Q)) u_rxq (
    .clk, .rst_n,
    .push(rx_link.valid), .data_in({rx_link.kind, rx_link.data}),
    .pull(!rx_empty), .data_out(rx_out), .data_out_valid(rx_out_v), .peek(),
    .full(rx_full), .empty(rx_empty));

  assign rx_flit = '{valid: rx_out_v, kind: flit_kind_e'(rx_out[QD-1 -: 2]),
                     data: rx_out[WORD_W-1:0]};

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    credit_valid |-> credit[credit_dest] < CW'(W) || (send && head_dest == credit_dest));
endmodule
