// Non-blocking N-Queue: N independent FIFOs ("sub-queues") of W words each,
// sharing one write port and one read port.
//
// At most one word is written and one word is read per cycle, so all
// sub-queues live in a single dual-ported data RAM of N*W words: sub-queue q
// occupies addresses q*W .. q*W+W-1. Two small register files hold a Head
// (read) pointer and a Tail (write) pointer for every sub-queue. A Push writes
// data_in at the Tail of sub-queue `dest` and writes back the incremented Tail;
// a Pull reads the word at the Head of sub-queue `src` and writes back the
// incremented Head. The Full and Empty vectors (one bit per sub-queue) are
// derived from the two pointers of each sub-queue. The same sub-queue may be
// pushed and pulled in the same cycle.
//
// Timing: the pulled word appears registered on data_out, with data_out_valid,
// one cycle after the Pull; a word pushed into an empty sub-queue can be
// pulled in the next cycle (one cycle latency). Push to a full sub-queue and
// Pull from an empty one are ignored and flagged by assertions.
//
// The shared RAM, the per-queue head/tail register files and the one-word
// per cycle rate follow the described design. The pointers carry one extra
// wrap bit so that equal pointers mean empty and pointers that differ only in
// the wrap bit mean full; this is this design's reading of the full/empty rule.
module n_queue #(
  parameter int unsigned N     = 32,  // number of sub-queues
  parameter int unsigned W     = 16,  // words per sub-queue
  parameter int unsigned WIDTH = 64   // word width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write port
  input  logic                 push,
  input  logic [$clog2(N)-1:0] dest,
  input  logic [WIDTH-1:0]     data_in,
  // read port
  input  logic                 pull,
  input  logic [$clog2(N)-1:0] src,
  output logic [WIDTH-1:0]     data_out,
  output logic                 data_out_valid,
  // status, one bit per sub-queue
  output logic [N-1:0]         full,
  output logic [N-1:0]         empty
);
  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1;

  logic [WIDTH-1:0] ram [N*W];
  logic [PW:0]      head [N];
  logic [PW:0]      tail [N];
  logic             do_push, do_pull;

  function automatic logic [PW:0] incr(input logic [PW:0] p);
    if (p[PW-1:0] == PW'(W - 1)) incr = {~p[PW], {PW{1'b0}}};
    else                         incr = p + 1'b1;
  endfunction

  always_comb begin
    for (int q = 0; q < N; q++) begin
      empty[q] = (head[q] == tail[q]);
      full[q]  = (head[q][PW-1:0] == tail[q][PW-1:0]) && (head[q][PW] != tail[q][PW]);
    end
  end

  assign do_push = push && !full[dest];
  assign do_pull = pull && !empty[src];

  // pointer register files
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < N; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
      end
      data_out_valid <= 1'b0;
      data_out       <= '0;
    end else begin
      data_out_valid <= do_pull;
      if (do_pull) begin
        data_out  <= ram[src * W + 32'(head[src][PW-1:0])];
        head[src] <= incr(head[src]);
      end
      if (do_push) tail[dest] <= incr(tail[dest]);
    end
  end

  // data RAM, written without reset
  always_ff @(posedge clk) begin
    if (do_push) ram[dest * W + 32'(tail[dest][PW-1:0])] <= data_in;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full[dest]);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pull |-> !empty[src]);
endmodule
