// Single Queue: a first-in first-out buffer of DEPTH words of WIDTH bits.
//
// Push writes data_in at the tail when the queue is not full; Pull removes the
// head word, which appears registered on data_out (with data_out_valid) one
// cycle later. A word pushed into an empty queue can be pulled in the next
// cycle, so the latency through the queue is one cycle and, with Pull held
// high, one word leaves per cycle. Full and Empty are the status lines, and
// peek shows the head word before it is pulled. Push
// on a full queue and Pull on an empty one are ignored (and flagged by
// assertions). The one-cycle latency and one-word-per-cycle rate follow the
// described component; the registered read and the ignore-on-overflow policy
// are this design's choices.
module single_queue #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] data_in,
  input  logic             pull,
  output logic [WIDTH-1:0] data_out,
  output logic             data_out_valid,
  output logic [WIDTH-1:0] peek,   // word at the head, not yet pulled
  output logic             full,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      head, tail;   // extra bit tells full from empty
  logic             do_push, do_pull;

  assign empty   = (head == tail);
  assign full    = (head[AW-1:0] == tail[AW-1:0]) && (head[AW] != tail[AW]);
  assign do_push = push && !full;
  assign do_pull = pull && !empty;
  assign peek    = mem[head[AW-1:0]];

  function automatic logic [AW:0] incr(input logic [AW:0] p);
    if (p[AW-1:0] == AW'(DEPTH - 1)) incr = {~p[AW], {AW{1'b0}}};
    else                             incr = p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head           <= '0;
      tail           <= '0;
      data_out_valid <= 1'b0;
      data_out       <= '0;
    end else begin
      data_out_valid <= do_pull;
      if (do_pull) begin
        data_out <= mem[head[AW-1:0]];
        head     <= incr(head);
      end
      if (do_push) tail <= incr(tail);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[tail[AW-1:0]] <= data_in;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pull |-> !empty);
endmodule
