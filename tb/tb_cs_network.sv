// End-to-end testbench for cs_network (N = 8, 16-word buffers, 2-cycle
// cables). Modelled processing elements write words with a destination;
// each word carries its message number, sequence number, source and
// destination, and every delivered word is matched in order against the words
// sent from that source to that destination.
// Phases: (1) one message through the idle network, checking the setup
// latency: request cable, a scheduling round of two or three cycles, grant
// cable, then the data path, 8 + 4*L_CABLE or 9 + 4*L_CABLE cycles from PE
// write to PE read, and one word per cycle once the circuit stands;
// (2) random traffic to all destinations; (3) gather to one destination
// (contention for one output). Circuit set-up and tear-down must both occur.
module tb_cs_network;
  import mpnet_pkg::*;
  localparam int N = 8, W = 16, L = 2;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pe_valid, pe_ready;
  logic [IW-1:0] pe_dest [N];
  logic [WORD_W-1:0] pe_data [N];
  flit_t rx_flit [N];
  logic ev_setup, ev_teardown;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct packed { logic [IW-1:0] dest; logic [WORD_W-1:0] data; } word_t;
  word_t txq [N][$];
  logic [WORD_W-1:0] expq [N][N][$];
  int delivered = 0, sent = 0, n_setup = 0, n_teardown = 0;
  longint t_first_write = -1, t_first_read = -1, t_last_read = -1;

  cs_network #(.N(N), .W(W), .L_CABLE(L)) dut (
    .clk, .rst_n, .pe_valid, .pe_dest, .pe_data, .pe_ready, .rx_flit, .ev_setup, .ev_teardown);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired, delivered %0d of %0d", delivered, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_msg(input int s, input int d, input int msg, input int words);
    word_t w;
    for (int k = 0; k < words; k++) begin
      w.dest = IW'(d);
      w.data = {16'(msg), 16'(k), 16'(s), 16'(d)};
      txq[s].push_back(w);
    end
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      pe_valid[p] = rst_n && txq[p].size() > 0;
      pe_dest[p]  = pe_valid[p] ? txq[p][0].dest : '0;
      pe_data[p]  = pe_valid[p] ? txq[p][0].data : '0;
    end
    #1;
    for (int p = 0; p < N; p++) begin
      if (pe_valid[p] && pe_ready[p]) begin
        word_t w;
        w = txq[p].pop_front();
        expq[p][w.dest].push_back(w.data);
        sent++;
        if (t_first_write < 0) t_first_write = cyc;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_setup) n_setup++;
      if (ev_teardown) n_teardown++;
      for (int d = 0; d < N; d++) begin
        if (rx_flit[d].valid) begin
          int s;
          s = int'(rx_flit[d].data[31:16]);
          check(rx_flit[d].data[IW-1:0] == IW'(d), "arrived at its destination");
          check(s < N && expq[s][d].size() > 0, "word was sent");
          if (s < N && expq[s][d].size() > 0)
            check(expq[s][d].pop_front() == rx_flit[d].data, "word in order and intact");
          delivered++;
          if (t_first_read < 0) t_first_read = cyc;
          t_last_read = cyc;
        end
      end
    end
  end

  function automatic int pending_words();
    int n = 0;
    for (int p = 0; p < N; p++) n += txq[p].size();
    return n;
  endfunction

  task automatic wait_drain();
    while (delivered < sent || pending_words() > 0) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin pe_valid[p] = 0; pe_dest[p] = '0; pe_data[p] = '0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // (1) one message, idle network
    add_msg(2, 5, 0, 10);
    wait_drain();
    check(t_first_read - t_first_write >= 8 + 4 * L && t_first_read - t_first_write <= 9 + 4 * L,
          "setup latency");
    check(t_last_read - t_first_read == 9, "one word per cycle on the circuit");
    $display("idle latency %0d cycles", t_first_read - t_first_write);
    // (2) random to all, messages of 1 to 24 words
    for (int m = 1; m <= 10; m++)
      for (int s = 0; s < N; s++) add_msg(s, $urandom_range(0, N - 1), m, $urandom_range(1, 24));
    wait_drain();
    // (3) gather to one
    for (int s = 0; s < N; s++) add_msg(s, 4, 30, 20);
    wait_drain();
    check(delivered == sent, "every word delivered");
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) check(expq[s][d].size() == 0, "nothing left over");
    check(n_setup > 0, "circuits were set up");
    check(n_teardown > 0, "circuits were torn down");
    $display("words %0d, setup rounds %0d, teardown cycles %0d", delivered, n_setup, n_teardown);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
