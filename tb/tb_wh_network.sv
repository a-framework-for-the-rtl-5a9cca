// End-to-end testbench for wh_network (N = 8, 16-word buffers, 2-cycle
// cables). The processing elements are modelled here: each one has a list
// of worms to send (header word carrying message number, source and
// destination, ten payload words carrying source, destination and sequence
// number, one tail word) and writes them while pe_ready is high; every
// delivered word is matched against the words sent from its source to that
// destination, in order, and worms must arrive whole (no interleaving at an
// output).
// Phases: (1) one worm through the idle network, checking the latency of
// 9 + 2*L_CABLE cycles from PE write to PE read and one word per cycle
// after that; (2) random traffic to all destinations; (3) gather to one
// destination, which forces output contention, credit stalls at the NICs and
// dropped stale grants in the switch.
module tb_wh_network;
  import mpnet_pkg::*;
  localparam int N = 8, W = 16, L = 2;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pe_valid, pe_ready, nic_stalled;
  flit_kind_e pe_kind [N];
  logic [WORD_W-1:0] pe_data [N];
  flit_t rx_flit [N];
  logic ev_grant_dropped;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct packed { flit_kind_e kind; logic [WORD_W-1:0] data; } word_t;
  word_t txq [N][$];              // words each PE still has to write
  word_t expq [N][N][$];          // words sent, per source and destination
  int    cur_src [N];             // worm being received at each destination
  bit    in_worm [N];
  int    delivered = 0, sent = 0;
  int    n_stall_cycles = 0, n_dropped = 0, n_contention = 0;
  longint t_first_write = -1, t_first_read = -1, t_last_read = -1;

  wh_network #(.N(N), .W(W), .L_CABLE(L)) dut (
    .clk, .rst_n, .pe_valid, .pe_kind, .pe_data, .pe_ready, .rx_flit,
    .nic_stalled, .ev_grant_dropped);

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

  task automatic add_worm(input int s, input int d, input int msg);
    word_t w;
    w.kind = FL_HEAD; w.data = {32'(msg), 16'(s), 16'(d)};
    txq[s].push_back(w);
    for (int k = 0; k < WORM_PAYLOAD; k++) begin
      w.kind = FL_BODY; w.data = {16'(msg), 16'(k), 16'(s), 16'(d)};
      txq[s].push_back(w);
    end
    w.kind = FL_TAIL; w.data = {16'(msg), 16'hFFFF, 16'(s), 16'(d)};
    txq[s].push_back(w);
  endtask

  // processing elements: write side
  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      pe_valid[p] = rst_n && txq[p].size() > 0;
      pe_kind[p]  = pe_valid[p] ? txq[p][0].kind : FL_BODY;
      pe_data[p]  = pe_valid[p] ? txq[p][0].data : '0;
    end
    #1;
    for (int p = 0; p < N; p++) begin
      if (pe_valid[p] && pe_ready[p]) begin
        word_t w;
        w = txq[p].pop_front();
        expq[p][w.data[IW-1:0]].push_back(w);
        sent++;
        if (t_first_write < 0) t_first_write = cyc;
      end
    end
  end

  // processing elements: read side, and event counters
  always @(posedge clk) begin
    if (rst_n) begin
      if (|nic_stalled) n_stall_cycles++;
      if (ev_grant_dropped) n_dropped++;
      for (int d = 0; d < N; d++) begin
        if (rx_flit[d].valid) begin
          int s;
          if (rx_flit[d].kind == FL_HEAD) begin
            check(!in_worm[d], "header only between worms");
            cur_src[d] = int'(rx_flit[d].data[31:16]);
            in_worm[d] = 1;
          end else begin
            check(in_worm[d], "payload only inside a worm");
          end
          s = cur_src[d];
          check(expq[s][d].size() > 0, "word was sent");
          if (expq[s][d].size() > 0) begin
            word_t e;
            e = expq[s][d].pop_front();
            check(e.kind == rx_flit[d].kind && e.data == rx_flit[d].data, "word in order and intact");
          end
          if (rx_flit[d].kind == FL_TAIL) in_worm[d] = 0;
          delivered++;
          if (t_first_read < 0) t_first_read = cyc;
          t_last_read = cyc;
        end
      end
    end
  end

  task automatic wait_drain();
    while (delivered < sent || sent == 0 || (txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size()
           + txq[4].size() + txq[5].size() + txq[6].size() + txq[7].size()) > 0) @(posedge clk);
    repeat (20) @(posedge clk);
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin pe_valid[p] = 0; pe_kind[p] = FL_BODY; pe_data[p] = '0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // (1) latency of one worm through the idle network
    add_worm(1, 6, 0);
    wait_drain();
    check(t_first_read - t_first_write == 9 + 2 * L, "idle latency 9 + 2*L_CABLE cycles");
    check(t_last_read - t_first_read == WORM_LEN - 1, "one word per cycle");
    $display("idle latency %0d cycles, worm of %0d words in %0d cycles",
             t_first_read - t_first_write, WORM_LEN, t_last_read - t_first_read + 1);
    // (2) random to all
    for (int m = 1; m <= 12; m++)
      for (int s = 0; s < N; s++) add_worm(s, $urandom_range(0, N - 1), m);
    wait_drain();
    // (3) gather to one
    for (int m = 20; m < 24; m++)
      for (int s = 0; s < N; s++) add_worm(s, 3, m);
    wait_drain();
    check(delivered == sent, "every word delivered");
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) check(expq[s][d].size() == 0, "nothing left over");
    check(n_stall_cycles > 0, "credit stall happened");
    check(n_dropped > 0, "stale grant dropped");
    $display("words %0d, credit-stall cycles %0d, dropped grants %0d", delivered, n_stall_cycles, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
