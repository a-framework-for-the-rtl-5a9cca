// End-to-end testbench for ps_network (N = 8, 16-word buffers, 2-cycle
// cables, K = 8 table entries). Modelled processing elements write words
// with a destination; every delivered word is matched in order against the
// words sent from that source to that destination.
// The table is loaded with the N shift settings, entry k connecting input i
// to output (i + k) mod N, so every pair is connected once per rotation.
// Phases: (1) a single setting (num_cfg = 1) and a word that matches it: a
// prediction hit, with no setup, 5 + 2*L_CABLE cycles from PE write to PE
// read; (2) random traffic to all with all N settings rotating every 10
// cycles (80 bytes per communication cycle): the rotation order of the
// entries is checked and each word must leave in a communication cycle whose
// setting connects its source and destination; (3) switch to dyn_mode, where
// settings come from the Scheduler, and send traffic the table would not
// carry (num_cfg = 1 again). The mode switch, slot changes and hits are
// counted and must all occur.
module tb_ps_network;
  import mpnet_pkg::*;
  localparam int N = 8, W = 16, L = 2;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pe_valid, pe_ready;
  logic [IW-1:0] pe_dest [N];
  logic [WORD_W-1:0] pe_data [N];
  flit_t rx_flit [N];
  localparam int K = 8;
  logic dyn_mode, tbl_we, tbl_valid, ev_slot;
  logic [$clog2(K+1)-1:0] num_cfg;
  logic [15:0] slot_len;
  logic [$clog2(K)-1:0] tbl_row, cur_entry, prev_entry;
  logic [IW-1:0] tbl_col, tbl_dest;
  int n_slots = 0, n_order_bad = 0, n_dyn_words = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct packed { logic [IW-1:0] dest; logic [WORD_W-1:0] data; } word_t;
  word_t txq [N][$];
  logic [WORD_W-1:0] expq [N][N][$];
  int delivered = 0, sent = 0;
  longint t_first_write = -1, t_first_read = -1, t_last_read = -1;

  ps_network #(.N(N), .W(W), .L_CABLE(L), .K(K), .SLOT_W(16)) dut (
    .clk, .rst_n, .pe_valid, .pe_dest, .pe_data, .pe_ready, .rx_flit,
    .dyn_mode, .num_cfg, .slot_len, .tbl_we, .tbl_row, .tbl_col, .tbl_valid, .tbl_dest,
    .cur_entry, .ev_slot);

  // setting in force for a word pulled at the NIC in cycle c: the entry the
  // controller showed L cycles earlier (grant cable). Entry history:
  int entry_at [longint];
  always @(posedge clk) if (rst_n) entry_at[cyc] = int'(cur_entry);

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
      if (ev_slot) begin
        n_slots++;
        prev_entry <= cur_entry;
      end
      for (int d = 0; d < N; d++) begin
        if (rx_flit[d].valid) begin
          int s;
          s = int'(rx_flit[d].data[31:16]);
          check(rx_flit[d].data[IW-1:0] == IW'(d), "arrived at its destination");
          // the word reaches the PE 4 + 2*L cycles after the NIC pulled it;
          // the grant it used left the controller L cycles before that
          if (!dyn_mode && num_cfg == K) begin
            int e;
            e = entry_at[cyc - (4 + 3 * L)];
            check(((s + e) % N) == d, "word sent in a setting that connects it");
          end
          if (dyn_mode) n_dyn_words++;
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

  // rotation order: each new entry follows the previous one
  always @(posedge clk) begin
    if (rst_n && !dyn_mode && num_cfg == K && $past(ev_slot) && cyc > 60)
      if (int'(cur_entry) != (int'(prev_entry) + 1) % K) n_order_bad++;
  end

  initial begin
    for (int p = 0; p < N; p++) begin pe_valid[p] = 0; pe_dest[p] = '0; pe_data[p] = '0; end
    dyn_mode = 0; num_cfg = 1; slot_len = 10; tbl_we = 0; tbl_row = 0; tbl_col = 0;
    tbl_valid = 0; tbl_dest = 0; prev_entry = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // load the table: entry k connects input i to output (i + k) mod N
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        tbl_we = 1; tbl_row = $clog2(K)'(k); tbl_col = IW'(i); tbl_valid = 1; tbl_dest = IW'((i + k) % N);
      end
    @(negedge clk);
    tbl_we = 0;
    repeat (30) @(posedge clk);
    // (1) hit: entry 0 (i -> i) stays in force, send 3 -> 3
    add_msg(3, 3, 0, 10);
    wait_drain();
    check(t_first_read - t_first_write == 5 + 2 * L, "hit latency without setup");
    check(t_last_read - t_first_read == 9, "one word per cycle on a hit");
    $display("hit latency %0d cycles", t_first_read - t_first_write);
    // (2) random to all, all settings rotating
    @(negedge clk);
    num_cfg = K;
    repeat (40) @(posedge clk);
    for (int m = 1; m <= 6; m++)
      for (int s = 0; s < N; s++) add_msg(s, $urandom_range(0, N - 1), m, $urandom_range(1, 24));
    wait_drain();
    // (3) mode switch to the Scheduler with a table that only connects i -> i
    @(negedge clk);
    num_cfg = 1;
    dyn_mode = 1;
    repeat (40) @(posedge clk);
    for (int s = 0; s < N; s++) add_msg(s, (s + 3) % N, 40, 12);
    wait_drain();
    check(delivered == sent, "every word delivered");
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) check(expq[s][d].size() == 0, "nothing left over");
    check(n_slots > 0, "communication cycles rotated");
    check(n_order_bad == 0, "entries rotate round robin");
    check(n_dyn_words > 0, "dynamic mode delivered traffic");
    $display("words %0d, communication cycles %0d, words in dynamic mode %0d", delivered, n_slots, n_dyn_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
