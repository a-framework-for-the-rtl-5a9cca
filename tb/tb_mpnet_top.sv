// End-to-end testbench for mpnet_top at its default parameters (32 ports,
// 16-word buffers, one-cycle cables, 32 predictive settings). The same
// traffic is offered to the three networks by modelled processing elements:
// random messages to all destinations, then a gather to one destination.
// Every delivered word is matched in order against the words sent from its
// source to that destination; wormhole worms must arrive whole. The
// predictive network runs with the 32 shift settings (entry k connects input
// i to output (i + k) mod 32) and 10-cycle communication cycles, then
// switches to Scheduler-driven settings. One word also crosses the serial
// cable link.
// Each mechanism is counted and must occur at least once: wormhole credit
// stalls and dropped stale grants, circuit set-up and tear-down, predictive
// rotation and hits (a word sent with no set-up), the switch to dynamic mode,
// and a serial transfer. Effective bandwidth of each network (words
// delivered per port per cycle) is printed.
module tb_mpnet_top;
  import mpnet_pkg::*;
  localparam int N = 32, K = 32;
  localparam int IW = $clog2(N), KW = $clog2(K);
  logic clk = 0, rst_n = 0;

  logic [N-1:0] wh_pe_valid, wh_pe_ready, wh_nic_stalled;
  flit_kind_e wh_pe_kind [N];
  logic [WORD_W-1:0] wh_pe_data [N];
  flit_t wh_rx_flit [N];
  logic wh_ev_grant_dropped;
  logic [N-1:0] cs_pe_valid, cs_pe_ready, ps_pe_valid, ps_pe_ready;
  logic [IW-1:0] cs_pe_dest [N], ps_pe_dest [N];
  logic [WORD_W-1:0] cs_pe_data [N], ps_pe_data [N];
  flit_t cs_rx_flit [N], ps_rx_flit [N];
  logic cs_ev_setup, cs_ev_teardown;
  logic ps_dyn_mode, ps_tbl_we, ps_tbl_valid, ps_ev_slot;
  logic [$clog2(K+1)-1:0] ps_num_cfg;
  logic [15:0] ps_slot_len;
  logic [KW-1:0] ps_tbl_row, ps_cur_entry;
  logic [IW-1:0] ps_tbl_col, ps_tbl_dest;
  logic sl_in_valid, sl_in_ready, sl_out_valid;
  logic [WORD_W-1:0] sl_in_data, sl_out_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  mpnet_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traffic ----------------
  typedef struct packed { flit_kind_e kind; logic [IW-1:0] dest; logic [WORD_W-1:0] data; } word_t;
  word_t wq [3][N][$];                   // words still to write, per network and PE
  logic [WORD_W+1:0] eq [3][N][N][$];     // words sent, per network, source, destination
  int sent [3] = '{0, 0, 0};
  int got [3] = '{0, 0, 0};
  int wh_src [N];
  longint t_start [3], t_end [3];
  longint t_ps_write = -1, t_ps_read = -1;
  int n_stall = 0, n_drop = 0, n_setup = 0, n_tear = 0, n_slot = 0, n_hit = 0, n_dyn = 0, n_serial = 0;

  task automatic add_msg(input int s, input int d, input int msg, input int words);
    word_t w;
    // wormhole: whole worms of ten payload words
    for (int m = 0; m < (words + WORM_PAYLOAD - 1) / WORM_PAYLOAD; m++) begin
      w.dest = IW'(d);
      w.kind = FL_HEAD; w.data = {32'(msg), 16'(s), 16'(d)};
      wq[0][s].push_back(w);
      for (int k = 0; k < WORM_PAYLOAD; k++) begin
        w.kind = FL_BODY; w.data = {16'(msg), 16'(m * 16 + k), 16'(s), 16'(d)};
        wq[0][s].push_back(w);
      end
      w.kind = FL_TAIL; w.data = {16'(msg), 16'hFFFF, 16'(s), 16'(d)};
      wq[0][s].push_back(w);
    end
    for (int k = 0; k < words; k++) begin
      w.kind = FL_BODY; w.dest = IW'(d); w.data = {16'(msg), 16'(k), 16'(s), 16'(d)};
      wq[1][s].push_back(w);
      wq[2][s].push_back(w);
    end
  endtask

  always @(negedge clk) begin
    for (int p = 0; p < N; p++) begin
      wh_pe_valid[p] = rst_n && wq[0][p].size() > 0;
      wh_pe_kind[p]  = wh_pe_valid[p] ? wq[0][p][0].kind : FL_BODY;
      wh_pe_data[p]  = wh_pe_valid[p] ? wq[0][p][0].data : '0;
      cs_pe_valid[p] = rst_n && wq[1][p].size() > 0;
      cs_pe_dest[p]  = cs_pe_valid[p] ? wq[1][p][0].dest : '0;
      cs_pe_data[p]  = cs_pe_valid[p] ? wq[1][p][0].data : '0;
      ps_pe_valid[p] = rst_n && wq[2][p].size() > 0;
      ps_pe_dest[p]  = ps_pe_valid[p] ? wq[2][p][0].dest : '0;
      ps_pe_data[p]  = ps_pe_valid[p] ? wq[2][p][0].data : '0;
    end
    #1;
    for (int p = 0; p < N; p++) begin
      word_t w;
      if (wh_pe_valid[p] && wh_pe_ready[p]) begin
        w = wq[0][p].pop_front(); eq[0][p][w.dest].push_back({w.kind, w.data}); sent[0]++;
      end
      if (cs_pe_valid[p] && cs_pe_ready[p]) begin
        w = wq[1][p].pop_front(); eq[1][p][w.dest].push_back({w.kind, w.data}); sent[1]++;
      end
      if (ps_pe_valid[p] && ps_pe_ready[p]) begin
        w = wq[2][p].pop_front(); eq[2][p][w.dest].push_back({w.kind, w.data}); sent[2]++;
        if (t_ps_write < 0) t_ps_write = cyc;
      end
    end
  end

  task automatic receive(input int net, input int d, input flit_t f);
    int s;
    logic [WORD_W+1:0] e;
    if (net == 0 && f.kind == FL_HEAD) wh_src[d] = int'(f.data[31:16]);
    s = (net == 0) ? wh_src[d] : int'(f.data[31:16]);
    check(s < N && eq[net][s][d].size() > 0, "word was sent");
    if (s < N && eq[net][s][d].size() > 0) begin
      e = eq[net][s][d].pop_front();
      check(e == {f.kind, f.data}, "word in order and intact");
    end
    got[net]++;
    if (net == 2 && t_ps_read < 0) t_ps_read = cyc;
    t_end[net] = cyc;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (|wh_nic_stalled) n_stall++;
      if (wh_ev_grant_dropped) n_drop++;
      if (cs_ev_setup) n_setup++;
      if (cs_ev_teardown) n_tear++;
      if (ps_ev_slot) n_slot++;
      if (sl_out_valid) begin
        n_serial++;
        check(sl_out_data == 64'h0123_4567_89AB_CDEF, "serial word intact");
      end
      for (int d = 0; d < N; d++) begin
        if (wh_rx_flit[d].valid) receive(0, d, wh_rx_flit[d]);
        if (cs_rx_flit[d].valid) receive(1, d, cs_rx_flit[d]);
        if (ps_rx_flit[d].valid) begin
          receive(2, d, ps_rx_flit[d]);
          if (ps_dyn_mode) n_dyn++;
        end
      end
    end
  end

  function automatic int backlog();
    int n = 0;
    for (int k = 0; k < 3; k++) for (int p = 0; p < N; p++) n += wq[k][p].size();
    return n;
  endfunction

  task automatic wait_drain();
    while (backlog() > 0 || got[0] < sent[0] || got[1] < sent[1] || got[2] < sent[2]) @(posedge clk);
    repeat (30) @(posedge clk);
  endtask

  initial begin
    longint t0, t1;
    ps_dyn_mode = 0; ps_num_cfg = 1; ps_slot_len = 10; ps_tbl_we = 0; ps_tbl_row = 0;
    ps_tbl_col = 0; ps_tbl_valid = 0; ps_tbl_dest = 0;
    sl_in_valid = 0; sl_in_data = 0;
    for (int p = 0; p < N; p++) begin
      wh_pe_valid[p] = 0; wh_pe_kind[p] = FL_BODY; wh_pe_data[p] = 0;
      cs_pe_valid[p] = 0; cs_pe_dest[p] = 0; cs_pe_data[p] = 0;
      ps_pe_valid[p] = 0; ps_pe_dest[p] = 0; ps_pe_data[p] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    // table load and a serial transfer
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        ps_tbl_we = 1; ps_tbl_row = KW'(k); ps_tbl_col = IW'(i); ps_tbl_valid = 1;
        ps_tbl_dest = IW'((i + k) % N);
        sl_in_valid = (k == 0 && i == 0);
        sl_in_data  = 64'h0123_4567_89AB_CDEF;
      end
    @(negedge clk);
    ps_tbl_we = 0; sl_in_valid = 0;
    repeat (20) @(posedge clk);
    // a predictive hit: entry 0 (i -> i) is in force with num_cfg = 1
    t0 = cyc;
    add_msg(5, 5, 0, 10);
    wq[0][5].delete(); wq[1][5].delete();
    while (got[2] == 0) @(posedge clk);
    // a hit costs only the data path: 5 + 2 * L_CABLE cycles (L_CABLE = 1)
    $display("predictive hit: first word %0d cycles after the write", t_ps_read - t_ps_write);
    if (t_ps_read - t_ps_write == 5 + 2 * 1) n_hit++;
    check(t_ps_read - t_ps_write == 5 + 2 * 1, "predictive hit without set-up");
    wait_drain();
    // random traffic to all, 80-byte communication cycles over all settings
    @(negedge clk);
    ps_num_cfg = K;
    for (int k = 0; k < 3; k++) begin sent[k] = 0; got[k] = 0; t_start[k] = cyc; end
    for (int m = 1; m <= 3; m++)
      for (int s = 0; s < N; s++) add_msg(s, $urandom_range(0, N - 1), m, 10);
    wait_drain();
    for (int k = 0; k < 3; k++)
      $display("random-to-all, network %0d: %0d words in %0d cycles, %0.3f words/port/cycle",
               k, got[k], t_end[k] - t_start[k], real'(got[k]) / real'(N) / real'(t_end[k] - t_start[k]));
    // gather to one
    for (int s = 0; s < N; s++) add_msg(s, 7, 50, 10);
    wait_drain();
    // Scheduler-driven settings
    @(negedge clk);
    ps_dyn_mode = 1;
    for (int s = 0; s < N; s++) add_msg(s, (s + 9) % N, 60, 10);
    wait_drain();
    for (int k = 0; k < 3; k++) begin
      check(got[k] == sent[k], "every word delivered");
      for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) check(eq[k][s][d].size() == 0, "nothing left over");
    end
    check(n_stall > 0, "wormhole credit stall");
    check(n_drop > 0, "wormhole stale grant dropped");
    check(n_setup > 0, "circuit set-up");
    check(n_tear > 0, "circuit tear-down");
    check(n_slot > 0, "predictive rotation");
    check(n_hit > 0, "predictive hit");
    check(n_dyn > 0, "predictive dynamic mode");
    check(n_serial == 1, "serial transfer");
    $display("stalls %0d drops %0d setups %0d teardowns %0d slots %0d hits %0d dyn-words %0d serial %0d",
             n_stall, n_drop, n_setup, n_tear, n_slot, n_hit, n_dyn, n_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
