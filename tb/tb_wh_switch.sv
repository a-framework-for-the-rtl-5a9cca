// Testbench for wh_switch (N = 4 ports, W = 16-word sub-queues). The bench
// plays the NICs: it sends worms on in_link, one word per cycle per port,
// spending a credit per word and taking credits back from credit_valid /
// credit_dest. Every output word is matched in order against the words sent
// from its source to that output, and worms must come out whole. Checks the
// 5-cycle latency from a word on in_link to the same word on out_link in an
// idle switch (push, request, two-cycle Scheduler, N-Queue read, fabric),
// that one input can feed two outputs with interleaved worms (no head-of-line
// blocking), and that contention for one output occurs and is resolved.
module tb_wh_switch;
  import mpnet_pkg::*;
  localparam int N = 4, W = 16;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  flit_t in_link [N], out_link [N];
  logic [N-1:0] credit_valid;
  logic [IW-1:0] credit_dest [N];
  logic ev_grant_dropped;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct packed { flit_kind_e kind; logic [WORD_W-1:0] data; } word_t;
  word_t txq [N][$];
  word_t expq [N][N][$];
  int credit [N][N];
  int cur_src [N];
  int send_dest [N];
  int delivered = 0, sent = 0, n_multi = 0;
  longint t_in = -1, t_out = -1;

  wh_switch #(.N(N), .W(W)) dut (.clk, .rst_n, .in_link, .credit_valid, .credit_dest,
    .out_link, .ev_grant_dropped);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // NIC models
  always @(negedge clk) begin
    for (int s = 0; s < N; s++) begin
      in_link[s] = '0;
      if (rst_n && txq[s].size() > 0) begin
        int d;
        d = (txq[s][0].kind == FL_HEAD) ? int'(txq[s][0].data[IW-1:0]) : send_dest[s];
        if (credit[s][d] > 0) begin
          word_t w;
          w = txq[s].pop_front();
          send_dest[s] = d;
          credit[s][d]--;
          in_link[s] = '{valid: 1'b1, kind: w.kind, data: w.data};
          expq[s][d].push_back(w);
          sent++;
          if (t_in < 0) t_in = cyc;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < N; s++) if (credit_valid[s]) credit[s][credit_dest[s]]++;
      for (int d = 0; d < N; d++) begin
        if (out_link[d].valid) begin
          int s;
          if (t_out < 0) t_out = cyc;
          if (out_link[d].kind == FL_HEAD) cur_src[d] = int'(out_link[d].data[31:16]);
          s = cur_src[d];
          check(expq[s][d].size() > 0, "word was sent");
          if (expq[s][d].size() > 0) begin
            word_t e;
            e = expq[s][d].pop_front();
            check(e.kind == out_link[d].kind && e.data == out_link[d].data, "word in order and intact");
          end
          delivered++;
        end
      end
    end
  end

  // count cycles in which input 0 has worms in progress to two outputs
  always @(posedge clk) begin
    if (rst_n && (dut.q_empty[0] & 4'b0110) == 4'b0000) n_multi++;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      in_link[s] = '0; send_dest[s] = 0;
      for (int d = 0; d < N; d++) credit[s][d] = W;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    add_worm(0, 2, 0);
    repeat (30) @(posedge clk);
    check(t_out - t_in == 5, "idle switch latency 5 cycles");
    $display("idle switch latency %0d cycles", t_out - t_in);
    // input 0 to outputs 1 and 2 while input 3 also floods output 1
    for (int m = 1; m < 6; m++) begin
      add_worm(0, 1, m); add_worm(0, 2, 10 + m); add_worm(3, 1, 20 + m);
    end
    // random traffic
    for (int m = 30; m < 60; m++) for (int s = 0; s < N; s++) add_worm(s, $urandom_range(0, N - 1), m);
    while (delivered < sent || txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size() > 0)
      @(posedge clk);
    repeat (20) @(posedge clk);
    check(delivered == sent, "every word delivered");
    check(n_multi > 0, "one input held data for two outputs at once");
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) check(credit[s][d] == W, "all credits returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
