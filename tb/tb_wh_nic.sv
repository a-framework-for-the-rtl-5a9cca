// Testbench for wh_nic (N = 4 destinations, W = 4 credits each). The bench
// plays the switch: it takes the words on tx_link into a model of the
// switch's per-destination sub-queues and drains them at random, returning a
// credit for every word drained. Checks: words leave in the order written,
// the NIC never sends a word for a destination whose sub-queue is full
// (credit rule), the NIC stalls when credits run out and resumes when they
// come back, a word written into an idle NIC is on tx_link two cycles later,
// and inbound words reach rx_flit two cycles after arriving, in order.
module tb_wh_nic;
  import mpnet_pkg::*;
  localparam int N = 4, W = 4, Q = 8;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic pe_valid, pe_ready, credit_valid, stalled;
  flit_kind_e pe_kind;
  logic [WORD_W-1:0] pe_data;
  logic [IW-1:0] credit_dest;
  flit_t rx_flit, tx_link, rx_link;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct packed { flit_kind_e kind; logic [WORD_W-1:0] data; } word_t;
  word_t txq [$], sentq [$];
  word_t rxexp [$];
  int occ [N];
  int cur_dest = 0, n_stall = 0, drain_pct = 50;
  longint t_write = -1, t_out = -1;

  wh_nic #(.N(N), .W(W), .Q(Q)) dut (
    .clk, .rst_n, .pe_valid, .pe_kind, .pe_data, .pe_ready, .rx_flit, .tx_link,
    .credit_valid, .credit_dest, .rx_link, .stalled);

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

  task automatic add_worm(input int d, input int len, input int msg);
    word_t w;
    w.kind = FL_HEAD; w.data = {32'(msg), 16'h0, 16'(d)};
    txq.push_back(w);
    for (int k = 0; k < len; k++) begin
      w.kind = (k == len - 1) ? FL_TAIL : FL_BODY;
      w.data = {32'(msg), 32'(k)};
      txq.push_back(w);
    end
  endtask

  // PE write side and credit return
  always @(negedge clk) begin
    pe_valid = rst_n && txq.size() > 0;
    pe_kind  = pe_valid ? txq[0].kind : FL_BODY;
    pe_data  = pe_valid ? txq[0].data : '0;
    credit_valid = 0;
    credit_dest  = '0;
    if (rst_n && $urandom_range(0, 99) < drain_pct) begin
      int d;
      d = $urandom_range(0, N - 1);
      if (occ[d] > 0) begin
        occ[d]--;
        credit_valid = 1;
        credit_dest  = IW'(d);
      end
    end
    #1;
    if (pe_valid && pe_ready) begin
      sentq.push_back(txq.pop_front());
      if (t_write < 0) t_write = cyc;
    end
  end

  // switch side
  always @(posedge clk) begin
    if (rst_n) begin
      if (stalled) n_stall++;
      if (tx_link.valid) begin
        word_t e;
        if (t_out < 0) t_out = cyc;
        check(sentq.size() > 0, "word was written");
        e = sentq.pop_front();
        check(e.kind == tx_link.kind && e.data == tx_link.data, "outbound order");
        if (tx_link.kind == FL_HEAD) cur_dest = int'(tx_link.data[IW-1:0]);
        occ[cur_dest]++;
        check(occ[cur_dest] <= W, "credit rule: sub-queue never overfilled");
      end
      if (rx_flit.valid) begin
        check(rxexp.size() > 0 && rx_flit.data == rxexp[0].data && rx_flit.kind == rxexp[0].kind,
              "inbound order");
        if (rxexp.size() > 0) void'(rxexp.pop_front());
      end
    end
  end

  initial begin
    pe_valid = 0; pe_kind = FL_BODY; pe_data = 0; credit_valid = 0; credit_dest = 0;
    rx_link = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    add_worm(1, 2, 0);
    repeat (10) @(posedge clk);
    check(t_out - t_write == 2, "idle NIC: word on the cable two cycles after the write");
    // no credits come back: the NIC must stop after W words to one destination
    drain_pct = 0;
    add_worm(2, 8, 1);
    repeat (40) @(posedge clk);
    check(occ[2] == W && stalled, "stalled with no credits left");
    drain_pct = 50;
    for (int m = 2; m < 40; m++) add_worm($urandom_range(0, N - 1), $urandom_range(1, 12), m);
    // inbound traffic at the same time
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      rx_link.valid = ($urandom_range(0, 1) == 1);
      rx_link.kind  = FL_BODY;
      rx_link.data  = {$urandom, $urandom};
      if (rx_link.valid) rxexp.push_back('{kind: FL_BODY, data: rx_link.data});
    end
    @(negedge clk);
    rx_link = '0;
    while (txq.size() > 0 || sentq.size() > 0) @(posedge clk);
    repeat (10) @(posedge clk);
    check(rxexp.size() == 0, "all inbound words delivered");
    check(n_stall > 0, "credit stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
