// Testbench for cs_nic (N = 4 destinations, W = 4 words each). Checks that
// the request vector shows exactly the destinations with buffered data, that
// pe_ready drops when a destination's sub-queue is full while other
// destinations still accept, that a grant for destination d streams that
// sub-queue's words onto tx_link one per cycle, one cycle after the grant, in
// order and stops when it is empty, that a word for another destination is
// never sent under that grant, and that inbound words reach rx_flit two
// cycles after arriving.
module tb_cs_nic;
  import mpnet_pkg::*;
  localparam int N = 4, W = 4;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic pe_valid, pe_ready, grant_valid;
  logic [IW-1:0] pe_dest, grant_dest;
  logic [WORD_W-1:0] pe_data;
  logic [N-1:0] req;
  flit_t rx_flit, tx_link, rx_link;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] model [N][$];
  logic [WORD_W-1:0] exp_tx;
  logic              exp_tx_v;
  logic [WORD_W-1:0] exp_rx [$];

  cs_nic #(.N(N), .W(W)) dut (.clk, .rst_n, .pe_valid, .pe_dest, .pe_data, .pe_ready,
    .rx_flit, .req, .grant_valid, .grant_dest, .tx_link, .rx_link);

  always #5 clk = ~clk;

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

  // checks on the outputs, sampled just before each rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (rx_flit.valid) begin
        check(exp_rx.size() > 0 && rx_flit.data == exp_rx[0], "inbound order");
        if (exp_rx.size() > 0) void'(exp_rx.pop_front());
      end
    end
  end

  initial begin
    pe_valid = 0; pe_dest = 0; pe_data = 0; grant_valid = 0; exp_tx_v = 0; exp_tx = 0; grant_dest = 0; rx_link = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // outputs caused by the previous cycle
      for (int d = 0; d < N; d++) check(req[d] == (model[d].size() > 0), "request = non-empty sub-queues");
      check(tx_link.valid == exp_tx_v, "a word leaves exactly when granted and not empty");
      if (exp_tx_v) check(tx_link.data == exp_tx, "granted words in order");
      // grant: the model says what leaves in the next cycle
      grant_valid = ($urandom_range(0, 2) != 0);
      grant_dest  = IW'($urandom_range(0, N - 1));
      exp_tx_v    = grant_valid && model[grant_dest].size() > 0;
      if (exp_tx_v) exp_tx = model[grant_dest].pop_front();
      pe_valid = ($urandom_range(0, 1) == 1);
      pe_dest  = IW'($urandom_range(0, N - 1));
      pe_data  = {$urandom, $urandom};
      #1;
      check(pe_ready == ((model[pe_dest].size() + ((exp_tx_v && grant_dest == pe_dest) ? 1 : 0)) < W),
            "pe_ready = room in sub-queue");
      if (pe_valid && pe_ready) model[pe_dest].push_back(pe_data);
      rx_link.valid = ($urandom_range(0, 1) == 1);
      rx_link.kind  = FL_BODY;
      rx_link.data  = {$urandom, $urandom};
      if (rx_link.valid) exp_rx.push_back(rx_link.data);
    end
    @(negedge clk);
    pe_valid = 0; grant_valid = 0; rx_link = '0;
    repeat (5) @(posedge clk);
    check(exp_rx.size() == 0, "all inbound words out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
