// Testbench for n_queue: one reference queue per sub-queue, random pushes to
// random destinations and pulls from random non-empty sources, including the
// same sub-queue pushed and pulled in one cycle. Checks every word read, the
// Full and Empty vectors, that sub-queues do not block each other (one full
// sub-queue while others still accept), and the one-cycle latency.
module tb_n_queue;
  localparam int N = 8, W = 4, WIDTH = 20;
  logic clk = 0, rst_n = 0;
  logic push, pull, dov;
  logic [$clog2(N)-1:0] dest, src;
  logic [WIDTH-1:0] din, dout;
  logic [N-1:0] full, empty;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [N][$];
  logic [WIDTH-1:0] expect_q;
  logic expect_v;

  n_queue #(.N(N), .W(W), .WIDTH(WIDTH)) dut (
    .clk, .rst_n, .push, .dest, .data_in(din), .pull, .src, .data_out(dout),
    .data_out_valid(dov), .full, .empty);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pull = 0; din = 0; dest = 0; src = 0; expect_v = 0; expect_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty == '1 && full == '0, "all empty after reset");
    // fill sub-queue 3 completely; the others must still accept and be empty
    for (int i = 0; i < W; i++) begin push = 1; dest = 3; din = WIDTH'(i + 1); @(negedge clk); end
    push = 0;
    check(full == 8'b0000_1000, "only sub-queue 3 full");
    check(empty == 8'b1111_0111, "only sub-queue 3 non-empty");
    push = 1; dest = 5; din = 20'h55555; @(negedge clk); push = 0;
    // latency: pull sub-queue 5 in the cycle after its push
    pull = 1; src = 5; @(negedge clk); pull = 0;
    check(dov && dout == 20'h55555, "non-blocking: sub-queue 5 passes a full sub-queue 3");
    for (int i = 0; i < W; i++) begin
      pull = 1; src = 3; @(negedge clk);
      check(dov && dout == WIDTH'(i + 1), "order within sub-queue 3");
    end
    pull = 0; @(negedge clk);
    check(empty == '1, "empty again");
    // random traffic
    for (int c = 0; c < 6000; c++) begin
      if (expect_v) check(dov && dout == expect_q, "random data");
      else          check(!dov, "no spurious valid");
      for (int q = 0; q < N; q++) begin
        check(empty[q] == (model[q].size() == 0), "empty vector");
        check(full[q] == (model[q].size() == W), "full vector");
      end
      dest = $clog2(N)'($urandom_range(0, N - 1));
      push = ($urandom_range(0, 99) < 60) && !full[dest];
      din  = WIDTH'($urandom);
      src  = $clog2(N)'($urandom_range(0, N - 1));
      if (c % 3 == 0) src = dest;   // same sub-queue read and write
      pull = ($urandom_range(0, 99) < 60) && !empty[src];
      expect_v = pull;
      if (pull) expect_q = model[src].pop_front();
      if (push) model[dest].push_back(din);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
