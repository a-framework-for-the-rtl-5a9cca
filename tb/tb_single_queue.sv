// Testbench for single_queue: random pushes and pulls against a reference
// queue. Checks every word that comes out, the Full and Empty lines, the
// peek output, and the one-cycle latency from a push into an empty queue to
// the word being pullable.
module tb_single_queue;
  localparam int WIDTH = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pull, dov, full, empty;
  logic [WIDTH-1:0] din, dout, peek;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  logic [WIDTH-1:0] expect_q;
  logic             expect_v;

  single_queue #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push, .data_in(din), .pull, .data_out(dout), .data_out_valid(dov),
    .peek, .full, .empty);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pull = 0; din = 0; expect_v = 0; expect_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    // latency: push into empty queue, pull in the very next cycle
    push = 1; din = 16'hBEEF; @(negedge clk);
    push = 0; check(!empty, "not empty one cycle after push");
    check(peek == 16'hBEEF, "peek shows head");
    pull = 1; @(negedge clk);
    pull = 0; check(dov && dout == 16'hBEEF, "word out one cycle after pull");
    @(negedge clk);
    check(!dov && empty, "empty again");
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin push = 1; din = WIDTH'(i + 100); @(negedge clk); end
    push = 0;
    check(full, "full after DEPTH pushes");
    for (int i = 0; i < DEPTH; i++) begin
      pull = 1; @(negedge clk);
      check(dov && dout == WIDTH'(i + 100), "fifo order after fill");
    end
    pull = 0; @(negedge clk);
    check(empty, "empty after drain");
    // random traffic
    for (int c = 0; c < 4000; c++) begin
      // outputs of the previous cycle
      if (expect_v) check(dov && dout == expect_q, "random data");
      else          check(!dov, "no spurious valid");
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(peek == model[0], "peek");
      push = ($urandom_range(0, 99) < 55) && !full;
      pull = ($urandom_range(0, 99) < 50) && !empty;
      din  = WIDTH'($urandom);
      expect_v = pull;
      if (pull) expect_q = model.pop_front();
      if (push) model.push_back(din);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
