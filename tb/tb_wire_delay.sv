// Testbench for wire_delay: drives a new random word every cycle and checks
// that each one comes out exactly LATENCY cycles later (full bandwidth), for
// a 10-cycle cable (a 100 ns cable at 100 MHz) and a 1-cycle cable.
module tb_wire_delay;
  localparam int WIDTH = 24;
  logic clk = 0, rst_n = 0;
  logic [WIDTH-1:0] d, q10, q1;
  logic [WIDTH-1:0] hist [$];
  int checks = 0, failures = 0;

  wire_delay #(.WIDTH(WIDTH), .LATENCY(10)) dut10 (.clk, .rst_n, .d, .q(q10));
  wire_delay #(.WIDTH(WIDTH), .LATENCY(1))  dut1  (.clk, .rst_n, .d, .q(q1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(q10 == 0 && q1 == 0, "reset clears the wire");
    for (int c = 0; c < 1000; c++) begin
      d = WIDTH'($urandom);
      hist.push_front(d);
      @(negedge clk);
      if (hist.size() > 1) check(q1 == hist[0], "1-cycle wire");
      if (hist.size() > 10) check(q10 == hist[9], "10-cycle wire");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
