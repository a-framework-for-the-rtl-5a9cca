// Testbench for switch_fabric: random configurations (with unconnected
// outputs) and random input words every cycle; each output must show, one
// cycle later, the word of the input its configuration named, or zero.
module tb_switch_fabric;
  localparam int N = 8, WIDTH = 12;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] cfg_valid;
  logic [IW-1:0] cfg_src [N];
  logic [WIDTH-1:0] in_data [N], out_data [N];
  logic [WIDTH-1:0] exp_q [N];
  int checks = 0, failures = 0;

  switch_fabric #(.N(N), .WIDTH(WIDTH)) dut (.clk, .rst_n, .cfg_valid, .cfg_src, .in_data, .out_data);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_valid = '0;
    for (int i = 0; i < N; i++) begin cfg_src[i] = '0; in_data[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      cfg_valid = N'($urandom);
      for (int o = 0; o < N; o++) cfg_src[o] = IW'($urandom_range(0, N - 1));
      for (int i = 0; i < N; i++) in_data[i] = WIDTH'($urandom);
      for (int o = 0; o < N; o++) exp_q[o] = cfg_valid[o] ? in_data[cfg_src[o]] : '0;
      @(negedge clk);
      for (int o = 0; o < N; o++) check(out_data[o] == exp_q[o], "crossbar output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
