// Testbench for serial_link: sends random 64-bit words back to back through
// the parallel-to-serial converter, a 3-cycle serial cable and the
// serial-to-parallel converter. Checks every word, their order, the latency of
// WIDTH + 2 + CABLE_LAT serial cycles, and the rate of one word every
// WIDTH + 1 cycles.
module tb_serial_link;
  localparam int WIDTH = 64, CL = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [WIDTH-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] sent [$];
  longint t_sent [$];
  longint cyc = 0, last_accept = -1;

  serial_link #(.WIDTH(WIDTH), .CABLE_LAT(CL)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // receiver side
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      check(sent.size() > 0, "word expected");
      if (sent.size() > 0) begin
        check(out_data == sent[0], "word intact");
        check(cyc - t_sent[0] == longint'(WIDTH + 2 + CL), "link latency");
        void'(sent.pop_front());
        void'(t_sent.pop_front());
      end
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = {$urandom, $urandom};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      sent.push_back(in_data);
      t_sent.push_back(cyc);
      if (last_accept >= 0) check(cyc - last_accept == longint'(WIDTH + 1), "one word per WIDTH+1 cycles");
      last_accept = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (WIDTH * 3) @(posedge clk);
    check(sent.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
