// Testbench for cs_controller (N = 4). Random request matrices that change
// slowly (as NIC queues fill and drain). Checks every cycle: grants and the
// fabric configuration describe the same circuits, no output has two inputs,
// a circuit is only set up for a pair requested when its scheduling round
// began (three cycles before it appears), a circuit persists while
// its pair stays requested, and it is torn down in the cycle after its
// request drops. Also checks the set-up time of 3 or 4 cycles from a request
// at an idle controller to its grant (two-cycle scheduling rounds plus the
// two-cycle Scheduler), and that with all inputs asking for one output every
// input gets its turn.
module tb_cs_controller;
  localparam int N = 4;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req [N];
  logic [N-1:0] grant_valid, cfg_valid;
  logic [IW-1:0] grant_dest [N], cfg_src [N];
  logic ev_setup, ev_teardown;
  int checks = 0, failures = 0;
  logic [N-1:0] prev_req [N];
  logic [N-1:0] prev_gv;
  logic [IW-1:0] prev_gd [N];
  int served [N];

  cs_controller #(.N(N)) dut (.clk, .rst_n, .req, .grant_valid, .grant_dest, .cfg_valid, .cfg_src,
    .ev_setup, .ev_teardown);

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

  // invariants, checked mid-cycle against the requests of the previous cycle
  task automatic check_state();
    for (int o = 0; o < N; o++) begin
      int n = 0;
      for (int i = 0; i < N; i++) if (grant_valid[i] && grant_dest[i] == IW'(o)) begin
        n++;
        check(cfg_valid[o] && cfg_src[o] == IW'(i), "configuration matches grant");
      end
      check(n <= 1, "output used by one input at most");
      if (n == 0) check(!cfg_valid[o], "no configuration without a grant");
    end
    for (int i = 0; i < N; i++) begin
      if (grant_valid[i] && !(prev_gv[i] && prev_gd[i] == grant_dest[i]))
        check(req_d3[i][grant_dest[i]], "new circuit was requested when its round began");
      if (prev_gv[i] && prev_req[i][prev_gd[i]])
        check(grant_valid[i] && grant_dest[i] == prev_gd[i], "circuit held while requested");
      if (prev_gv[i] && !prev_req[i][prev_gd[i]])
        check(!(grant_valid[i] && grant_dest[i] == prev_gd[i]), "circuit released when request drops");
    end
  endtask

  // requests as the controller saw them at the last rising edge
  logic [N-1:0] req_d2 [N], req_d3 [N];
  always @(posedge clk)
    for (int i = 0; i < N; i++) begin
      req_d3[i] = req_d2[i];
      req_d2[i] = prev_req[i];
      prev_req[i] = req[i];
    end

  task automatic step();
    @(negedge clk);
    check_state();
    for (int i = 0; i < N; i++) prev_gd[i] = grant_dest[i];
    prev_gv = grant_valid;
  endtask

  initial begin
    int t0, lat;
    for (int i = 0; i < N; i++) begin req[i] = '0; prev_req[i] = '0; prev_gd[i] = '0; end
    prev_gv = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (6) step();
    // set-up time
    req[1] = 4'b0100;
    lat = 0;
    while (!(grant_valid[1] && grant_dest[1] == 2)) begin step(); lat++; end
    check(lat >= 3 && lat <= 4, "set-up in 3 or 4 cycles");
    $display("set-up %0d cycles", lat);
    req[1] = '0;
    repeat (4) step();
    // fairness for one output
    for (int i = 0; i < N; i++) req[i] = 4'b1000;
    for (int c = 0; c < 200; c++) begin
      logic [N-1:0] held;
      for (int i = 0; i < N; i++) held[i] = grant_valid[i] && grant_dest[i] == 3;
      step();
      for (int i = 0; i < N; i++) if (grant_valid[i] && grant_dest[i] == 3 && !held[i]) served[i]++;
      // the holder drains its queue after a while
      for (int i = 0; i < N; i++) req[i] = (grant_valid[i] && $urandom_range(0, 3) == 0) ? '0 : 4'b1000;
    end
    for (int i = 0; i < N; i++) check(served[i] > 0, "every input gets the contended output");
    // random, slowly changing requests
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 5) == 0) req[i] = req[i] ^ N'(1 << $urandom_range(0, N - 1));
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
