// Testbench for rr_scheduler (N = 8): random request matrices and available
// vectors every cycle. An independent model of the N-level round-robin
// algorithm (levels visited from a pointer that advances every cycle, each
// level taking the first free requested destination at or after the pointer;
// the pointer advances with every valid schedule)
// predicts every Grant row, every Configuration entry and the remaining
// Available vector, two cycles after the requests. It also checks fairness:
// with every PE requesting the same destination, the grant rotates through
// all PEs in N consecutive cycles.
module tb_rr_scheduler;
  localparam int N = 8;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [N-1:0] req [N], grant [N];
  logic [N-1:0] avail_in, cfg_valid, avail_out;
  logic [IW-1:0] cfg_src [N];
  int checks = 0, failures = 0;

  typedef struct { logic v; logic [N-1:0] req [N]; logic [N-1:0] av; int ptr; } rec_t;
  rec_t hist [$];
  int cyc = 0;
  int fair_hits [N];

  rr_scheduler #(.N(N)) dut (.clk, .rst_n, .in_valid, .req, .avail_in,
    .out_valid, .grant, .cfg_valid, .cfg_src, .avail_out);

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

  // reference schedule
  task automatic model(input rec_t r, output logic [N-1:0] g [N], output logic [N-1:0] av);
    av = r.av;
    for (int j = 0; j < N; j++) g[j] = '0;
    for (int k = 0; k < N; k++) begin
      int j;
      j = (r.ptr + k) % N;
      for (int m = 0; m < N; m++) begin
        int d;
        d = (r.ptr + m) % N;
        if (av[d] && r.req[j][d]) begin
          g[j][d] = 1'b1;
          av[d]   = 1'b0;
          break;
        end
      end
    end
  endtask

  // record what is applied at each edge, check what comes out two edges later
  always @(posedge clk) begin
    if (rst_n) begin
      rec_t r;
      r.v = in_valid;
      for (int j = 0; j < N; j++) r.req[j] = req[j];
      r.av  = avail_in;
      r.ptr = cyc % N;
      hist.push_back(r);
      if (in_valid) cyc <= cyc + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n && hist.size() >= 2) begin
      rec_t r;
      logic [N-1:0] g [N];
      logic [N-1:0] av;
      r = hist[hist.size() - 2];
      model(r, g, av);
      check(out_valid == r.v, "out_valid follows in_valid by two cycles");
      for (int j = 0; j < N; j++)
        check(grant[j] == (r.v ? g[j] : '0), "grant row");
      for (int o = 0; o < N; o++) begin
        bit any;
        int src;
        any = 0; src = 0;
        for (int j = 0; j < N; j++) if (r.v && g[j][o]) begin any = 1; src = j; end
        check(cfg_valid[o] == any, "configuration valid");
        if (any) check(cfg_src[o] == IW'(src), "configuration source");
      end
      check(avail_out == av, "remaining available");
      if (hist.size() > 4) void'(hist.pop_front());
    end
  end

  initial begin
    in_valid = 0; avail_in = '1;
    for (int j = 0; j < N; j++) req[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // random phase
    for (int c = 0; c < 3000; c++) begin
      in_valid = ($urandom_range(0, 9) != 0);
      avail_in = ($urandom_range(0, 3) == 0) ? N'($urandom) : '1;
      for (int j = 0; j < N; j++) req[j] = N'($urandom) & N'($urandom);
      @(negedge clk);
    end
    // fairness phase: every PE wants destination 2
    in_valid = 1; avail_in = '1;
    for (int j = 0; j < N; j++) req[j] = N'(1 << 2);
    repeat (2) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) if (grant[j][2]) fair_hits[j]++;
    end
    for (int j = 0; j < N; j++) check(fair_hits[j] == 1, "round robin gives each PE one turn in N cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
