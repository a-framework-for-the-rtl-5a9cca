// Testbench for ps_controller (N = 4, K = 4). Loads a table with the four
// shift settings (entry k connects input i to output (i + k) mod 4) and
// checks that: a new communication cycle starts every slot_len cycles; the
// entries rotate round robin over 0 .. num_cfg-1 without being requested;
// grants and configuration equal the current entry; changing slot_len and
// num_cfg takes effect; an entry with unconnected inputs gives no grant; and
// with dyn_mode set the setting is the round-robin Scheduler's answer to the
// requests, held for a whole communication cycle.
module tb_ps_controller;
  localparam int N = 4, K = 4;
  localparam int IW = $clog2(N), KW = $clog2(K);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req [N];
  logic dyn_mode, tbl_we, tbl_valid, ev_slot;
  logic [$clog2(K+1)-1:0] num_cfg;
  logic [15:0] slot_len;
  logic [KW-1:0] tbl_row, cur_entry;
  logic [IW-1:0] tbl_col, tbl_dest;
  logic [N-1:0] grant_valid, cfg_valid;
  logic [IW-1:0] grant_dest [N], cfg_src [N];
  int checks = 0, failures = 0;
  int tbl [K][N];
  bit tbl_v [K][N];

  ps_controller #(.N(N), .K(K), .SLOT_W(16)) dut (.clk, .rst_n, .req, .dyn_mode, .num_cfg, .slot_len,
    .tbl_we, .tbl_row, .tbl_col, .tbl_valid, .tbl_dest, .grant_valid, .grant_dest, .cfg_valid,
    .cfg_src, .cur_entry, .ev_slot);

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

  task automatic check_entry(input int e);
    check(int'(cur_entry) == e, "current entry");
    for (int i = 0; i < N; i++) begin
      check(grant_valid[i] == tbl_v[e][i], "grant valid from table");
      if (tbl_v[e][i]) begin
        check(grant_dest[i] == IW'(tbl[e][i]), "grant destination from table");
        check(cfg_valid[tbl[e][i]] && cfg_src[tbl[e][i]] == IW'(i), "configuration from table");
      end
    end
  endtask

  // runs for `slots` communication cycles and checks the rotation
  task automatic run_slots(input int slots, input int len, input int ncfg);
    int e;
    // align to the start of a communication cycle
    @(negedge clk);
    while (!ev_slot) @(negedge clk);
    @(negedge clk);
    e = int'(cur_entry);
    for (int s = 0; s < slots; s++) begin
      for (int c = 0; c < len; c++) begin
        check_entry(e);
        check(ev_slot == (c == len - 1), "slot length");
        @(negedge clk);
      end
      e = (e + 1) % ncfg;
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) req[i] = '0;
    dyn_mode = 0; num_cfg = 1; slot_len = 10; tbl_we = 0; tbl_row = 0; tbl_col = 0; tbl_valid = 0; tbl_dest = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) begin
        tbl[k][i] = (i + k) % N;
        tbl_v[k][i] = !(k == 3 && i == 2);   // one unconnected input
        tbl_we = 1; tbl_row = KW'(k); tbl_col = IW'(i); tbl_valid = tbl_v[k][i]; tbl_dest = IW'(tbl[k][i]);
        @(negedge clk);
      end
    tbl_we = 0;
    num_cfg = K;
    run_slots(9, 10, K);
    slot_len = 3;
    run_slots(6, 3, K);
    num_cfg = 2;
    repeat (12) @(negedge clk);
    run_slots(5, 3, 2);
    // dynamic mode: requests i -> (i + 2) mod N are not in entries 0..1
    for (int i = 0; i < N; i++) req[i] = N'(1 << ((i + 2) % N));
    dyn_mode = 1;
    slot_len = 6;
    repeat (20) @(negedge clk);
    while (!ev_slot) @(negedge clk);
    @(negedge clk);
    for (int c = 0; c < 6; c++) begin
      for (int i = 0; i < N; i++)
        check(grant_valid[i] && grant_dest[i] == IW'((i + 2) % N), "dynamic setting follows requests");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
