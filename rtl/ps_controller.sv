// Controller of the predictive circuit switch.
//
// A Predictive Configuration table of K entries holds switch settings worked
// out ahead of time (by the compiler or the user): entry k gives, for every
// input, whether it is connected and to which output. Time is divided into
// communication cycles of slot_len clock cycles. At the start of each one the
// controller moves to the next entry, round robin over entries
// 0 .. num_cfg-1, and the circuits of that entry hold for the whole
// communication cycle without being requested. A MUX chooses between the
// table and the round-robin Scheduler: with dyn_mode set, the setting for the
// next communication cycle is instead the Scheduler's answer to the NICs'
// current requests. The table is loaded one cell per cycle through the
// tbl_* port. Grants go to the NICs and the crossbar configuration to the
// fabric, exactly as in the circuit switch.
//
// Timing: a new setting becomes visible in the cycle after the last cycle of
// a communication cycle; a table write is visible from the next cycle.
// The table, its round-robin rotation without preemption and the MUX follow
// the described predictive switch. The table layout (per input), the load
// port, the run-time slot length and entry count are this design's choices;
// every entry must connect each output to at most one input.
module ps_controller #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 32,   // table entries
  parameter int unsigned SLOT_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          req        [N],
  input  logic                  dyn_mode,
  input  logic [$clog2(K+1)-1:0] num_cfg,   // entries in the rotation, 1..K
  input  logic [SLOT_W-1:0]     slot_len,   // clock cycles per communication cycle, >= 1
  // table load port
  input  logic                  tbl_we,
  input  logic [$clog2(K)-1:0]  tbl_row,
  input  logic [$clog2(N)-1:0]  tbl_col,    // input port
  input  logic                  tbl_valid,
  input  logic [$clog2(N)-1:0]  tbl_dest,   // output port
  // current setting
  output logic [N-1:0]          grant_valid,
  output logic [$clog2(N)-1:0]  grant_dest [N],
  output logic [N-1:0]          cfg_valid,
  output logic [$clog2(N)-1:0]  cfg_src    [N],
  output logic [$clog2(K)-1:0]  cur_entry,
  output logic                  ev_slot     // a new communication cycle starts next cycle
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned KW = $clog2(K);

  logic [IW:0]       table_q [K][N];   // {valid, dest}
  logic [SLOT_W-1:0] slot_cnt;
  logic [KW-1:0]     next_entry;
  logic              s_valid;
  logic [N-1:0]      s_grant [N];
  logic [N-1:0]      s_cfg_v, s_avail;
  logic [IW-1:0]     s_cfg_s [N];
  logic [N-1:0]      cur_v;
  logic [IW-1:0]     cur_d [N];

  rr_scheduler #(.N(N)) u_sched (
    .clk, .rst_n, .in_valid(1'b1), .req, .avail_in('1),
    .out_valid(s_valid), .grant(s_grant), .cfg_valid(s_cfg_v), .cfg_src(s_cfg_s),
    .avail_out(s_avail));

  assign ev_slot    = (slot_cnt + 1'b1 >= slot_len);
  assign next_entry = (32'(cur_entry) + 1 >= 32'(num_cfg)) ? '0 : cur_entry + 1'b1;

  always_ff @(posedge clk) begin
    if (tbl_we) table_q[tbl_row][tbl_col] <= {tbl_valid, tbl_dest};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_cnt  <= '0;
      cur_entry <= '0;
      cur_v     <= '0;
      for (int i = 0; i < N; i++) cur_d[i] <= '0;
    end else if (ev_slot) begin
      slot_cnt <= '0;
      if (dyn_mode) begin
        // MUX: the Scheduler's setting for the next communication cycle
        for (int o = 0; o < N; o++) begin
          cur_v[o] <= 1'b0;
        end
        for (int o = 0; o < N; o++) begin
          if (s_valid && s_cfg_v[o]) begin
            cur_v[s_cfg_s[o]] <= 1'b1;
            cur_d[s_cfg_s[o]] <= IW'(o);
          end
        end
      end else begin
        // MUX: the next predicted setting
        cur_entry <= next_entry;
        for (int i = 0; i < N; i++) begin
          cur_v[i] <= table_q[next_entry][i][IW];
          cur_d[i] <= table_q[next_entry][i][IW-1:0];
        end
      end
    end else begin
      slot_cnt <= slot_cnt + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      grant_valid[i] = cur_v[i];
      grant_dest[i]  = cur_d[i];
    end
    for (int o = 0; o < N; o++) begin
      cfg_valid[o] = 1'b0;
      cfg_src[o]   = '0;
      for (int i = 0; i < N; i++) begin
        if (cur_v[i] && cur_d[i] == IW'(o)) begin
          cfg_valid[o] = 1'b1;
          cfg_src[o]   = IW'(i);
        end
      end
    end
  end

  // a setting connects each output to at most one input
  for (genvar o = 0; o < N; o++) begin : g_chk
    logic [N-1:0] hit;
    for (genvar i = 0; i < N; i++) begin : g_hit
      assign hit[i] = cur_v[i] && cur_d[i] == IW'(o);
    end
    a_permutation: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit));
  end
endmodule
