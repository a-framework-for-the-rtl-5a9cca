// Input-buffered wormhole switch for N ports.
//
// Each input port has an N-Queue with one W-word sub-queue per destination.
// Arriving words are pushed into the sub-queue of their worm's destination
// (taken from the header word and kept until the tail). The Empty vectors of
// all N-Queues form the Scheduler's requests, so any input can send to any
// destination it holds data for, out of order across destinations, without
// head-of-line blocking. Every cycle the Scheduler allocates the outputs; a
// grant for input i and destination o pulls one word from sub-queue o of
// input i and routes it through the crossbar Switch Fabric to output o, and a
// credit for o goes back to the NIC of input i.
//
// Worms do not interleave at an output: once a header has been pulled for
// output o, o belongs to that input until its tail word has been pulled.
// Other inputs' requests for o are masked, and, since the Scheduler answers
// two cycles late, a grant that conflicts with the current owner is dropped
// when it arrives. Inputs are free to alternate between worms for different
// outputs from cycle to cycle.
//
// Timing: a word arriving at an idle switch is pushed in cycle t, requested
// in t+1, granted in t+3 (two-cycle Scheduler), read in t+4, crosses the
// internal wire (L_SW_WIRE cycles) and leaves the fabric one cycle after
// that. Throughput is one word per cycle per input and per output.
// The component structure follows the described switch; the output ownership
// rule, the credit return and the dropping of stale grants are this design's.
module wh_switch
  import mpnet_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = 16,
  parameter int unsigned L_SW_WIRE = 0     // N-Queue to fabric wire, cycles
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  flit_t                in_link      [N],
  output logic [N-1:0]         credit_valid,
  output logic [$clog2(N)-1:0] credit_dest  [N],
  output flit_t                out_link     [N],
  // event counts for observation
  output logic                 ev_grant_dropped   // a stale grant was dropped
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned QD = 2 + WORD_W;

  logic [IW-1:0]  in_dest   [N];   // destination of the worm being received
  logic [IW-1:0]  push_dest [N];
  logic [N-1:0]   q_full    [N];
  logic [N-1:0]   q_empty   [N];
  logic [QD-1:0]  q_out     [N];
  logic [N-1:0]   q_out_v;
  logic [N-1:0]   pull;
  logic [IW-1:0]  pull_src  [N];

  logic [N-1:0]   req       [N];
  logic [N-1:0]   grant     [N];
  logic           s_valid;
  logic [N-1:0]   s_cfg_v;
  logic [IW-1:0]  s_cfg_s   [N];
  logic [N-1:0]   s_avail;

  // output ownership
  logic [N-1:0]   own_v;                // registered owner of each output
  logic [IW-1:0]  own_s     [N];
  logic [N-1:0]   fly_v;                // a word was pulled for this output last cycle
  logic [IW-1:0]  fly_s     [N];
  logic [N-1:0]   eff_v;                // owner once the word in flight is seen
  logic [IW-1:0]  eff_s     [N];
  logic [N-1:0]   take_v;               // output used this cycle
  logic [IW-1:0]  take_s    [N];
  logic [N-1:0]   dropped;

  // ---------------- input buffers ----------------
  for (genvar i = 0; i < N; i++) begin : g_in
    assign push_dest[i] = (in_link[i].kind == FL_HEAD) ? in_link[i].data[IW-1:0] : in_dest[i];

    always_ff @(posedge clk) begin
      if (!rst_n) in_dest[i] <= '0;
      else if (in_link[i].valid && in_link[i].kind == FL_HEAD) in_dest[i] <= push_dest[i];
    end

    n_queue #(.N(N), .W(W), .WIDTH(QD)) u_nq (
      .clk, .rst_n,
      .push(in_link[i].valid), .dest(push_dest[i]), .data_in({in_link[i].kind, in_link[i].data}),
      .pull(pull[i]), .src(pull_src[i]), .data_out(q_out[i]), .data_out_valid(q_out_v[i]),
      .full(q_full[i]), .empty(q_empty[i]));
  end

  // ---------------- ownership of outputs ----------------
  always_comb begin
    for (int o = 0; o < N; o++) begin
      eff_v[o] = own_v[o];
      eff_s[o] = own_s[o];
      if (fly_v[o]) begin
        eff_s[o] = fly_s[o];
        eff_v[o] = (flit_kind_e'(q_out[fly_s[o]][QD-1 -: 2]) != FL_TAIL);
      end
    end
  end

  // requests, masked by the registered owner
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int o = 0; o < N; o++)
        req[i][o] = !q_empty[i][o] && (!own_v[o] || own_s[o] == IW'(i));
  end

  rr_scheduler #(.N(N)) u_sched (
    .clk, .rst_n, .in_valid(1'b1), .req, .avail_in('1),
    .out_valid(s_valid), .grant, .cfg_valid(s_cfg_v), .cfg_src(s_cfg_s), .avail_out(s_avail));

  // apply the grants that are still good
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pull[i]     = 1'b0;
      pull_src[i] = '0;
    end
    for (int o = 0; o < N; o++) begin
      take_v[o]  = 1'b0;
      take_s[o]  = s_cfg_s[o];
      dropped[o] = 1'b0;
      if (s_valid && s_cfg_v[o]) begin
        if (!q_empty[s_cfg_s[o]][o] && (!eff_v[o] || eff_s[o] == s_cfg_s[o])) begin
          take_v[o]            = 1'b1;
          pull[s_cfg_s[o]]     = 1'b1;
          pull_src[s_cfg_s[o]] = IW'(o);
        end else if (!q_empty[s_cfg_s[o]][o]) begin
          dropped[o] = 1'b1;
        end
      end
    end
  end
  assign ev_grant_dropped = |dropped;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      own_v <= '0;
      fly_v <= '0;
      for (int o = 0; o < N; o++) begin
        own_s[o] <= '0;
        fly_s[o] <= '0;
      end
    end else begin
      for (int o = 0; o < N; o++) begin
        own_v[o] <= eff_v[o] || take_v[o];
        own_s[o] <= take_v[o] ? take_s[o] : eff_s[o];
        fly_v[o] <= take_v[o];
        fly_s[o] <= take_s[o];
      end
    end
  end

  // credits back to the NICs
  always_comb begin
    for (int i = 0; i < N; i++) begin
      credit_valid[i] = pull[i];
      credit_dest[i]  = pull_src[i];
    end
  end

  // ---------------- N-Queue to fabric, fabric ----------------
  logic [FLIT_W-1:0]  fab_in   [N];
  logic [FLIT_W-1:0]  fab_out  [N];
  logic [IW+1-1:0]    cfg_now  [N];
  logic [IW+1-1:0]    cfg_del  [N];
  logic [N-1:0]       f_cfg_v;
  logic [IW-1:0]      f_cfg_s  [N];

  for (genvar i = 0; i < N; i++) begin : g_sw_wire
    wire_delay #(.WIDTH(FLIT_W), .LATENCY(L_SW_WIRE)) u_w (
      .clk, .rst_n,
      .d({q_out_v[i], q_out[i]}),
      .q(fab_in[i]));
  end

  // the configuration follows the data: one cycle of N-Queue read plus the wire
  for (genvar o = 0; o < N; o++) begin : g_cfg
    assign cfg_now[o] = {take_v[o], take_s[o]};
    wire_delay #(.WIDTH(IW + 1), .LATENCY(1 + L_SW_WIRE)) u_cd (
      .clk, .rst_n, .d(cfg_now[o]), .q(cfg_del[o]));
    assign f_cfg_v[o] = cfg_del[o][IW];
    assign f_cfg_s[o] = cfg_del[o][IW-1:0];
    assign out_link[o] = flit_t'(fab_out[o]);
  end

  switch_fabric #(.N(N), .WIDTH(FLIT_W)) u_fabric (
    .clk, .rst_n, .cfg_valid(f_cfg_v), .cfg_src(f_cfg_s), .in_data(fab_in), .out_data(fab_out));

  for (genvar i = 0; i < N; i++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      in_link[i].valid |-> !q_full[i][push_dest[i]]);
  end
endmodule
