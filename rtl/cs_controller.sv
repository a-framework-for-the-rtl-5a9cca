// Central controller of the circuit switch.
//
// It keeps the circuits that are established: for every input the output it
// is connected to, and for every output whether it is taken. Requests that
// can still be served (from inputs without a circuit, for outputs that are
// free) go to the round-robin Scheduler; when its answer comes back
// (two cycles later) every granted pair becomes a circuit, and the next
// scheduling round starts in the same cycle, so a round takes two cycles. A
// circuit is kept while the NIC still requests that destination, that is
// until its NIC sub-queue for that destination is empty, and is then torn
// down, freeing both ends. The circuits are presented as a grant per input
// (to the NICs) and as a crossbar configuration per output (to the fabric).
//
// The request/grant/hold-until-empty behaviour follows the described circuit
// switch; the two-cycle rounds and the state encoding are this design's.
module cs_controller #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req         [N],
  output logic [N-1:0]         grant_valid,
  output logic [$clog2(N)-1:0] grant_dest  [N],
  output logic [N-1:0]         cfg_valid,
  output logic [$clog2(N)-1:0] cfg_src     [N],
  output logic                 ev_setup,    // a circuit was established
  output logic                 ev_teardown  // a circuit was released
);
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  busy_in;
  logic [IW-1:0] dst [N];
  logic [N-1:0]  busy_out;
  logic          pending, s_valid;
  logic [N-1:0]  s_req   [N];
  logic [N-1:0]  s_grant [N];
  logic [N-1:0]  s_cfg_v, s_avail;
  logic [IW-1:0] s_cfg_s [N];
  logic [N-1:0]  release_in;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      // inputs granted by the round ending now are masked as well
      s_req[i]      = (busy_in[i] || (s_valid && |s_grant[i])) ? '0 : req[i];
      release_in[i] = busy_in[i] && !req[i][dst[i]];
    end
  end

  rr_scheduler #(.N(N)) u_sched (
    .clk, .rst_n, .in_valid(!pending || s_valid), .req(s_req), .avail_in(~(busy_out | (s_valid ? s_cfg_v : '0))),
    .out_valid(s_valid), .grant(s_grant), .cfg_valid(s_cfg_v), .cfg_src(s_cfg_s),
    .avail_out(s_avail));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      busy_in  <= '0;
      busy_out <= '0;
      for (int i = 0; i < N; i++) dst[i] <= '0;
    end else begin
      // a new round starts whenever none is in flight or one ends now
      pending <= 1'b1;
      for (int i = 0; i < N; i++) begin
        if (release_in[i]) begin
          busy_in[i]       <= 1'b0;
          busy_out[dst[i]] <= 1'b0;
        end
      end
      if (s_valid) begin
        for (int o = 0; o < N; o++) begin
          if (s_cfg_v[o]) begin
            busy_in[s_cfg_s[o]] <= 1'b1;
            dst[s_cfg_s[o]]     <= IW'(o);
            busy_out[o]         <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      grant_valid[i] = busy_in[i];
      grant_dest[i]  = dst[i];
    end
    for (int o = 0; o < N; o++) begin
      cfg_valid[o] = 1'b0;
      cfg_src[o]   = '0;
      for (int i = 0; i < N; i++) begin
        if (busy_in[i] && dst[i] == IW'(o)) begin
          cfg_valid[o] = 1'b1;
          cfg_src[o]   = IW'(i);
        end
      end
    end
  end

  assign ev_setup    = s_valid && (|s_cfg_v);
  assign ev_teardown = |release_in;
endmodule
