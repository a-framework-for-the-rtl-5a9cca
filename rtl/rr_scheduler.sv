// Scheduler: crossbar arbiter for N ports with rotating round-robin priority.
//
// Request[j] is an N-bit vector: bit i set means port (PE) j has data for
// destination i. The core is N levels of simple logic evaluated in one cycle.
// Each level owns one PE j and takes the vector of still Available
// destinations: it ANDs Available with Request[j], selects one of the bits
// left, sets that bit alone in Grant[j], clears it in Available and passes
// Available on to the next level. So every PE gets at most one of the
// destinations it asked for and every destination is given at most once.
// Levels are visited starting at PE `ptr` and wrapping round; `ptr` advances
// by one with every schedule computed (every cycle with in_valid set), which
// rotates the priority and keeps the schedule fair.
// The resulting crossbar Configuration gives, for every output, whether it is
// connected and to which input.
//
// Timing: requests are registered on entry and results are registered on exit,
// so a schedule appears LATENCY = 2 cycles after its requests (in_valid is
// carried along as out_valid). One schedule can start every cycle.
//
// The level structure, the Available/Request/Grant vectors and the rotating
// PE priority follow the described scheduler, as does the two-cycle latency.
// Which of several free destinations a level takes is this design's choice:
// the first one at or after `ptr`, so destination priority rotates as well.
// avail_in lets a caller withhold destinations (all ones for a plain
// crossbar schedule).
module rr_scheduler #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0]         req      [N],  // req[j][i]: PE j asks for destination i
  input  logic [N-1:0]         avail_in,      // destinations that may be granted
  output logic                 out_valid,
  output logic [N-1:0]         grant    [N],  // one-hot (or zero) per PE
  output logic [N-1:0]         cfg_valid,     // per output: connected
  output logic [$clog2(N)-1:0] cfg_src  [N],  // per output: input it is connected to
  output logic [N-1:0]         avail_out      // destinations left unscheduled
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr, ptr_r;
  logic          v_r;
  logic [N-1:0]  req_r [N];
  logic [N-1:0]  avail_r;

  logic [N-1:0]  g_c [N];
  logic [N-1:0]  av_c;
  logic [N-1:0]  cv_c;
  logic [IW-1:0] cs_c [N];

  // rotate right / left by r positions within N bits
  function automatic logic [N-1:0] rotr(input logic [N-1:0] v, input logic [IW-1:0] r);
    logic [2*N-1:0] t;
    t = {v, v} >> r;
    return t[N-1:0];
  endfunction
  function automatic logic [N-1:0] rotl(input logic [N-1:0] v, input logic [IW-1:0] r);
    logic [2*N-1:0] t;
    t = {v, v} << r;
    return t[2*N-1:N];
  endfunction

  // stage 1: register the requests
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr     <= '0;
      ptr_r   <= '0;
      v_r     <= 1'b0;
      avail_r <= '0;
      for (int j = 0; j < N; j++) req_r[j] <= '0;
    end else begin
      if (in_valid) ptr <= (ptr == IW'(N - 1)) ? '0 : ptr + 1'b1;
      ptr_r   <= ptr;
      v_r     <= in_valid;
      avail_r <= avail_in;
      for (int j = 0; j < N; j++) req_r[j] <= req[j];
    end
  end

  // the N levels; level k serves PE (ptr + k) mod N
  logic [N-1:0] g_lvl [N];

  function automatic logic [IW-1:0] wrap_add(input logic [IW-1:0] a, input int unsigned b);
    logic [IW:0] s;
    s = {1'b0, a} + (IW+1)'(b);
    return (s >= (IW+1)'(N)) ? IW'(s - (IW+1)'(N)) : IW'(s);
  endfunction

  always_comb begin
    logic [N-1:0] cand, rot;
    av_c = avail_r;
    for (int k = 0; k < N; k++) begin
      cand     = av_c & req_r[wrap_add(ptr_r, k)];
      rot      = rotr(cand, ptr_r);
      g_lvl[k] = rotl(rot & (~rot + 1'b1), ptr_r);   // first set bit at or after ptr
      av_c     = av_c & ~g_lvl[k];
    end
  end

  // back from levels to PEs, and the per-output configuration
  always_comb begin
    for (int p = 0; p < N; p++)
      g_c[p] = g_lvl[wrap_add(IW'(p), N - 32'(ptr_r))];
    for (int o = 0; o < N; o++) begin
      cv_c[o] = 1'b0;
      cs_c[o] = '0;
      for (int p = 0; p < N; p++) begin
        if (g_c[p][o]) begin
          cv_c[o] = 1'b1;
          cs_c[o] = IW'(p);
        end
      end
    end
  end

  // stage 2: register the schedule
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cfg_valid <= '0;
      avail_out <= '0;
      for (int j = 0; j < N; j++) begin
        grant[j]   <= '0;
        cfg_src[j] <= '0;
      end
    end else begin
      out_valid <= v_r;
      cfg_valid <= v_r ? cv_c : '0;
      avail_out <= av_c;
      for (int j = 0; j < N; j++) begin
        grant[j]   <= v_r ? g_c[j] : '0;
        cfg_src[j] <= cs_c[j];
      end
    end
  end
endmodule
