// Parallel Wire Delay: a cable or on-chip bus modelled as a pipeline of
// LATENCY register stages clocked at the cable clock. Every cycle one word
// enters and the word that entered LATENCY cycles earlier leaves, so the
// bandwidth is one word per cycle and the latency is LATENCY cycles. With
// LATENCY = 0 the wire is a plain connection. The default of one cycle is a
// 10 ns cable at a 100 MHz cable clock (about ten feet); a 100 ns cable is
// LATENCY = 10. The register pipeline is this design's way of giving the
// cable its latency and bandwidth.
module wire_delay #(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned LATENCY = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (LATENCY == 0) begin : g_direct
    assign q = d;
  end else begin : g_pipe
    logic [WIDTH-1:0] stage [LATENCY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < LATENCY; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < LATENCY; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[LATENCY-1];
  end
endmodule
