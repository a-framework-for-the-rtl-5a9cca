// Switch Fabric: an N x N crossbar with a Configuration register.
//
// The Configuration gives, for every output o, a valid bit and the input that
// drives it. The fabric registers its outputs, so a word presented on input
// cfg_src[o] appears on output o one cycle later (fabric latency of one
// cycle); an unconnected output carries an invalid (all-zero) word. The
// fabric holds no buffers and does not inspect the data. A crossbar is the
// fabric the described networks use; the register at the output is how this
// design gives it its one-cycle latency. A real fabric may be LVDS or optical;
// this is its digital behaviour.
module switch_fabric #(
  parameter int unsigned N     = 32,
  parameter int unsigned WIDTH = 67
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         cfg_valid,
  input  logic [$clog2(N)-1:0] cfg_src [N],
  input  logic [WIDTH-1:0]     in_data [N],
  output logic [WIDTH-1:0]     out_data [N]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < N; o++) out_data[o] <= '0;
    end else begin
      for (int o = 0; o < N; o++)
        out_data[o] <= cfg_valid[o] ? in_data[cfg_src[o]] : '0;
    end
  end
endmodule
