// Parallel-to-Serial converter: loads one WIDTH-bit word and sends it on a
// one-bit line, clocked by the serial clock. A word is framed by a start bit
// of 1, followed by its WIDTH bits, least significant first; the idle line is
// 0. in_ready is high while the converter can take a word, so it sends one
// word every WIDTH+1 serial cycles. The start-bit framing and the bit order
// are this design's choices; the described component only fixes that
// conversion costs the word time at the parallel clock.
module par_to_ser #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  output logic             ser
);
  logic [WIDTH:0]         sh;     // start bit and data
  logic [$clog2(WIDTH+2)-1:0] left;   // bits still to send

  assign in_ready = (left == '0);
  assign ser      = sh[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (in_ready && in_valid) begin
      sh   <= {in_data, 1'b1};
      left <= ($clog2(WIDTH+2))'(WIDTH);   // start bit goes out now, WIDTH more follow
    end else if (left != '0) begin
      sh   <= sh >> 1;
      left <= left - 1'b1;
    end else begin
      sh   <= '0;
    end
  end
endmodule
