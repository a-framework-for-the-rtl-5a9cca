// Serial-to-Parallel converter: watches the one-bit line for a start bit,
// shifts in the following WIDTH bits (least significant first) and presents
// the word with a one-cycle out_valid pulse once the last bit is in. Its
// latency is the WIDTH bit times it must wait for. Framing matches
// par_to_ser; it is this design's choice.
module ser_to_par #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ser,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);
  logic [WIDTH-1:0]             sh;
  logic [$clog2(WIDTH+1)-1:0]   cnt;   // data bits still expected
  logic                         busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh        <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (ser) begin
          busy <= 1'b1;
          cnt  <= ($clog2(WIDTH+1))'(WIDTH);
        end
      end else begin
        sh  <= {ser, sh[WIDTH-1:1]};
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= {ser, sh[WIDTH-1:1]};
        end
      end
    end
  end
endmodule
