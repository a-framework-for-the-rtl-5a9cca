// Serial cable link: a Parallel-to-Serial converter, a High Speed Serial
// Cable and a Serial-to-Parallel converter in sequence, all on the serial
// clock. The cable is a one-bit wire_delay of CABLE_LAT serial cycles. A word
// accepted on the parallel input (in_valid && in_ready) appears on out_data
// with a one-cycle out_valid pulse WIDTH + 2 + CABLE_LAT serial cycles later,
// and a new word can be accepted every WIDTH + 1 serial cycles. The three
// stages follow the described cable models; framing and cycle counts are this
// design's.
module serial_link #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned CABLE_LAT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);
  logic ser_tx, ser_rx;

  par_to_ser #(.WIDTH(WIDTH)) u_p2s (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .ser(ser_tx));

  wire_delay #(.WIDTH(1), .LATENCY(CABLE_LAT)) u_cable (
    .clk, .rst_n, .d(ser_tx), .q(ser_rx));

  ser_to_par #(.WIDTH(WIDTH)) u_s2p (
    .clk, .rst_n, .ser(ser_rx), .out_valid, .out_data);
endmodule
