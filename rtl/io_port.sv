// io_port: IO data latch, a WIDTH-bit register with enable and clear.
//
// On a rising edge of clk, data_in is copied to data_out when en is high;
// otherwise data_out holds. por clears data_out asynchronously (active high).
// This is the design's "input output block": one D flip-flop per bit sharing
// a clock and a clear. The 6-bit width follows the description; the separate
// enable pin and the clear polarity are this design's choices.
//
// Timing: data_out changes at the clock edge on which en is sampled high.
module io_port #(
  parameter int unsigned WIDTH = 6
) (
  input  logic             clk,
  input  logic             por,
  input  logic             en,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);
  always_ff @(posedge clk or posedge por) begin
    if (por)     data_out <= '0;
    else if (en) data_out <= data_in;
  end
endmodule
