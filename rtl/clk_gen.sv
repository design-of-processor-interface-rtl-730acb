// clk_gen: divides the 24 MHz board clock by two to give 12 MHz.
//
// One D flip-flop toggles on every rising edge of clk_24m: its inverted output
// is fed back to its D input, so clk_12m has half the input frequency and a
// 50 % duty cycle. rst is an asynchronous active-high clear that holds
// clk_12m low. The structure (flip-flop with an inverter from Q to D, clear
// pin) follows the design description; the clear polarity is this design's
// choice.
//
// Timing: clk_12m changes one clock-to-Q delay after each rising edge of
// clk_24m; its first rising edge follows the first clk_24m rising edge after
// rst falls.
module clk_gen (
  input  logic clk_24m,
  input  logic rst,
  output logic clk_12m
);
  always_ff @(posedge clk_24m or posedge rst) begin
    if (rst) clk_12m <= 1'b0;
    else     clk_12m <= ~clk_12m;
  end
endmodule
