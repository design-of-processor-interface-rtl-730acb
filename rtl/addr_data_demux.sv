// addr_data_demux: splits the PACE1750A multiplexed AD bus.
//
// The processor puts an address on the 16-bit AD bus while STRBA is high and
// data while STRBD is high. On a rising edge of pclk the address register ia
// loads the bus when strba=1, strbd=0 and rdya=1; the data register id loads
// it when strba=0, strbd=1 and rdyd=1. During a processor read data phase
// (strbd=1, rd_n=0) the module drives rd_data onto the bus through ad_o with
// ad_oe high; the bidirectional bus is split into ad_i/ad_o/ad_oe so that the
// pad is left to the top level. por clears both registers.
//
// The load conditions follow the design description. Using RDYA for the
// address phase and RDYD for the data phase, the read-drive rule and the
// reset are this design's choices.
//
// Timing: ia and id are valid from the pclk edge on which the condition is
// sampled until the next such edge; ad_o/ad_oe are combinational.
module addr_data_demux #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             pclk,
  input  logic             por,
  input  logic             strba,
  input  logic             strbd,
  input  logic             rdya,
  input  logic             rdyd,
  input  logic             rd_n,
  input  logic [WIDTH-1:0] ad_i,
  output logic [WIDTH-1:0] ad_o,
  output logic             ad_oe,
  input  logic [WIDTH-1:0] rd_data,
  output logic [WIDTH-1:0] ia,
  output logic [WIDTH-1:0] id
);
  always_ff @(posedge pclk or posedge por) begin
    if (por) begin
      ia <= '0;
      id <= '0;
    end else begin
      if (strba && !strbd && rdya) ia <= ad_i;
      if (!strba && strbd && rdyd) id <= ad_i;
    end
  end

  assign ad_oe = strbd && !rd_n;
  assign ad_o  = rd_data;

  // The two strobes are never active together.
  a_strobes_exclusive: assert property (@(posedge pclk) disable iff (por) !(strba && strbd));
endmodule
