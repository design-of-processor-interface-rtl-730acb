// io_dec: IO address decoder for the BMU and AOCE IO devices.
//
// In an IO cycle (mbion=0) with the IO strobe iodis_n low, the decoder
// compares the 16-bit IO address with one device address chosen by sel:
//   sel=0: iocs_n[0] (BMU) low when addr = BMU_ADDR (002Dh)
//   sel=1: iocs_n[1] (AOCE) low when addr = AOCE_ADDR (0100h)
// The addresses and the sel rule follow the design description; the two-bit
// output vector and the strobe polarities are this design's choices.
//
// Purely combinational.
module io_dec #(
  parameter logic [15:0] BMU_ADDR  = pim_pkg::BMU_IO_ADDR,
  parameter logic [15:0] AOCE_ADDR = pim_pkg::AOCE_IO_ADDR
) (
  input  logic [15:0] addr,
  input  logic        iodis_n,
  input  logic        mbion,
  input  logic        sel,
  output logic [1:0]  iocs_n
);
  logic io_cycle;
  assign io_cycle = !mbion && !iodis_n;

  always_comb begin
    iocs_n = 2'b11;
    if (io_cycle) begin
      if (!sel && addr == BMU_ADDR)  iocs_n[0] = 1'b0;
      if ( sel && addr == AOCE_ADDR) iocs_n[1] = 1'b0;
    end
  end
endmodule
