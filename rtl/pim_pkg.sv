// pim_pkg: constants shared by the PACE1750A processor interface module.
//
// Holds the bus width, the IO addresses of the two IO devices (BMU and AOCE),
// the number of address bits after MMU expansion, and the wait-state select
// type. The IO addresses 002Dh and 0100h and the bus width follow the
// design description; the enum encoding is this design's choice.
package pim_pkg;
  localparam int unsigned BUS_W  = 16;   // multiplexed AD bus width

  localparam logic [15:0] BMU_IO_ADDR  = 16'h002D;
  localparam logic [15:0] AOCE_IO_ADDR = 16'h0100;

  // Two-bit wait-state select: zero to three wait states.
  typedef logic [1:0] wsel_t;

  // Which kind of access the wait-state logic is timing.
  typedef enum logic [1:0] {
    ACC_IO   = 2'd0,
    ACC_PROM = 2'd1,
    ACC_RAM  = 2'd2,
    ACC_1553 = 2'd3
  } access_e;
endpackage
