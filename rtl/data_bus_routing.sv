// data_bus_routing: selects the word returned to the processor on reads.
//
// Each read source comes with its active-low select. The configuration latch
// (conf_oe) has the highest priority, then the PROM banks, the RAM banks
// (data already corrected by the EDAC), the 1553 chip and the IO devices.
// With no source selected the result is 0. rd_valid is high when some source
// is selected. The design description only names a data bus routing block;
// the priority order and the zero default are this design's choices.
//
// Purely combinational.
module data_bus_routing (
  input  logic        conf_oe,
  input  logic [15:0] conf_data,
  input  logic [3:0]  prom_cs_n,
  input  logic [15:0] prom_data,
  input  logic [3:0]  ram_cs_n,
  input  logic [15:0] ram_data,
  input  logic        cs1553_n,
  input  logic [15:0] data_1553,
  input  logic [1:0]  iocs_n,
  input  logic [15:0] io_data,
  output logic [15:0] rd_data,
  output logic        rd_valid
);
  always_comb begin
    rd_valid = 1'b1;
    if (conf_oe)              rd_data = conf_data;
    else if (!(&prom_cs_n))   rd_data = prom_data;
    else if (!(&ram_cs_n))    rd_data = ram_data;
    else if (!cs1553_n)       rd_data = data_1553;
    else if (!(&iocs_n))      rd_data = io_data;
    else begin
      rd_data  = '0;
      rd_valid = 1'b0;
    end
  end
endmodule
