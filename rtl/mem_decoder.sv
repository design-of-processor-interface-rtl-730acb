// mem_decoder: memory address bus selection and memory decoding.
//
// When memory expansion through the MMU is on (mmu_en=1) the 20-bit address
// from the MMU latch is used; otherwise the 16-bit processor address with
// zero page bits. The selected address goes to the PROM decoder (all 20 bits)
// and the RAM decoder (bits 19..12). ram_sel is high while any RAM bank is
// selected and tells the wait-state logic to add the EDAC wait state.
// The address selection follows the design description; ram_sel and the
// zero page bits without the MMU are this design's choices.
//
// Purely combinational.
module mem_decoder (
  input  logic        mmu_en,
  input  logic [19:0] mmua_addr,
  input  logic [15:0] cpu_addr,
  input  logic        ext_ram_en,
  input  logic        mbion,
  input  logic        npu,
  output logic [19:0] mem_addr,
  output logic [3:0]  prom_cs_n,
  output logic [3:0]  ram_cs_n,
  output logic        cs1553_n,
  output logic        ram_sel
);
  assign mem_addr = mmu_en ? mmua_addr : {4'h0, cpu_addr};

  prom_decoder u_prom (
    .addr_in (mem_addr),
    .mbion   (mbion),
    .npu     (npu),
    .cs_n    (prom_cs_n)
  );

  ram_decoder u_ram (
    .a          (mem_addr[19:12]),
    .ext_ram_en (ext_ram_en),
    .mbion      (mbion),
    .npu        (npu),
    .cs_n       (ram_cs_n),
    .cs1553_n   (cs1553_n)
  );

  assign ram_sel = ~&ram_cs_n;
endmodule
