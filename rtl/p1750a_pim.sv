// p1750a_pim: processor interface module for the PACE1750A (MIL-STD-1750A).
//
// Connects the processor's multiplexed 16-bit bus to PROM, EDAC-protected
// RAM, a MIL-STD-1553 protocol chip, two IO devices (BMU and AOCE) and the
// system configuration latch.
//
//  * addr_data_demux latches the address (ia) in the address phase and the
//    write data (id) in the data phase, and drives read data back.
//  * latch_mmu forms a 20-bit address from the MMU's page lines and ia[11:0];
//    mem_decoder picks it or ia (mmu_en) and decodes PROM, RAM and 1553
//    chip selects; io_dec decodes the two IO device addresses.
//  * wait_st_logic counts the selected wait states per access type (plus one
//    for the EDAC on RAM) and answers the processor through rdyd; it also
//    gives the memory and IO strobes.
//  * edac_inf adds check bits to RAM writes and corrects RAM reads;
//    data_bus_routing picks the word returned on a read.
//  * io_port latches the low six bits of an IO write; config_word is read by
//    conf_n; inf_1553 gives the 1553 chip its strobes; clk_gen divides the
//    24 MHz board clock to 12 MHz for slower peripherals.
//
// Bus conventions: strba/strbd are active high, the rest of the control
// lines follow the names (_n is active low); m_ion is high for memory
// cycles. A bus cycle is: strba with the address, then strbd; the cycle ends
// on the pclk edge where strbd and rdyd are both high. rdya, the
// address-phase ready, comes from outside.
//
// The list of blocks and their connections follow the design description;
// the port naming, the split of the bidirectional AD bus into ad_i/ad_o/ad_oe
// and the glue that qualifies io_port and the EDAC flags are this design's
// choices.
module p1750a_pim
  import pim_pkg::*;
(
  // processor bus
  input  logic        pclk,
  input  logic        por,
  input  logic        strba,
  input  logic        strbd,
  input  logic        rdya,
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic        m_ion,
  input  logic        npu,
  input  logic        conf_n,
  input  logic [15:0] ad_i,
  output logic [15:0] ad_o,
  output logic        ad_oe,
  output logic        rdyd,
  output logic        start_cycle,
  // straps
  input  wsel_t       iwsel,
  input  wsel_t       promwsel,
  input  wsel_t       ramwsel,
  input  logic        ext_ram_en,
  input  logic        io_sel,
  input  logic [15:0] cfg_in,
  // MMU
  input  logic        mmu_en,
  input  logic [7:0]  mmua,
  input  logic        mmu_strobe,
  // memories
  output logic [19:0] mem_addr,
  output logic [3:0]  prom_cs_n,
  output logic [3:0]  ram_cs_n,
  output logic        mwr_n,
  output logic        mrd_n,
  input  logic [15:0] prom_data,
  input  logic [15:0] ram_rdata,
  input  logic [5:0]  ram_rcheck,
  output logic [15:0] ram_wdata,
  output logic [5:0]  ram_wcheck,
  // EDAC flags
  input  logic        edac_flag_clr,
  output logic        edac_sec,
  output logic        edac_ded,
  output logic        edac_sec_flag,
  output logic        edac_ded_flag,
  // 1553 protocol chip
  output logic        cs1553_n,
  output logic        rd_1553_n,
  output logic        wr_1553_n,
  output logic        buf_1553_oe_n,
  output logic        busy_1553,
  input  logic        rdy_1553_n,
  input  logic [15:0] data_1553,
  // IO devices
  output logic [1:0]  iocs_n,
  output logic        iowr_n,
  input  logic [15:0] io_data,
  output logic [5:0]  io_out,
  // clocks
  input  logic        clk_24m,
  output logic        clk_12m,
  // latched bus values, for observation
  output logic [15:0] ia,
  output logic [15:0] id
);
  logic        ds_n;
  logic        cpu_rdy_n;
  logic [19:0] mmua_addr;
  logic        ram_sel;
  logic [15:0] rd_data;
  logic        rd_valid;
  logic [15:0] ram_cdata;
  logic [15:0] conf_data;
  logic        conf_oe;

  assign ds_n = !strbd;
  assign rdyd = !cpu_rdy_n;

  addr_data_demux #(.WIDTH(BUS_W)) u_demux (
    .pclk    (pclk),
    .por     (por),
    .strba   (strba),
    .strbd   (strbd),
    .rdya    (rdya),
    .rdyd    (rdyd),
    .rd_n    (rd_n),
    .ad_i    (ad_i),
    .ad_o    (ad_o),
    .ad_oe   (ad_oe),
    .rd_data (rd_data),
    .ia      (ia),
    .id      (id)
  );

  latch_mmu u_mmu (
    .mmu_strobe (mmu_strobe),
    .por        (por),
    .addr       (ia[11:0]),
    .mmua       (mmua),
    .mmua_addr  (mmua_addr)
  );

  mem_decoder u_memdec (
    .mmu_en     (mmu_en),
    .mmua_addr  (mmua_addr),
    .cpu_addr   (ia),
    .ext_ram_en (ext_ram_en),
    .mbion      (m_ion),
    .npu        (npu),
    .mem_addr   (mem_addr),
    .prom_cs_n  (prom_cs_n),
    .ram_cs_n   (ram_cs_n),
    .cs1553_n   (cs1553_n),
    .ram_sel    (ram_sel)
  );

  io_dec u_iodec (
    .addr    (ia),
    .iodis_n (ds_n),
    .mbion   (m_ion),
    .sel     (io_sel),
    .iocs_n  (iocs_n)
  );

  wait_st_logic u_wait (
    .pclk        (pclk),
    .por         (por),
    .iwsel       (iwsel),
    .promwsel    (promwsel),
    .ramwsel     (ramwsel),
    .m_ion       (m_ion),
    .ds_n        (ds_n),
    .wr_n        (wr_n),
    .rd_n        (rd_n),
    .rdy_1553_n  (rdy_1553_n),
    .ram_sel     (ram_sel),
    .cs_1553_n   (cs1553_n),
    .cpu_rdy_n   (cpu_rdy_n),
    .start_cycle (start_cycle),
    .mwr_n       (mwr_n),
    .mrd_n       (mrd_n),
    .iowr_n      (iowr_n)
  );

  assign ram_wdata = ad_i;

  edac_inf u_edac (
    .pclk       (pclk),
    .por        (por),
    .wdata      (ad_i),
    .wcheck     (ram_wcheck),
    .rdata      (ram_rdata),
    .rcheck     (ram_rcheck),
    .cdata      (ram_cdata),
    .single_err (edac_sec),
    .double_err (edac_ded),
    .rd_done    (ram_sel && !mrd_n && rdyd),
    .flag_clr   (edac_flag_clr),
    .sec_flag   (edac_sec_flag),
    .ded_flag   (edac_ded_flag)
  );

  config_word u_cfg (
    .por      (por),
    .cfg_in   (cfg_in),
    .conf_n   (conf_n),
    .data_out (conf_data),
    .data_oe  (conf_oe)
  );

  data_bus_routing u_route (
    .conf_oe   (conf_oe),
    .conf_data (conf_data),
    .prom_cs_n (prom_cs_n),
    .prom_data (prom_data),
    .ram_cs_n  (ram_cs_n),
    .ram_data  (ram_cdata),
    .cs1553_n  (cs1553_n),
    .data_1553 (data_1553),
    .iocs_n    (iocs_n),
    .io_data   (io_data),
    .rd_data   (rd_data),
    .rd_valid  (rd_valid)
  );

  inf_1553 u_1553 (
    .cs1553_n   (cs1553_n),
    .ds_n       (ds_n),
    .rd_n       (rd_n),
    .wr_n       (wr_n),
    .rdy_1553_n (rdy_1553_n),
    .rd_1553_n  (rd_1553_n),
    .wr_1553_n  (wr_1553_n),
    .buf_oe_n   (buf_1553_oe_n),
    .busy       (busy_1553)
  );

  io_port #(.WIDTH(6)) u_ioport (
    .clk      (pclk),
    .por      (por),
    .en       (!iowr_n && !(&iocs_n) && rdyd),
    .data_in  (ad_i[5:0]),
    .data_out (io_out)
  );

  clk_gen u_clk (
    .clk_24m (clk_24m),
    .rst     (por),
    .clk_12m (clk_12m)
  );

  // A processor read that completes must have had a source to read from.
  a_read_has_source: assert property (@(posedge pclk) disable iff (por)
    (strbd && !rd_n && rdyd) |-> rd_valid);
endmodule
