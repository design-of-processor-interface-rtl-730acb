// tb_p1750a_pim: end-to-end test of the processor interface module.
//
// The testbench plays the PACE1750A: each bus cycle puts the address on the
// AD bus with strba high for one clock, then raises strbd with write data (or
// reads) until rdyd is seen high on a rising pclk edge. Around the module sit
// small models: a PROM whose word is a fixed function of the 20-bit address,
// a RAM that stores the data and check word on each completed memory write
// (with a fault injector for one or two flipped bits), a 1553 chip that
// raises its ready after a programmable number of clocks, and two IO devices
// with fixed read words.
//
// Checked per cycle: the latched address, mem_addr (with and without the
// MMU), the chip selects, the returned data, and the number of wait clocks
// (selected waits, +1 for RAM, or the 1553 chip's delay). Counted mechanisms:
// IO/PROM/RAM wait states, the EDAC wait state, corrected single errors,
// detected double errors, 1553 ready waits, MMU address expansion, the
// ext_ram_en switch, configuration read, BMU and AOCE selection, IO latch
// load and the 12 MHz clock division; each must happen at least once.
// All parameters are at their defaults.
module tb_p1750a_pim;
  import pim_pkg::*;

  logic        pclk = 1'b0, por = 1'b0, clk_24m = 1'b0;
  logic        strba = 1'b0, strbd = 1'b0, rdya = 1'b1, rd_n = 1'b1, wr_n = 1'b1;
  logic        m_ion = 1'b1, npu = 1'b1, conf_n = 1'b1;
  logic [15:0] ad_i = '0, ad_o;
  logic        ad_oe, rdyd, start_cycle;
  wsel_t       iwsel = '0, promwsel = '0, ramwsel = '0;
  logic        ext_ram_en = 1'b1, io_sel = 1'b0;
  logic [15:0] cfg_in = 16'hC3A5;
  logic        mmu_en = 1'b0, mmu_strobe = 1'b0;
  logic [7:0]  mmua = '0;
  logic [19:0] mem_addr;
  logic [3:0]  prom_cs_n, ram_cs_n;
  logic        mwr_n, mrd_n;
  logic [15:0] prom_data, ram_rdata, ram_wdata;
  logic [5:0]  ram_rcheck, ram_wcheck;
  logic        edac_flag_clr = 1'b0, edac_sec, edac_ded, edac_sec_flag, edac_ded_flag;
  logic        cs1553_n, rd_1553_n, wr_1553_n, buf_1553_oe_n, busy_1553, rdy_1553_n;
  logic [15:0] data_1553;
  logic [1:0]  iocs_n;
  logic        iowr_n, clk_12m;
  logic [15:0] io_data, ia, id;
  logic [5:0]  io_out;

  p1750a_pim dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int m_io_wait = 0, m_prom_wait = 0, m_ram_wait = 0, m_edac_wait = 0;
  int m_sec = 0, m_ded = 0, m_1553_wait = 0, m_mmu = 0, m_cs3 = 0, m_cs1553 = 0;
  int m_cfg = 0, m_bmu = 0, m_aoce = 0, m_ioport = 0, m_clk12 = 0, m_start = 0;

  always #10 pclk = ~pclk;       // processor clock (time units are arbitrary)
  always #21 clk_24m = ~clk_24m; // board clock; only its ratio to clk_12m is checked
  int n24 = 0;
  always @(posedge clk_12m) m_clk12++;
  always @(posedge clk_24m) if (!por) n24++;
  always @(posedge pclk) if (start_cycle) m_start++;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // ---------------- memory and peripheral models ----------------
  function automatic logic [15:0] prom_word(logic [19:0] a);
    return a[15:0] ^ {a[19:16], 12'h5A5} ^ 16'h1750;
  endfunction

  logic [21:0] ram     [65536];   // indexed by address bits 15..0
  logic [19:0] ram_tag [65536];   // full address last written there
  logic [21:0] ram_flip = '0;      // fault injection on reads
  logic [21:0] ram_word;

  always_comb begin
    ram_word = ram[mem_addr[15:0]];
    {ram_rcheck, ram_rdata} = ram_word ^ ram_flip;
  end
  assign prom_data = prom_word(mem_addr);

  always @(posedge pclk)
    if (strbd && rdyd && !mwr_n && !(&ram_cs_n)) begin
      ram[mem_addr[15:0]]     <= {ram_wcheck, ram_wdata};
      ram_tag[mem_addr[15:0]] <= mem_addr;
    end

  // 1553 chip: ready after delay_1553 clocks of a strobe, one data register
  int          delay_1553 = 0;
  int          cnt_1553 = 0;
  logic [15:0] reg_1553 = 16'h0553;
  assign rdy_1553_n = !((!rd_1553_n || !wr_1553_n) && cnt_1553 >= delay_1553);
  assign data_1553  = reg_1553;
  always @(posedge pclk) begin
    if (!rd_1553_n || !wr_1553_n) cnt_1553 <= cnt_1553 + 1;
    else                          cnt_1553 <= 0;
    if (!wr_1553_n && !rdy_1553_n) reg_1553 <= ad_i;
  end

  assign io_data = !iocs_n[0] ? 16'hB0B0 : !iocs_n[1] ? 16'hA0CE : 16'h0000;

  // ---------------- processor bus cycle ----------------
  // mem: memory (1) or IO (0) cycle; returns read data and wait clocks.
  task automatic bus_cycle(logic mem, logic write, logic [15:0] addr, logic [15:0] wdata,
                           logic strobe_mmu, output logic [15:0] rdata, output int waits);
    @(negedge pclk);
    strba = 1'b1; ad_i = addr; m_ion = mem; rd_n = write; wr_n = !write;
    @(posedge pclk);
    #1;
    checks++; if (ia !== addr) fail($sformatf("ia %h want %h", ia, addr));
    if (strobe_mmu) begin mmu_strobe = 1'b1; #2 mmu_strobe = 1'b0; end
    @(negedge pclk);
    strba = 1'b0; strbd = 1'b1; ad_i = write ? wdata : 16'h0000;
    waits = 0;
    forever begin
      @(posedge pclk);
      if (rdyd) break;
      waits++;
      if (waits > 40) begin fail("no ready"); break; end
    end
    rdata = ad_oe ? ad_o : 16'hxxxx;
    #1;
    @(negedge pclk);
    strbd = 1'b0; rd_n = 1'b1; wr_n = 1'b1; m_ion = 1'b1;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #2000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    logic [15:0] rd, a, d;
    logic [19:0] full;
    int w;
    for (int i = 0; i < 65536; i++) begin ram[i] = '0; ram_tag[i] = '1; end
    #1 por = 1'b1;
    repeat (3) @(negedge pclk);
    por = 1'b0;
    cfg_in = 16'h0000;  // straps change after reset: latch must keep C3A5

    // PROM reads with every wait select, without the MMU
    for (int s = 0; s < 4; s++) begin
      promwsel = wsel_t'(s);
      a = (s % 2 == 0) ? 16'h0010 + 16'(s) : 16'h4100 + 16'(s);
      bus_cycle(1'b1, 1'b0, a, '0, 1'b0, rd, w);
      checks++; if (rd !== prom_word({4'h0, a})) fail($sformatf("PROM %h read %h", a, rd));
      checks++; if (w != s) fail($sformatf("PROM waits %0d want %0d", w, s));
      if (w > 0) m_prom_wait++;
    end

    // RAM writes then reads, every wait select (+1 EDAC)
    for (int s = 0; s < 4; s++) begin
      ramwsel = wsel_t'(s);
      a = 16'hA000 + 16'(s * 16'h1800);
      d = 16'($urandom);
      bus_cycle(1'b1, 1'b1, a, d, 1'b0, rd, w);
      checks++; if (w != s + 1) fail($sformatf("RAM write waits %0d want %0d", w, s + 1));
      checks++; if (id !== d) fail("id does not hold write data");
      bus_cycle(1'b1, 1'b0, a, '0, 1'b0, rd, w);
      checks++; if (rd !== d) fail($sformatf("RAM %h read %h want %h", a, rd, d));
      checks++; if (w != s + 1) fail($sformatf("RAM read waits %0d want %0d", w, s + 1));
      m_edac_wait++;
      if (s > 0) m_ram_wait++;
    end

    // EDAC: single error corrected, double detected, flags sticky
    ramwsel = 2'd0;
    a = 16'hC123; d = 16'h5A3C;
    bus_cycle(1'b1, 1'b1, a, d, 1'b0, rd, w);
    ram_flip = 22'(1) << 7;
    bus_cycle(1'b1, 1'b0, a, '0, 1'b0, rd, w);
    checks++; if (rd !== d) fail("single error not corrected");
    checks++; if (!edac_sec_flag) fail("single-error flag not set"); else m_sec++;
    ram_flip = (22'(1) << 2) | (22'(1) << 18);
    bus_cycle(1'b1, 1'b0, a, '0, 1'b0, rd, w);
    checks++; if (!edac_ded_flag) fail("double-error flag not set"); else m_ded++;
    ram_flip = '0;
    @(negedge pclk); edac_flag_clr = 1'b1; @(negedge pclk); edac_flag_clr = 1'b0;
    checks++; if (edac_sec_flag || edac_ded_flag) fail("flags not cleared");

    // 1553 chip: ready comes from the chip
    ext_ram_en = 1'b1;
    for (int k = 0; k < 4; k++) begin
      delay_1553 = k * 2;
      d = 16'($urandom);
      bus_cycle(1'b1, 1'b1, 16'h8400, d, 1'b0, rd, w);
      checks++; if (w != delay_1553) fail($sformatf("1553 write waits %0d want %0d", w, delay_1553));
      bus_cycle(1'b1, 1'b0, 16'h8400, '0, 1'b0, rd, w);
      checks++; if (rd !== d) fail($sformatf("1553 read %h want %h", rd, d));
      checks++; if (w != delay_1553) fail("1553 read waits");
      if (w > 0) m_1553_wait++;
      m_cs1553++;
    end

    // ext_ram_en low: same window is external RAM bank 3
    ext_ram_en = 1'b0; ramwsel = 2'd1;
    d = 16'hE3E3;
    bus_cycle(1'b1, 1'b1, 16'h9000, d, 1'b0, rd, w);
    bus_cycle(1'b1, 1'b0, 16'h9000, '0, 1'b0, rd, w);
    checks++; if (rd !== d) fail("external RAM read");
    checks++; if (w != 2) fail("external RAM waits");
    checks++; if (ram_tag[16'h9000] == 20'h09000) m_cs3++; else fail("CS3 write not seen");
    ext_ram_en = 1'b1;

    // MMU: 20-bit address from the MMU page lines
    mmu_en = 1'b1;
    mmua = 8'h64; promwsel = 2'd0;
    bus_cycle(1'b1, 1'b0, 16'h0ABC, '0, 1'b1, rd, w);
    full = 20'h64ABC;
    checks++; if (rd !== prom_word(full)) fail("MMU PROM read");
    checks++; if (mem_addr !== full) fail($sformatf("mem_addr %h want %h", mem_addr, full));
    mmua = 8'h3E; ramwsel = 2'd0; d = 16'h3E3E;
    bus_cycle(1'b1, 1'b1, 16'h0123, d, 1'b1, rd, w);
    checks++; if (ram_tag[16'hE123] != 20'h3E123) fail("MMU RAM write address"); else m_mmu++;
    bus_cycle(1'b1, 1'b0, 16'h0123, '0, 1'b1, rd, w);
    checks++; if (rd !== d) fail("MMU RAM read");
    mmu_en = 1'b0;

    // IO: BMU and AOCE, every IO wait select, IO latch load
    for (int s = 0; s < 4; s++) begin
      iwsel = wsel_t'(s);
      io_sel = 1'b0;
      bus_cycle(1'b0, 1'b0, BMU_IO_ADDR, '0, 1'b0, rd, w);
      checks++; if (rd !== 16'hB0B0) fail("BMU read"); else m_bmu++;
      checks++; if (w != s) fail($sformatf("IO waits %0d want %0d", w, s));
      if (w > 0) m_io_wait++;
      d = 16'($urandom);
      bus_cycle(1'b0, 1'b1, BMU_IO_ADDR, d, 1'b0, rd, w);
      checks++; if (io_out !== d[5:0]) fail("io_port not loaded"); else m_ioport++;
      io_sel = 1'b1;
      bus_cycle(1'b0, 1'b0, AOCE_IO_ADDR, '0, 1'b0, rd, w);
      checks++; if (rd !== 16'hA0CE) fail("AOCE read"); else m_aoce++;
    end
    // IO write to an undecoded address must not touch the IO latch
    d = {10'h0, ~io_out};
    io_sel = 1'b0;
    bus_cycle(1'b0, 1'b1, 16'h0077, d, 1'b0, rd, w);
    checks++; if (io_out === d[5:0]) fail("io_port loaded on undecoded address");

    // configuration read (XIO RCW): conf_n low during an IO read
    iwsel = 2'd0; conf_n = 1'b0;
    bus_cycle(1'b0, 1'b0, 16'h8410, '0, 1'b0, rd, w);
    conf_n = 1'b1;
    checks++; if (rd !== 16'hC3A5) fail($sformatf("config read %h", rd)); else m_cfg++;

    // every mechanism must have happened
    checks++; if (m_io_wait   == 0) fail("no IO wait state");
    checks++; if (m_prom_wait == 0) fail("no PROM wait state");
    checks++; if (m_ram_wait  == 0) fail("no RAM wait state");
    checks++; if (m_edac_wait == 0) fail("no EDAC wait state");
    checks++; if (m_sec       == 0) fail("no corrected error");
    checks++; if (m_ded       == 0) fail("no detected double error");
    checks++; if (m_1553_wait == 0) fail("no 1553 ready wait");
    checks++; if (m_cs1553    == 0) fail("no 1553 access");
    checks++; if (m_cs3       == 0) fail("no external RAM access");
    checks++; if (m_mmu       == 0) fail("no MMU expansion");
    checks++; if (m_cfg       == 0) fail("no configuration read");
    checks++; if (m_bmu == 0 || m_aoce == 0) fail("IO device not selected");
    checks++; if (m_ioport    == 0) fail("IO latch never loaded");
    checks++; if (m_clk12 == 0 || (n24 / 2 - m_clk12) > 1 || (m_clk12 - n24 / 2) > 1)
      fail($sformatf("12 MHz clock: %0d rises for %0d input rises", m_clk12, n24));
    checks++; if (m_start     == 0) fail("no start_cycle");
    $display("mechanisms: io_wait=%0d prom_wait=%0d ram_wait=%0d edac_wait=%0d sec=%0d ded=%0d 1553_wait=%0d 1553=%0d cs3=%0d mmu=%0d cfg=%0d bmu=%0d aoce=%0d ioport=%0d clk12=%0d start=%0d",
      m_io_wait, m_prom_wait, m_ram_wait, m_edac_wait, m_sec, m_ded, m_1553_wait, m_cs1553, m_cs3,
      m_mmu, m_cfg, m_bmu, m_aoce, m_ioport, m_clk12, m_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
