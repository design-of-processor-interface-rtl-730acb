// tb_wait_st_logic: checks wait-state counts, start_cycle and the strobes.
//
// For every access type (IO, PROM, RAM) and every select value 0..3, it runs
// a data strobe and counts the pclk edges on which cpu_rdy_n is still high
// before it goes low. The expected count is the select value, plus one for
// RAM (EDAC). For 1553 accesses the chip's ready is released after a random
// number of clocks and cpu_rdy_n must follow it. start_cycle must be high in
// the first clock of the strobe only, and the read/write strobes must match
// their equations throughout.
module tb_wait_st_logic;
  import pim_pkg::*;
  logic pclk = 1'b0, por = 1'b1;
  wsel_t iwsel = '0, promwsel = '0, ramwsel = '0;
  logic m_ion = 1'b1, ds_n = 1'b1, wr_n = 1'b1, rd_n = 1'b1;
  logic rdy_1553_n = 1'b1, ram_sel = 1'b0, cs_1553_n = 1'b1;
  logic cpu_rdy_n, start_cycle, mwr_n, mrd_n, iowr_n;
  int checks = 0, failures = 0;
  int n_io = 0, n_prom = 0, n_ram = 0, n_1553 = 0;

  wait_st_logic dut (.pclk(pclk), .por(por), .iwsel(iwsel), .promwsel(promwsel),
    .ramwsel(ramwsel), .m_ion(m_ion), .ds_n(ds_n), .wr_n(wr_n), .rd_n(rd_n),
    .rdy_1553_n(rdy_1553_n), .ram_sel(ram_sel), .cs_1553_n(cs_1553_n),
    .cpu_rdy_n(cpu_rdy_n), .start_cycle(start_cycle), .mwr_n(mwr_n), .mrd_n(mrd_n),
    .iowr_n(iowr_n));

  always #5 pclk = ~pclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe equations, checked at every falling edge
  always @(negedge pclk) if (!por) begin
    checks++;
    if (mwr_n  !== !(!ds_n && !wr_n &&  m_ion) ||
        mrd_n  !== !(!ds_n && !rd_n &&  m_ion) ||
        iowr_n !== !(!ds_n && !wr_n && !m_ion)) begin
      failures++; $display("FAIL: strobes mwr %b mrd %b iowr %b", mwr_n, mrd_n, iowr_n);
    end
  end

  // one data strobe; returns the number of wait clocks seen
  task automatic run_cycle(int release_1553, output int waits);
    int k;
    waits = 0;
    k = 0;
    @(negedge pclk);
    ds_n = 1'b0;
    wr_n = 1'($urandom); rd_n = !wr_n;
    forever begin
      if (release_1553 >= 0) rdy_1553_n = !(k >= release_1553);
      #1;
      checks++;
      if (start_cycle !== (k == 0)) begin failures++; $display("FAIL: start_cycle at clock %0d", k); end
      @(posedge pclk);
      if (!cpu_rdy_n) break;
      waits++;
      k++;
      @(negedge pclk);
      if (k > 20) break;
    end
    @(negedge pclk);
    ds_n = 1'b1; wr_n = 1'b1; rd_n = 1'b1; rdy_1553_n = 1'b1;
    #1;
    checks++; if (cpu_rdy_n !== 1'b1) begin failures++; $display("FAIL: ready while idle"); end
    @(negedge pclk);
  endtask

  initial begin
    int w, want;
    repeat (2) @(negedge pclk);
    por = 1'b0;
    for (int t = 0; t < 3; t++)
      for (int s = 0; s < 4; s++) begin
        iwsel = wsel_t'($urandom); promwsel = wsel_t'($urandom); ramwsel = wsel_t'($urandom);
        case (t)
          0: begin m_ion = 1'b0; ram_sel = 1'b0; iwsel    = wsel_t'(s); want = s;     n_io++;   end
          1: begin m_ion = 1'b1; ram_sel = 1'b0; promwsel = wsel_t'(s); want = s;     n_prom++; end
          default: begin m_ion = 1'b1; ram_sel = 1'b1; ramwsel = wsel_t'(s); want = s + 1; n_ram++; end
        endcase
        run_cycle(-1, w);
        checks++;
        if (w != want) begin failures++; $display("FAIL: type %0d sel %0d waits %0d want %0d", t, s, w, want); end
      end
    // 1553 accesses: ready follows the chip
    m_ion = 1'b1; ram_sel = 1'b0; cs_1553_n = 1'b0; ramwsel = 2'd3; promwsel = 2'd3;
    for (int i = 0; i < 6; i++) begin
      want = int'($urandom_range(0, 7));
      run_cycle(want, w);
      n_1553++;
      checks++;
      if (w != want) begin failures++; $display("FAIL: 1553 waits %0d want %0d", w, want); end
    end
    cs_1553_n = 1'b1;
    checks++;
    if (n_io == 0 || n_prom == 0 || n_ram == 0 || n_1553 == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
