// tb_mem_decoder: checks the memory address selection and the decoders behind it.
//
// With mmu_en=0 the decoded address must be the processor address with zero
// page bits; with mmu_en=1 it must be the MMU address. Each case checks
// mem_addr and a few selects whose window is known for that address, plus
// ram_sel (high exactly when a RAM bank is selected).
module tb_mem_decoder;
  logic mmu_en = 1'b0, ext = 1'b0, mbion = 1'b1, npu = 1'b1;
  logic [19:0] mmua_addr = '0, mem_addr;
  logic [15:0] cpu_addr = '0;
  logic [3:0] prom_cs_n, ram_cs_n;
  logic cs1553_n, ram_sel;
  int checks = 0, failures = 0;

  mem_decoder dut (.mmu_en(mmu_en), .mmua_addr(mmua_addr), .cpu_addr(cpu_addr),
    .ext_ram_en(ext), .mbion(mbion), .npu(npu), .mem_addr(mem_addr),
    .prom_cs_n(prom_cs_n), .ram_cs_n(ram_cs_n), .cs1553_n(cs1553_n), .ram_sel(ram_sel));

  task automatic expect_sel(string what, logic [3:0] p, logic [3:0] r, logic c);
    #1;
    checks++;
    if (prom_cs_n !== p || ram_cs_n !== r || cs1553_n !== c || ram_sel !== !(&r)) begin
      failures++;
      $display("FAIL %s: prom %b ram %b 1553 %b ram_sel %b", what, prom_cs_n, ram_cs_n, cs1553_n, ram_sel);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // without MMU: page bits are zero
    for (int i = 0; i < 200; i++) begin
      cpu_addr = 16'($urandom); mmua_addr = 20'($urandom); mmu_en = 1'b0;
      #1;
      checks++;
      if (mem_addr !== {4'h0, cpu_addr}) begin failures++; $display("FAIL: no-MMU address"); end
      mmu_en = 1'b1; #1;
      checks++;
      if (mem_addr !== mmua_addr) begin failures++; $display("FAIL: MMU address"); end
    end
    mmu_en = 1'b0; cpu_addr = 16'h0123;  expect_sel("boot PROM", 4'b1110, 4'b1111, 1'b1);
    cpu_addr = 16'h5000;                 expect_sel("PROM1",     4'b1101, 4'b1111, 1'b1);
    cpu_addr = 16'hA800;                 expect_sel("RAM0",      4'b1111, 4'b1110, 1'b1);
    cpu_addr = 16'h8100; ext = 1'b1;     expect_sel("1553",      4'b1111, 4'b1111, 1'b0);
    ext = 1'b0;                          expect_sel("RAM3",      4'b1111, 4'b0111, 1'b1);
    mmu_en = 1'b1; mmua_addr = 20'h65432; expect_sel("MMU PROM0", 4'b1110, 4'b1111, 1'b1);
    mmua_addr = 20'h34000;               expect_sel("MMU PROM2", 4'b1011, 4'b1111, 1'b1);
    mmua_addr = 20'h7F000;               expect_sel("MMU RAM2",  4'b1111, 4'b1011, 1'b1);
    mbion = 1'b0;                        expect_sel("IO cycle",  4'b1111, 4'b1111, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
