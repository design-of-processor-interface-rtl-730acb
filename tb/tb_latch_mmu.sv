// tb_latch_mmu: checks the 20-bit MMU address register.
//
// Applies random MMU page lines and processor addresses, pulses mmu_strobe,
// and checks that mmua_addr equals mmua * 4096 + addr[11:0] and holds when
// the inputs change without a strobe. Also checks the clear.
module tb_latch_mmu;
  logic        strobe = 1'b0, por = 1'b0;
  logic [11:0] addr = '0;
  logic [7:0]  mmua = '0;
  logic [19:0] q, want;
  int checks = 0, failures = 0;

  latch_mmu dut (.mmu_strobe(strobe), .por(por), .addr(addr), .mmua(mmua), .mmua_addr(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 por = 1'b1;
    #5;
    checks++; if (q !== '0) begin failures++; $display("FAIL: not cleared"); end
    por = 1'b0;
    for (int i = 0; i < 100; i++) begin
      addr = 12'($urandom); mmua = 8'($urandom);
      want = 20'(int'(mmua) * 4096 + int'(addr));
      #5 strobe = 1'b1; #5 strobe = 1'b0;
      checks++; if (q !== want) begin failures++; $display("FAIL: got %h want %h", q, want); end
      addr = ~addr; mmua = ~mmua; #5;
      checks++; if (q !== want) begin failures++; $display("FAIL: changed without strobe"); end
    end
    por = 1'b1; #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL: clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
