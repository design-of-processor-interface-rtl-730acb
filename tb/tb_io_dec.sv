// tb_io_dec: checks the BMU/AOCE IO address decoder.
//
// Sweeps all 65536 IO addresses with both sel values, and checks that only
// address 002Dh with sel=0 selects the BMU and only 0100h with sel=1 the
// AOCE, and only in IO cycles with the strobe low.
module tb_io_dec;
  logic [15:0] addr = '0;
  logic iodis_n = 1'b0, mbion = 1'b0, sel = 1'b0;
  logic [1:0] iocs_n, want;
  int checks = 0, failures = 0;
  int bmu = 0, aoce = 0;

  io_dec dut (.addr(addr), .iodis_n(iodis_n), .mbion(mbion), .sel(sel), .iocs_n(iocs_n));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a++)
      for (int s = 0; s < 2; s++) begin
        addr = 16'(a); sel = s[0];
        #1;
        want = 2'b11;
        if (a == 45  && s == 0) want[0] = 1'b0;
        if (a == 256 && s == 1) want[1] = 1'b0;
        checks++;
        if (iocs_n !== want) begin failures++; $display("FAIL: addr %h sel %0d got %b", addr, s, iocs_n); end
        if (!iocs_n[0]) bmu++;
        if (!iocs_n[1]) aoce++;
      end
    // qualifiers
    addr = 16'h002D; sel = 1'b0;
    mbion = 1'b1; #1; checks++; if (iocs_n !== 2'b11) begin failures++; $display("FAIL: memory cycle"); end
    mbion = 1'b0; iodis_n = 1'b1; #1; checks++; if (iocs_n !== 2'b11) begin failures++; $display("FAIL: strobe high"); end
    checks++; if (bmu != 1 || aoce != 1) begin failures++; $display("FAIL: bmu %0d aoce %0d", bmu, aoce); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
