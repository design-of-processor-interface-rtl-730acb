// tb_ram_decoder: checks the RAM and 1553 chip selects.
//
// Reference windows within each 64 KW page: CS0 A000-BFFF, CS1 C000-DFFF,
// CS2 E000-FFFF, CS3 8000-9FFF when ext_ram_en=0; CS1553 only at 08000-08FFF
// and only when ext_ram_en=1; all need mbion=1 and npu=1. Sweeps every 2 KW
// step of the 1 MW space with all qualifier combinations.
module tb_ram_decoder;
  logic [19:0] addr = '0;
  logic ext = 1'b0, mbion = 1'b1, npu = 1'b1;
  logic [3:0] cs_n;
  logic cs1553_n;
  logic [4:0] want;
  int checks = 0, failures = 0;
  int hits [5];

  ram_decoder dut (.a(addr[19:12]), .ext_ram_en(ext), .mbion(mbion), .npu(npu),
                   .cs_n(cs_n), .cs1553_n(cs1553_n));

  function automatic logic [4:0] ref_cs(int a, logic e, logic mb, logic np);
    logic [4:0] r;   // {cs1553_n, cs_n[3:0]}
    r = 5'b11111;
    if (mb && np) begin
      int o;
      o = a % 'h10000;   // offset within the 64 KW page
      if (o >= 'hA000 && o <= 'hBFFF) r[0] = 1'b0;
      if (o >= 'hC000 && o <= 'hDFFF) r[1] = 1'b0;
      if (o >= 'hE000 && o <= 'hFFFF) r[2] = 1'b0;
      if (!e && o >= 'h8000 && o <= 'h9FFF) r[3] = 1'b0;
      if ( e && a >= 'h08000 && a <= 'h08FFF) r[4] = 1'b0;
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 'h100000; a += 'h800)
      for (int q = 0; q < 8; q++) begin
        addr = 20'(a); ext = q[0]; mbion = q[1]; npu = q[2];
        #1;
        want = ref_cs(a, q[0], q[1], q[2]);
        checks++;
        if ({cs1553_n, cs_n} !== want) begin
          failures++; $display("FAIL: addr %h q %0d got %b want %b", addr, q, {cs1553_n, cs_n}, want);
        end
        for (int k = 0; k < 5; k++) if (!want[k]) hits[k]++;
      end
    for (int k = 0; k < 5; k++) begin
      checks++; if (hits[k] == 0) begin failures++; $display("FAIL: select %0d never hit", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
