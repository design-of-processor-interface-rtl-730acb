// tb_prom_decoder: checks the PROM chip selects against the address windows.
//
// The reference compares the 20-bit address with the window limits directly
// (CS0: 64000-67FFF and 00000-03FFF, CS1: 04000-07FFF and 14000-17FFF,
// CS2: 24000-27FFF and 34000-37FFF, CS3: 44000-47FFF and 54000-57FFF), and
// requires mbion=1 and npu=1. It sweeps every 4 KW step of the address space
// with all four qualifier combinations, plus random addresses.
module tb_prom_decoder;
  logic [19:0] addr = '0;
  logic mbion = 1'b1, npu = 1'b1;
  logic [3:0] cs_n, want;
  int checks = 0, failures = 0;
  int hits [4];

  prom_decoder dut (.addr_in(addr), .mbion(mbion), .npu(npu), .cs_n(cs_n));

  function automatic logic in_win(int a, int lo, int hi);
    return (a >= lo) && (a <= hi);
  endfunction

  function automatic logic [3:0] ref_cs(int a, logic mb, logic np);
    logic [3:0] r;
    r = 4'b1111;
    if (mb && np) begin
      if (in_win(a, 'h64000, 'h67FFF) || in_win(a, 'h00000, 'h03FFF)) r[0] = 1'b0;
      if (in_win(a, 'h04000, 'h07FFF) || in_win(a, 'h14000, 'h17FFF)) r[1] = 1'b0;
      if (in_win(a, 'h24000, 'h27FFF) || in_win(a, 'h34000, 'h37FFF)) r[2] = 1'b0;
      if (in_win(a, 'h44000, 'h47FFF) || in_win(a, 'h54000, 'h57FFF)) r[3] = 1'b0;
    end
    return r;
  endfunction

  task automatic check_one(int a, logic mb, logic np);
    addr = 20'(a); mbion = mb; npu = np;
    #1;
    want = ref_cs(a, mb, np);
    checks++;
    if (cs_n !== want) begin
      failures++; $display("FAIL: addr %h mbion %b npu %b cs_n %b want %b", addr, mb, np, cs_n, want);
    end
    for (int k = 0; k < 4; k++) if (!cs_n[k]) hits[k]++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 'h100000; a += 'h1000)
      for (int q = 0; q < 4; q++) begin
        check_one(a, q[0], q[1]);
        check_one(a + 'hFFF, q[0], q[1]);
      end
    for (int i = 0; i < 2000; i++) check_one(int'(20'($urandom)), 1'b1, 1'b1);
    for (int k = 0; k < 4; k++) begin
      checks++; if (hits[k] == 0) begin failures++; $display("FAIL: CS%0d never selected", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
