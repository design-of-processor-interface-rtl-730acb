// tb_edac_inf: checks the SEC-DED code and the error flags.
//
// The reference encoder builds the 22-bit word independently: it places the
// 16 data bits at the non-power-of-two positions 3..21 of a Hamming codeword,
// sets each power-of-two position to the parity of the positions that
// include it, and adds an overall parity bit. Random words are written; then
// no error, every single-bit error (data or check) and random double errors
// are injected, and cdata, single_err and double_err are checked. The sticky
// flags are checked against rd_done and flag_clr.
module tb_edac_inf;
  logic pclk = 1'b0, por = 1'b1;
  logic [15:0] wdata = '0, rdata = '0, cdata;
  logic [5:0]  wcheck, rcheck = '0;
  logic single_err, double_err, rd_done = 1'b0, flag_clr = 1'b0, sec_flag, ded_flag;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  edac_inf dut (.pclk(pclk), .por(por), .wdata(wdata), .wcheck(wcheck), .rdata(rdata),
    .rcheck(rcheck), .cdata(cdata), .single_err(single_err), .double_err(double_err),
    .rd_done(rd_done), .flag_clr(flag_clr), .sec_flag(sec_flag), .ded_flag(ded_flag));

  always #5 pclk = ~pclk;

  // reference: returns {overall, c16, c8, c4, c2, c1}
  function automatic logic [5:0] ref_check(logic [15:0] d);
    logic [21:1] cw;
    logic [4:0]  c;
    int n;
    cw = '0; n = 0;
    for (int p = 1; p <= 21; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin cw[p] = d[n]; n++; end
    for (int k = 0; k < 5; k++) begin
      c[k] = 1'b0;
      for (int p = 1; p <= 21; p++) if (((p >> k) & 1) == 1 && p != (1 << k)) c[k] ^= cw[p];
    end
    return {^{d, c}, c};
  endfunction

  task automatic check_read(logic [15:0] d, logic [21:0] flip, logic [15:0] want, logic se, logic de);
    {rcheck, rdata} = {ref_check(d), d} ^ flip;
    #1;
    checks++;
    if (single_err !== se || double_err !== de || (!de && cdata !== want)) begin
      failures++;
      $display("FAIL: d %h flip %h cdata %h se %b de %b", d, flip, cdata, single_err, double_err);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int i1, i2;
    @(negedge pclk); por = 1'b0;
    for (int t = 0; t < 200; t++) begin
      d = 16'($urandom);
      wdata = d; #1;
      checks++;
      if (wcheck !== ref_check(d)) begin failures++; $display("FAIL: encode %h got %h want %h", d, wcheck, ref_check(d)); end
      check_read(d, '0, d, 1'b0, 1'b0);
      for (int b = 0; b < 22; b++) begin
        check_read(d, 22'(1) << b, d, 1'b1, 1'b0);
        n_single++;
      end
      i1 = $urandom_range(0, 21);
      i2 = (i1 + $urandom_range(1, 21)) % 22;
      check_read(d, (22'(1) << i1) | (22'(1) << i2), d, 1'b0, 1'b1);
      n_double++;
    end
    // flags
    d = 16'h1234;
    check_read(d, 22'(1) << 3, d, 1'b1, 1'b0);
    @(negedge pclk);
    checks++; if (sec_flag !== 1'b0) begin failures++; $display("FAIL: flag without rd_done"); end
    rd_done = 1'b1; @(negedge pclk); rd_done = 1'b0;
    checks++; if (sec_flag !== 1'b1 || ded_flag !== 1'b0) begin failures++; $display("FAIL: sec flag"); end
    check_read(d, 22'h3, d, 1'b0, 1'b1);
    rd_done = 1'b1; @(negedge pclk); rd_done = 1'b0;
    check_read(d, '0, d, 1'b0, 1'b0);
    @(negedge pclk);
    checks++; if (sec_flag !== 1'b1 || ded_flag !== 1'b1) begin failures++; $display("FAIL: flags not sticky"); end
    flag_clr = 1'b1; @(negedge pclk); flag_clr = 1'b0;
    checks++; if (sec_flag !== 1'b0 || ded_flag !== 1'b0) begin failures++; $display("FAIL: flag clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
