// tb_clk_gen: checks the divide-by-two clock generator.
//
// Drives the 24 MHz input with a 42-time-unit period, holds rst, then
// checks that clk_12m stays low during reset and toggles on every rising
// edge of clk_24m afterwards, i.e. has exactly half the input frequency.
module tb_clk_gen;
  logic clk_24m = 1'b0, rst = 1'b1, clk_12m;
  int checks = 0, failures = 0;
  int rises = 0;
  logic prev;

  clk_gen dut (.clk_24m(clk_24m), .rst(rst), .clk_12m(clk_12m));

  always #21 clk_24m = ~clk_24m;
  always @(posedge clk_12m) rises++;

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk_24m);
    #1;
    checks++; if (clk_12m !== 1'b0) begin failures++; $display("FAIL: not cleared by rst"); end
    rst = 1'b0;
    rises = 0;
    for (int i = 0; i < 16; i++) begin
      prev = clk_12m;
      @(posedge clk_24m); #1;
      checks++;
      if (clk_12m !== ~prev) begin failures++; $display("FAIL: no toggle at edge %0d", i); end
    end
    // 16 input edges give 8 output rising edges
    checks++; if (rises != 8) begin failures++; $display("FAIL: %0d output rises, want 8", rises); end
    rst = 1'b1; #1;
    checks++; if (clk_12m !== 1'b0) begin failures++; $display("FAIL: async clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
