// tb_io_port: checks the enabled IO data latch.
//
// Random data and enable on each clock; a model register updated only when
// the enable is high must match data_out after every edge. Also checks the
// asynchronous clear.
module tb_io_port;
  logic clk = 1'b0, por = 1'b1, en = 1'b0;
  logic [5:0] din = '0, dout, model;
  int checks = 0, failures = 0;
  int loads = 0;

  io_port #(.WIDTH(6)) dut (.clk(clk), .por(por), .en(en), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (dout !== '0) begin failures++; $display("FAIL: not cleared"); end
    por = 1'b0;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      din = 6'($urandom);
      en  = 1'($urandom);
      @(posedge clk);
      if (en) begin model = din; loads++; end
      @(negedge clk);
      checks++;
      if (dout !== model) begin failures++; $display("FAIL: cycle %0d got %h want %h", i, dout, model); end
    end
    checks++; if (loads == 0 || loads == 200) begin failures++; $display("FAIL: enable not exercised"); end
    din = 6'h2A; en = 1'b1; @(posedge clk); #1;
    por = 1'b1; #1;
    checks++; if (dout !== '0) begin failures++; $display("FAIL: async clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
