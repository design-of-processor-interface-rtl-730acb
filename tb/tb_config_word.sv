// tb_config_word: checks the configuration latch.
//
// Loads random strap words during power-on reset, changes the straps after
// reset, and checks that the latched word is kept and that the output enable
// follows conf_n.
module tb_config_word;
  logic por = 1'b1, conf_n = 1'b1, oe;
  logic [15:0] cfg_in = '0, dout, want;
  int checks = 0, failures = 0;

  config_word dut (.por(por), .cfg_in(cfg_in), .conf_n(conf_n), .data_out(dout), .data_oe(oe));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      por = 1'b1; cfg_in = 16'($urandom); want = cfg_in; #5;
      por = 1'b0; #5;
      for (int j = 0; j < 4; j++) begin
        cfg_in = 16'($urandom);
        conf_n = 1'($urandom);
        #5;
        checks++;
        if (dout !== want || oe !== !conf_n) begin
          failures++; $display("FAIL: dout %h want %h oe %b conf_n %b", dout, want, oe, conf_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
