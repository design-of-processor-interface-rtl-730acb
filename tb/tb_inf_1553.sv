// tb_inf_1553: checks the 1553 chip strobes for all input combinations.
module tb_inf_1553;
  logic cs_n, ds_n, rd_n, wr_n, rdy_n;
  logic rd_o, wr_o, oe_o, busy;
  int checks = 0, failures = 0;

  inf_1553 dut (.cs1553_n(cs_n), .ds_n(ds_n), .rd_n(rd_n), .wr_n(wr_n), .rdy_1553_n(rdy_n),
    .rd_1553_n(rd_o), .wr_1553_n(wr_o), .buf_oe_n(oe_o), .busy(busy));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cs_n, ds_n, rd_n, wr_n, rdy_n} = 5'(v);
      #1;
      checks++;
      if (rd_o !== !(!cs_n && !ds_n && !rd_n) ||
          wr_o !== !(!cs_n && !ds_n && !wr_n) ||
          oe_o !== rd_o ||
          busy !== (!cs_n && !ds_n && rdy_n)) begin
        failures++; $display("FAIL: inputs %b", 5'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
