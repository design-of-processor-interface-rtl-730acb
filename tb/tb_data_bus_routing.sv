// tb_data_bus_routing: checks the read data selection.
//
// Each source gets a distinct random word. Random combinations of selects are
// applied and the output must be the word of the highest-priority active
// source (configuration, PROM, RAM, 1553, IO) or 0 with rd_valid low.
module tb_data_bus_routing;
  logic conf_oe = 1'b0, cs1553_n = 1'b1;
  logic [3:0] prom_cs_n = '1, ram_cs_n = '1;
  logic [1:0] iocs_n = '1;
  logic [15:0] conf_d, prom_d, ram_d, d1553, io_d, rd, want;
  logic valid, want_v;
  int checks = 0, failures = 0;
  int seen [6];

  data_bus_routing dut (.conf_oe(conf_oe), .conf_data(conf_d), .prom_cs_n(prom_cs_n),
    .prom_data(prom_d), .ram_cs_n(ram_cs_n), .ram_data(ram_d), .cs1553_n(cs1553_n),
    .data_1553(d1553), .iocs_n(iocs_n), .io_data(io_d), .rd_data(rd), .rd_valid(valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      conf_d = 16'($urandom); prom_d = 16'($urandom); ram_d = 16'($urandom);
      d1553 = 16'($urandom); io_d = 16'($urandom);
      conf_oe   = ($urandom_range(0, 5) == 0);
      prom_cs_n = ($urandom_range(0, 3) == 0) ? ~(4'b1 << $urandom_range(0, 3)) : 4'hF;
      ram_cs_n  = ($urandom_range(0, 3) == 0) ? ~(4'b1 << $urandom_range(0, 3)) : 4'hF;
      cs1553_n  = ($urandom_range(0, 3) != 0);
      iocs_n    = ($urandom_range(0, 2) == 0) ? 2'($urandom_range(1, 2)) : 2'b11;
      #1;
      want_v = 1'b1;
      if (conf_oe)                 begin want = conf_d; seen[0]++; end
      else if (prom_cs_n != 4'hF)  begin want = prom_d; seen[1]++; end
      else if (ram_cs_n != 4'hF)   begin want = ram_d;  seen[2]++; end
      else if (!cs1553_n)          begin want = d1553;  seen[3]++; end
      else if (iocs_n != 2'b11)    begin want = io_d;   seen[4]++; end
      else begin want = '0; want_v = 1'b0; seen[5]++; end
      checks++;
      if (rd !== want || valid !== want_v) begin failures++; $display("FAIL: got %h want %h", rd, want); end
    end
    for (int k = 0; k < 6; k++) begin
      checks++; if (seen[k] == 0) begin failures++; $display("FAIL: source %0d not covered", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
