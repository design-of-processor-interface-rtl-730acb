// tb_addr_data_demux: checks the address/data demultiplexer.
//
// Runs random processor bus cycles: an address phase (strba high) and a data
// phase (strbd high), with random ready levels. A model updates its address
// copy only on edges with strba=1, strbd=0, rdya=1 and its data copy only on
// edges with strba=0, strbd=1, rdyd=1; ia and id must match the model. In
// read data phases the bus drive ad_o/ad_oe is checked.
module tb_addr_data_demux;
  logic pclk = 1'b0, por = 1'b1;
  logic strba = 1'b0, strbd = 1'b0, rdya = 1'b0, rdyd = 1'b0, rd_n = 1'b1;
  logic [15:0] ad_i = '0, ad_o, rd_data = '0, ia, id;
  logic ad_oe;
  logic [15:0] m_ia = '0, m_id = '0;
  int checks = 0, failures = 0;
  int a_loads = 0, d_loads = 0, drives = 0;

  addr_data_demux #(.WIDTH(16)) dut (
    .pclk(pclk), .por(por), .strba(strba), .strbd(strbd), .rdya(rdya), .rdyd(rdyd),
    .rd_n(rd_n), .ad_i(ad_i), .ad_o(ad_o), .ad_oe(ad_oe), .rd_data(rd_data), .ia(ia), .id(id));

  always #5 pclk = ~pclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge pclk);
    if (strba && !strbd && rdya) begin m_ia = ad_i; a_loads++; end
    if (!strba && strbd && rdyd) begin m_id = ad_i; d_loads++; end
    @(negedge pclk);
    checks++;
    if (ia !== m_ia || id !== m_id) begin
      failures++; $display("FAIL: ia %h/%h id %h/%h", ia, m_ia, id, m_id);
    end
  endtask

  initial begin
    @(negedge pclk); por = 1'b0;
    for (int c = 0; c < 100; c++) begin
      // address phase
      strba = 1'b1; strbd = 1'b0; ad_i = 16'($urandom); rd_n = 1'($urandom);
      rdya = 1'($urandom);
      step();
      rdya = 1'b1;
      step();
      // data phase
      strba = 1'b0; strbd = 1'b1; rd_data = 16'($urandom);
      ad_i = 16'($urandom);
      #1;
      checks++;
      if (ad_oe !== !rd_n || (ad_oe && ad_o !== rd_data)) begin
        failures++; $display("FAIL: read drive oe=%b", ad_oe);
      end
      if (ad_oe) drives++;
      rdyd = 1'($urandom);
      step();
      rdyd = 1'b1;
      step();
      strbd = 1'b0; rdyd = 1'b0; ad_i = 16'($urandom);
      #1;
      checks++; if (ad_oe !== 1'b0) begin failures++; $display("FAIL: drive while idle"); end
      step();
    end
    checks++;
    if (a_loads == 0 || d_loads == 0 || drives == 0) begin failures++; $display("FAIL: not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
