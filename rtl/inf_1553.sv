// inf_1553: strobes for the MIL-STD-1553 protocol chip.
//
// The 1553 chip sits in memory space behind the RAM decoder's cs1553_n. While
// it is selected and the data strobe ds_n is low, a read (rd_n=0) pulls
// rd_1553_n low and a write (wr_n=0) pulls wr_1553_n low. buf_oe_n enables
// the chip's data buffer toward the processor on reads, and busy is high
// while a 1553 access waits for the chip's ready (rdy_1553_n high). The
// design description names this interface and gives the chip select and
// ready; the strobe equations are this design's choices.
//
// Purely combinational.
module inf_1553 (
  input  logic cs1553_n,
  input  logic ds_n,
  input  logic rd_n,
  input  logic wr_n,
  input  logic rdy_1553_n,
  output logic rd_1553_n,
  output logic wr_1553_n,
  output logic buf_oe_n,
  output logic busy
);
  logic access;
  assign access    = !cs1553_n && !ds_n;
  assign rd_1553_n = !(access && !rd_n);
  assign wr_1553_n = !(access && !wr_n);
  assign buf_oe_n  = rd_1553_n;
  assign busy      = access && rdy_1553_n;
endmodule
