// ram_decoder: chip selects for the RAM banks and the 1553 chip.
//
// Decodes address bits 19..12 of the memory address. The RAM windows ignore
// the page bits 19..16, so they repeat in each 64 KW page; the 1553 window is
// in page 0 only:
//   cs_n[0]  : XA000-XBFFF
//   cs_n[1]  : XC000-XDFFF
//   cs_n[2]  : XE000-XFFFF
//   cs1553_n : 08000-08FFF when ext_ram_en=1
//   cs_n[3]  : X8000-X9FFF when ext_ram_en=0 (external RAM)
// All selects are active low and need mbion=1 and npu=1. The CS0-CS2 windows,
// the 1553 window and the ext_ram_en rule follow the design description; the
// window of CS3 and the decoding of address bit 12 are this design's choices.
//
// Purely combinational.
module ram_decoder (
  input  logic [19:12] a,
  input  logic         ext_ram_en,
  input  logic         mbion,
  input  logic         npu,
  output logic [3:0]   cs_n,
  output logic         cs1553_n
);
  logic en;
  assign en = mbion && npu;

  always_comb begin
    cs_n     = 4'b1111;
    cs1553_n = 1'b1;
    if (en) begin
      unique case (a[15:13])
        3'b101: cs_n[0] = 1'b0;
        3'b110: cs_n[1] = 1'b0;
        3'b111: cs_n[2] = 1'b0;
        3'b100: begin
          if (!ext_ram_en)  cs_n[3]  = 1'b0;
          else if (a[19:16] == 4'h0 && !a[12]) cs1553_n = 1'b0;
        end
        default: ;
      endcase
    end
  end
endmodule
