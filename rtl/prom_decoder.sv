// prom_decoder: chip selects for the four PROM banks.
//
// Decodes the 20-bit memory address into four active-low chip selects. Each
// bank answers in two 16 KW windows:
//   cs_n[0]: 64000-67FFF and 00000-03FFF
//   cs_n[1]: 04000-07FFF and 14000-17FFF
//   cs_n[2]: 24000-27FFF and 34000-37FFF
//   cs_n[3]: 44000-47FFF and 54000-57FFF
// All selects need a memory cycle (mbion=1) and npu=1. The windows follow the
// design description, which builds this from 74138 decoders; the low CS0
// window (read here as 00000-03FFF) and the active-low outputs are this
// design's reading of it.
//
// Purely combinational.
module prom_decoder (
  input  logic [19:0] addr_in,
  input  logic        mbion,
  input  logic        npu,
  output logic [3:0]  cs_n
);
  logic       en;
  logic [3:0] page;   // address bits 19..16
  logic [1:0] quad;   // address bits 15..14

  assign en   = mbion && npu;
  assign page = addr_in[19:16];
  assign quad = addr_in[15:14];

  always_comb begin
    cs_n = 4'b1111;
    if (en) begin
      if (quad == 2'b01) begin
        unique case (page)
          4'h0, 4'h1: cs_n[1] = 1'b0;
          4'h2, 4'h3: cs_n[2] = 1'b0;
          4'h4, 4'h5: cs_n[3] = 1'b0;
          4'h6:       cs_n[0] = 1'b0;
          default:    ;
        endcase
      end else if (quad == 2'b00 && page == 4'h0) begin
        cs_n[0] = 1'b0;
      end
    end
  end
endmodule
