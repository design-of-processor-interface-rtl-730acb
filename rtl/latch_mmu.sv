// latch_mmu: forms the 20-bit expanded address when the MMU is in use.
//
// The MMU supplies eight extended address lines mmua[7:0]; they replace the
// upper bits of the processor address, giving {mmua, addr[11:0]}. The
// 20-bit value is held in a register clocked by the MMU's strobe so that it
// stays valid for the rest of the bus cycle. por clears it asynchronously.
// Bit assignment, widths and the strobe-clocked register follow the design
// description; the clear polarity is this design's choice.
//
// Timing: mmua_addr updates on each rising edge of mmu_strobe.
module latch_mmu (
  input  logic        mmu_strobe,
  input  logic        por,
  input  logic [11:0] addr,
  input  logic [7:0]  mmua,
  output logic [19:0] mmua_addr
);
  always_ff @(posedge mmu_strobe or posedge por) begin
    if (por) mmua_addr <= '0;
    else     mmua_addr <= {mmua, addr};
  end
endmodule
