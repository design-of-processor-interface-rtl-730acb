// config_word: the external 16-bit system configuration latch.
//
// The processor reads its system configuration (for example whether an MMU is
// fitted) from a 16-bit latch in IO space with the XIO RCW command, during
// which it pulls conf_n low. The latch loads the strap inputs cfg_in while
// por is high and keeps them afterwards; data_out carries the latched word
// and data_oe is high while conf_n is low, so the word can be routed onto the
// processor's data bus. That conf_n enables the latch output follows the
// design description; loading from straps at power-on and the meaning of the
// bits are this design's choices.
//
// The storage is a level-sensitive latch, transparent while por is high, as
// the description calls for a latch; synthesis tools report it as a latch on
// purpose.
//
// Timing: cfg_q follows cfg_in while por is high and holds from its falling
// edge; data_oe is combinational.
module config_word (
  input  logic        por,
  input  logic [15:0] cfg_in,
  input  logic        conf_n,
  output logic [15:0] data_out,
  output logic        data_oe
);
  logic [15:0] cfg_q;

  always_latch begin
    if (por) cfg_q = cfg_in;
  end

  assign data_out = cfg_q;
  assign data_oe  = !conf_n;
endmodule
