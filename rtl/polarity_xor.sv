// polarity_xor: polarity checking module.
//
// A two-input XOR of the sign bits (MSBs) of the two slopes, as in the
// reference architecture. Its output, the control signal of the decision
// module, is high when the slopes have opposite signs, i.e. the centre
// sample is a local maximum or minimum of the three samples looked at.
//
// Interface: sl_msb, sr_msb in; opposite out. Purely combinational.
module polarity_xor (
  input  logic sl_msb,
  input  logic sr_msb,
  output logic opposite
);

  always_comb opposite = sl_msb ^ sr_msb;

endmodule
