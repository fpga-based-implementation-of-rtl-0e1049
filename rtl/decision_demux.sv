// decision_demux: decision making module.
//
// A 1-to-2 demultiplexer. Its data input is the threshold module's output
// and its select is the polarity control signal. When the select is high
// the data goes to de1, which then pulses for a sample whose slope product
// exceeds the threshold and whose slopes have opposite signs: an R peak.
// When the select is low the data goes to de0 (steep, but not an extreme);
// the unselected output is held low. The de0/de1 port names follow the
// reference architecture.
//
// Interface: din, sel in; de0, de1 out. Purely combinational.
module decision_demux (
  input  logic din,
  input  logic sel,
  output logic de0,
  output logic de1
);

  always_comb begin
    de0 = din & ~sel;
    de1 = din &  sel;
  end

endmodule
