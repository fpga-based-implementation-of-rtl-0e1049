// slope_mult: multiplier module.
//
// Multiplies the left and right slopes into the steepness value
// S_mult = SL * SR. The slopes are DATA_W-bit two's-complement numbers and
// the product is a 2*DATA_W-bit two's-complement number, so it is exact for
// every input pair. Where both slopes are steep (a sharp R peak, or the
// steep flank of a QRS complex) the product is large in magnitude. Reading
// the slopes as signed is this design's choice; the reference only says the
// slopes are multiplied and the product is 16 bits wide.
//
// Interface: sl, sr in; prod out. Purely combinational.
module slope_mult #(
  parameter int unsigned DATA_W = qrs_pkg::DATA_W
) (
  input  logic signed [DATA_W-1:0]   sl,
  input  logic signed [DATA_W-1:0]   sr,
  output logic signed [2*DATA_W-1:0] prod
);

  always_comb prod = sl * sr;

endmodule
