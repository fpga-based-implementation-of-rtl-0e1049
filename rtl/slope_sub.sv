// slope_sub: slope calculation module.
//
// One slope of the dual-slope method is the difference between two samples
// that are D1 samples apart. Following the reference architecture this is a
// plain DATA_W-bit subtractor: diff = a - b, taken modulo 2**DATA_W and read
// as a two's-complement number whose MSB is the slope's sign. The ECG table
// must therefore keep |a - b| below 2**(DATA_W-1). carry_out is the
// subtractor's carry, 1 when no borrow occurs (a >= b as unsigned numbers).
// The divisor k of the slope equations is left out: it is the same for both
// slopes and only scales the product, which the threshold absorbs.
//
// Two instances run in parallel: SL = centre - newest sample and
// SR = oldest - centre sample, so both slopes are measured in the same time
// direction and a peak gives slopes of opposite sign.
//
// Interface: a, b in; diff, carry_out out. Purely combinational.
module slope_sub #(
  parameter int unsigned DATA_W = qrs_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] diff,
  output logic              carry_out
);

  always_comb begin
    {carry_out, diff} = {1'b0, a} + {1'b0, ~b} + 1'b1;
  end

endmodule
