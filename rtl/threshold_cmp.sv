// threshold_cmp: threshold module.
//
// A comparator that says whether the steepness value exceeds the preset
// threshold: above = |prod| > ref_in. At an R peak the two slopes have
// opposite signs, so the signed product is negative there; comparing its
// magnitude lets one unsigned threshold serve both that case and slopes of
// equal sign. The magnitude comparison is this design's choice; the
// reference only says the comparator checks whether the multiplier output
// exceeds the preset threshold (the Ref input).
//
// Interface: prod (signed) and ref_in (unsigned) in; above out.
// Purely combinational.
module threshold_cmp #(
  parameter int unsigned PROD_W = qrs_pkg::PROD_W
) (
  input  logic signed [PROD_W-1:0] prod,
  input  logic        [PROD_W-1:0] ref_in,
  output logic                     above
);

  logic [PROD_W-1:0] mag;

  always_comb begin
    mag   = prod[PROD_W-1] ? PROD_W'(-prod) : PROD_W'(prod);
    above = mag > ref_in;
  end

endmodule
