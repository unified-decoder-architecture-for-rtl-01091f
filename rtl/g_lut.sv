// g_lut: the small correction table g(x) = log(1+exp(-x)) of the log-MAP
// kernel, for q:2 data (LSB = 0.25).
//
// Nine entries of two bits: |x| = 0 gives 3 (0.75), 1..3 give 2 (0.5),
// 4..8 give 1 (0.25) and anything larger gives 0. This is the table of the
// architecture; how it is indexed is this design's choice.
// With DOUBLE_SIDED = 0 it is the plain LUT, indexed by a non-negative sum
// (a negative index reads as 0). With DOUBLE_SIDED = 1 it is the "double-side"
// DLUT that accepts a signed difference directly and looks up its magnitude,
// so no absolute-value stage sits in front of it.
// Purely combinational.
module g_lut #(
  parameter int unsigned IW = 11,
  parameter bit DOUBLE_SIDED = 1'b0
) (
  input  logic signed [IW-1:0] idx,
  output logic [1:0]           g
);
  import udec_pkg::*;

  int signed mag;

  always_comb begin
    mag = int'(idx);
    if (mag >= 0)
      g = g_of(mag);
    else if (DOUBLE_SIDED)
      g = g_of(-mag);
    else
      g = 2'd0;
  end
endmodule
