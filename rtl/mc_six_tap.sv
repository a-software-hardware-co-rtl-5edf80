// mc_six_tap -- one 6-tap half-sample interpolation filter (taps
// 1, -5, 20, 20, -5, 1), as used for luma motion compensation.
//
// Purely combinational.  The multiplications by the fixed taps are written
// as constant products, which synthesis turns into shifts and adds (the
// "hardwired" multiplier of the MC coprocessor).  The output is the raw,
// unrounded filter sum; rounding and clipping are done by the caller, so
// that a row-filter result can be fed back and filtered again column-wise.
// The tap values come from the design description; widths are parameters.
module mc_six_tap #(
  parameter int unsigned IW = 16,   // input width (signed)
  parameter int unsigned OW = 22    // output width (signed)
) (
  input  logic signed [IW-1:0] x [6],
  output logic signed [OW-1:0] y
);
  always_comb begin
    y = OW'(x[0]) - 5 * OW'(x[1]) + 20 * OW'(x[2])
      + 20 * OW'(x[3]) - 5 * OW'(x[4]) + OW'(x[5]);
  end
endmodule
