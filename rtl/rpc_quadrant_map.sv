// rpc_quadrant_map: coarse angle rotation in front of the CORDIC chain.
//
// CORDIC vectoring only converges for angles between -90 and +90 degrees, so
// this block reflects a vector from the second or third quadrant into the
// first or fourth one by replacing x with |x| (a comparator, a negator and a
// multiplexer). y passes unchanged. The signs of the original x and y are
// passed on so that the quadrant correction at the output can undo the
// reflection. Purely combinational; the output x is one bit wider than the
// input so that |-2^(W-1)| is representable.
//
// Follows the published structure; the sign convention (sign bit set means
// negative, zero counts as non-negative) is this design's choice.
module rpc_quadrant_map #(
  parameter int W = rpc_pkg::DEFAULT_PRECISION  // operand width
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W:0]   x_out,     // |x_in|, always >= 0
  output logic signed [W:0]   y_out,     // y_in, sign-extended
  output logic                x_neg,     // original x < 0 (reflection applied)
  output logic                y_neg      // original y < 0
);
  always_comb begin
    x_neg = x_in[W-1];
    y_neg = y_in[W-1];
    x_out = x_neg ? -(W+1)'(x_in) : (W+1)'(x_in);
    y_out = (W+1)'(y_in);
  end
endmodule
