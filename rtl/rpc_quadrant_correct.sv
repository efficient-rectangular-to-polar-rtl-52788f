// rpc_quadrant_correct: undoes the coarse angle rotation on the angle.
//
// If the input vector was reflected from the second or third quadrant
// (original x negative), the CORDIC angle z belongs to the mirrored vector.
// The true angle is then pi - z for the second quadrant (original y >= 0)
// and -pi - z for the third quadrant (original y < 0); otherwise z is passed
// unchanged. Angles are in radians with FRAC_BITS fractional bits, so the
// output covers (-pi, pi]. Purely combinational.
//
// The two reflections are the published ones; treating y = 0 with x < 0 as
// the second quadrant (angle +pi) is this design's choice.
module rpc_quadrant_correct #(
  parameter int ZW        = rpc_pkg::DEFAULT_PRECISION,  // angle width
  parameter int FRAC_BITS = rpc_pkg::DEFAULT_FRAC_BITS   // angle fraction bits
) (
  input  logic signed [ZW-1:0] z_in,
  input  logic                 x_neg,   // original x < 0
  input  logic                 y_neg,   // original y < 0
  output logic signed [ZW-1:0] z_out
);
  localparam logic signed [ZW-1:0] PI = ZW'(rpc_pkg::pi_lsb(FRAC_BITS));

  always_comb begin
    if (!x_neg)      z_out = z_in;
    else if (!y_neg) z_out = PI - z_in;
    else             z_out = -PI - z_in;
  end
endmodule
