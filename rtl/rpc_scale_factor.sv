// rpc_scale_factor: removes the CORDIC gain from the magnitude.
//
// The unfolded CORDIC returns K*|v| with the constant gain K = 1.646760. This
// block multiplies by the constant 1/K, held as an unsigned fraction with
// COEF_BITS bits after the point, and rounds back to the operand format,
// dropping the GUARD extra fraction bits the input carries. The
// multiplication by a constant is written as a sum of shifted copies of the
// input, one per set bit of 1/K, so it needs adders only and no multiplier.
// Purely combinational.
//
// Applying the gain as one aggregate correction at the output is the published
// approach; the coefficient width, rounding to nearest and the output width
// (an unsigned magnitude of OW bits, truncated to its low bits) are this
// design's choices.
module rpc_scale_factor #(
  parameter int  IW        = rpc_pkg::DEFAULT_PRECISION + 2, // input width (signed, value >= 0)
  parameter int  OW        = rpc_pkg::DEFAULT_PRECISION,     // output width (unsigned)
  parameter int  COEF_BITS = rpc_pkg::DEFAULT_PRECISION,     // fraction bits of 1/K
  parameter int  GUARD     = 0,                              // extra input fraction bits
  parameter real GAIN      = rpc_pkg::CORDIC_GAIN            // K
) (
  input  logic signed [IW-1:0] x_in,     // K * magnitude, non-negative
  output logic        [OW-1:0] mag_out   // round(x_in / K / 2^GUARD)
);
  localparam int SH = COEF_BITS + GUARD;   // total fraction bits of the product
  localparam int PW = IW + COEF_BITS;
  localparam logic [COEF_BITS-1:0] INV_GAIN = COEF_BITS'(rpc_pkg::inv_gain_lsb(GAIN, COEF_BITS));

  logic [PW-1:0] acc;

  always_comb begin
    acc = PW'(1) << (SH - 1);   // rounding constant, one half LSB
    for (int b = 0; b < COEF_BITS; b++) begin
      if (INV_GAIN[b]) acc = acc + (PW'(unsigned'(x_in)) << b);
    end
    mag_out = OW'(acc >> SH);
  end
endmodule
