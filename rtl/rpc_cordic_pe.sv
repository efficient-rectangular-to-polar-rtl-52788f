// rpc_cordic_pe: one processing element of the unfolded CORDIC, vectoring mode.
//
// Stage SHIFT rotates (x, y) by +-atan(2^-SHIFT) using only shifts and adds:
//   y >= 0:  x' = x + (y >>> SHIFT),  y' = y - (x >>> SHIFT),  z' = z + ALPHA
//   y <  0:  x' = x - (y >>> SHIFT),  y' = y + (x >>> SHIFT),  z' = z - ALPHA
// so the rotation always drives y towards zero and z accumulates the angle.
// The shifts are by constants and cost only wiring. ALPHA is atan(2^-SHIFT) in
// the angle format (radians, FRAC_BITS fractional bits), computed at
// elaboration. Purely combinational; registers between stages are placed by
// rpc_fine_angle_rotation.
//
// The recurrence and the sign steering are the published ones; the
// arithmetic shift (truncation towards minus infinity) is this design's choice.
module rpc_cordic_pe #(
  parameter int XW        = rpc_pkg::DEFAULT_PRECISION + 2, // x/y datapath width
  parameter int ZW        = rpc_pkg::DEFAULT_PRECISION,     // angle width
  parameter int FRAC_BITS = rpc_pkg::DEFAULT_FRAC_BITS,     // angle fraction bits
  parameter int SHIFT     = 0                               // stage index i
) (
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic signed [ZW-1:0] z_out
);
  localparam logic signed [ZW-1:0] ALPHA = ZW'(rpc_pkg::atan_lsb(SHIFT, FRAC_BITS));

  logic signed [XW-1:0] x_sh, y_sh;

  always_comb begin
    x_sh = x_in >>> SHIFT;
    y_sh = y_in >>> SHIFT;
    if (!y_in[XW-1]) begin
      x_out = x_in + y_sh;
      y_out = y_in - x_sh;
      z_out = z_in + ALPHA;
    end else begin
      x_out = x_in - y_sh;
      y_out = y_in + x_sh;
      z_out = z_in - ALPHA;
    end
  end
endmodule
