// rpc_top: rectangular-to-polar converter built on an unfolded CORDIC.
//
// Converts a complex sample (x, y) into its magnitude sqrt(x^2 + y^2) and
// phase atan2(y, x), as needed by a digital polar transmitter. Three steps:
//   1. rpc_quadrant_map (coarse rotation) reflects x < 0 vectors into the
//      right half plane, where CORDIC converges, and keeps the two signs;
//   2. rpc_fine_angle_rotation runs STAGES = PRECISION vectoring
//      micro-rotations, one processing element per stage, starting from z = 0;
//   3. rpc_scale_factor removes the CORDIC gain K from the magnitude and
//      rpc_quadrant_correct maps the angle back to the original quadrant.
//
// Interface: x_in, y_in are signed PRECISION-bit numbers with FRAC_BITS
// fractional bits. mag_out is unsigned in the same scaling; phase_out is
// signed, in radians, also with FRAC_BITS fractional bits, in (-pi, pi].
// For the zero vector the phase is not meaningful.
//
// Timing: a new sample may be presented every cycle (in_valid). With
// REGISTER_STAGES = 1 the result appears PRECISION + 2 cycles later with
// out_valid: one register after the quadrant map, one per CORDIC stage and
// one at the output. With REGISTER_STAGES = 0 the CORDIC chain is
// combinational and the latency is 2 cycles. There is no back-pressure. The
// reset is synchronous and clears only the valid pipeline.
//
// The structure, the 22-bit / 8-fraction-bit operands, one stage per bit of
// precision and K = 1.646760 follow the published design. The datapath width
// (two integer bits of headroom above PRECISION and GUARD_BITS extra fraction
// bits, two by default, the fewest that keep the magnitude error variance
// within the published figure), the register placement, the valid handshake
// and the reset are this design's choices.
module rpc_top #(
  parameter int  PRECISION       = rpc_pkg::DEFAULT_PRECISION, // operand width
  parameter int  FRAC_BITS       = rpc_pkg::DEFAULT_FRAC_BITS, // binary point
  parameter int  STAGES          = PRECISION,                  // micro-rotations
  parameter int  GUARD_BITS      = rpc_pkg::DEFAULT_GUARD_BITS,// extra x/y fraction bits
  parameter bit  REGISTER_STAGES = 1'b1,                       // register per CORDIC stage
  parameter real GAIN            = rpc_pkg::CORDIC_GAIN        // CORDIC gain K
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic signed [PRECISION-1:0] x_in,
  input  logic signed [PRECISION-1:0] y_in,
  output logic                        out_valid,
  output logic        [PRECISION-1:0] mag_out,
  output logic signed [PRECISION-1:0] phase_out
);
  // x/y datapath: |x| needs one extra bit, the CORDIC growth K*sqrt(2) < 4
  // one more, and GUARD_BITS fraction bits absorb the truncation of the
  // shifted operands in the stages.
  localparam int XW = PRECISION + 2 + GUARD_BITS;
  localparam int ZW = PRECISION;

  // ---- coarse angle rotation ----
  logic signed [PRECISION:0] qm_x, qm_y;
  logic                      qm_xneg, qm_yneg;

  rpc_quadrant_map #(.W(PRECISION)) u_qmap (
    .x_in(x_in), .y_in(y_in),
    .x_out(qm_x), .y_out(qm_y), .x_neg(qm_xneg), .y_neg(qm_yneg)
  );

  logic signed [XW-1:0] r_x, r_y;
  logic [1:0]           r_signs;
  logic                 r_valid;

  always_ff @(posedge clk) begin
    r_x     <= XW'(qm_x) <<< GUARD_BITS;
    r_y     <= XW'(qm_y) <<< GUARD_BITS;
    r_signs <= {qm_xneg, qm_yneg};
    if (rst) r_valid <= 1'b0;
    else     r_valid <= in_valid;
  end

  // ---- fine angle rotation ----
  logic signed [XW-1:0] c_x, c_y;
  logic signed [ZW-1:0] c_z;
  logic [1:0]           c_signs;
  logic                 c_valid;

  rpc_fine_angle_rotation #(
    .XW(XW), .ZW(ZW), .FRAC_BITS(FRAC_BITS), .STAGES(STAGES),
    .TAG_W(2), .REGISTER_STAGES(REGISTER_STAGES)
  ) u_far (
    .clk(clk), .rst(rst),
    .in_valid(r_valid), .in_tag(r_signs), .x_in(r_x), .y_in(r_y),
    .out_valid(c_valid), .out_tag(c_signs),
    .x_out(c_x), .y_out(c_y), .z_out(c_z)
  );

  // ---- scale factor and quadrant correction ----
  logic [PRECISION-1:0]        s_mag;
  logic signed [PRECISION-1:0] q_phase;

  rpc_scale_factor #(
    .IW(XW), .OW(PRECISION), .COEF_BITS(PRECISION), .GUARD(GUARD_BITS), .GAIN(GAIN)
  ) u_scale (
    .x_in(c_x), .mag_out(s_mag)
  );

  rpc_quadrant_correct #(.ZW(ZW), .FRAC_BITS(FRAC_BITS)) u_qcorr (
    .z_in(c_z), .x_neg(c_signs[1]), .y_neg(c_signs[0]), .z_out(q_phase)
  );

  always_ff @(posedge clk) begin
    mag_out   <= s_mag;
    phase_out <= q_phase;
    if (rst) out_valid <= 1'b0;
    else     out_valid <= c_valid;
  end

  // The residual y is not an output; it only has to be close to zero.
  logic unused_y;
  assign unused_y = ^c_y;
endmodule
