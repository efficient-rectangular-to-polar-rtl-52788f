// rpc_fine_angle_rotation: the unfolded (fully parallel) CORDIC in vectoring mode.
//
// STAGES processing elements (rpc_cordic_pe, stage i rotating by
// +-atan(2^-i)) are chained, so every micro-rotation has its own hardware and
// a new vector can enter every clock cycle. The angle accumulator starts from
// the constant z0 = 0. After the chain, x holds K*sqrt(x0^2 + y0^2) (the gain
// K is removed later, in rpc_scale_factor), y is close to zero and z holds
// atan(y0/x0) for x0 >= 0.
//
// Timing: with REGISTER_STAGES = 1 (default) a register follows every
// processing element, so the latency is STAGES cycles and the throughput one
// vector per cycle. With REGISTER_STAGES = 0 the chain is combinational and
// the latency is 0. in_valid and a TAG_W-bit side band (used by the top for
// the quadrant signs) travel with the data. Only the valid bits are reset
// (synchronous reset, active high).
//
// One stage per bit of precision and z0 = 0 follow the published design; the
// register after every stage, the valid/tag side band and the reset are this
// design's choices.
module rpc_fine_angle_rotation #(
  parameter int XW              = rpc_pkg::DEFAULT_PRECISION + 2, // x/y width
  parameter int ZW              = rpc_pkg::DEFAULT_PRECISION,     // angle width
  parameter int FRAC_BITS       = rpc_pkg::DEFAULT_FRAC_BITS,     // angle fraction bits
  parameter int STAGES          = rpc_pkg::DEFAULT_PRECISION,     // micro-rotations
  parameter int TAG_W           = 1,                              // side-band width
  parameter bit REGISTER_STAGES = 1'b1                            // pipeline register per stage
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic signed [ZW-1:0] z_out
);
  // Element k of each array is the input of stage k; element STAGES is the
  // chain's output.
  logic signed [XW-1:0] xs [STAGES+1];
  logic signed [XW-1:0] ys [STAGES+1];
  logic signed [ZW-1:0] zs [STAGES+1];
  logic                 vs [STAGES+1];
  logic [TAG_W-1:0]     ts [STAGES+1];

  assign xs[0] = x_in;
  assign ys[0] = y_in;
  assign zs[0] = '0;          // constant initial angle
  assign vs[0] = in_valid;
  assign ts[0] = in_tag;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    logic signed [XW-1:0] xn, yn;
    logic signed [ZW-1:0] zn;

    rpc_cordic_pe #(
      .XW(XW), .ZW(ZW), .FRAC_BITS(FRAC_BITS), .SHIFT(i)
    ) u_pe (
      .x_in(xs[i]), .y_in(ys[i]), .z_in(zs[i]),
      .x_out(xn),   .y_out(yn),   .z_out(zn)
    );

    if (REGISTER_STAGES) begin : g_reg
      always_ff @(posedge clk) begin
        xs[i+1] <= xn;
        ys[i+1] <= yn;
        zs[i+1] <= zn;
        ts[i+1] <= ts[i];
        if (rst) vs[i+1] <= 1'b0;
        else     vs[i+1] <= vs[i];
      end
    end else begin : g_comb
      assign xs[i+1] = xn;
      assign ys[i+1] = yn;
      assign zs[i+1] = zn;
      assign ts[i+1] = ts[i];
      assign vs[i+1] = vs[i];
    end
  end

  assign x_out     = xs[STAGES];
  assign y_out     = ys[STAGES];
  assign z_out     = zs[STAGES];
  assign out_valid = vs[STAGES];
  assign out_tag   = ts[STAGES];
endmodule
