// rpc_fine_angle_rotation_tb: self-checking test of the unfolded CORDIC chain.
// Two instances with 22 stages run side by side: one with a register after
// every stage and one fully combinational. Random right-half-plane vectors
// (x >= 0) stream in with random gaps. The pipelined outputs are matched to
// their inputs through a queue and checked against real arithmetic:
// z ~ atan(y/x) in 2^-8 rad units, x ~ Kn * |v| with Kn the exact gain of 22
// stages, y ~ 0, the tag unchanged and the latency exactly 22 cycles. The
// combinational instance is checked against the same reference for the
// vector currently applied.
module rpc_fine_angle_rotation_tb;
  localparam int XW = 24, ZW = 22, FB = 8, ST = 22;
  localparam real ZTOL = 3.0;   // angle tolerance, LSB
  localparam real XTOL = 24.0;  // magnitude tolerance, LSB: each stage truncates by < 1 LSB
  localparam real YTOL = 24.0;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [15:0] in_tag = '0;
  logic signed [XW-1:0] x_in = '0, y_in = '0;
  logic out_valid, c_valid;
  logic [15:0] out_tag, c_tag;
  logic signed [XW-1:0] x_out, y_out, c_x, c_y;
  logic signed [ZW-1:0] z_out, c_z;

  rpc_fine_angle_rotation #(.XW(XW), .ZW(ZW), .FRAC_BITS(FB), .STAGES(ST),
                            .TAG_W(16), .REGISTER_STAGES(1'b1)) dut (
    .clk, .rst, .in_valid, .in_tag, .x_in, .y_in,
    .out_valid, .out_tag, .x_out, .y_out, .z_out);

  rpc_fine_angle_rotation #(.XW(XW), .ZW(ZW), .FRAC_BITS(FB), .STAGES(ST),
                            .TAG_W(16), .REGISTER_STAGES(1'b0)) dut_comb (
    .clk, .rst, .in_valid, .in_tag, .x_in, .y_in,
    .out_valid(c_valid), .out_tag(c_tag), .x_out(c_x), .y_out(c_y), .z_out(c_z));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint x, y, cyc; int tag; } sample_t;
  sample_t q[$];
  real kn;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Checks one result against the reference for input (xv, yv).
  function automatic void check(input string who, input longint xv, input longint yv,
                                input longint xo, input longint yo, input longint zo);
    real zr, xr;
    zr = $atan2(real'(yv), real'(xv)) * 256.0;
    xr = kn * $sqrt(real'(xv) * real'(xv) + real'(yv) * real'(yv));
    checks++;
    if ((xv != 0 || yv != 0) && fabs(real'(zo) - zr) > ZTOL) begin
      failures++;
      $display("FAIL %s angle x=%0d y=%0d z=%0d want %f", who, xv, yv, zo, zr);
    end
    checks++;
    if (fabs(real'(xo) - xr) > XTOL || fabs(real'(yo)) > YTOL) begin
      failures++;
      $display("FAIL %s vector x=%0d y=%0d got x=%0d y=%0d want x=%f", who, xv, yv, xo, yo, xr);
    end
  endfunction

  initial begin
    sample_t s;
    int outputs = 0, sent = 0;
    longint xv, yv;
    kn = 1.0;
    for (int i = 0; i < ST; i++) kn = kn * $sqrt(1.0 + 2.0 ** (-2 * i));
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // pipelined instance
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          s = q.pop_front();
          outputs++;
          check("pipe", s.x, s.y, longint'(x_out), longint'(y_out), longint'(z_out));
          checks++;
          if (cyc - s.cyc != ST || int'(out_tag) != s.tag) begin
            failures++;
            $display("FAIL latency %0d (want %0d) tag %0d (want %0d)", cyc - s.cyc, ST, out_tag, s.tag);
          end
        end
      end
      // combinational instance, for the vector applied last time
      if (in_valid) begin
        check("comb", longint'(x_in), longint'(y_in), longint'(c_x), longint'(c_y), longint'(c_z));
        checks++;
        if (!c_valid || c_tag != in_tag) failures++;
      end
      // next input
      if (n < 2900 && $urandom_range(0, 3) != 0) begin
        case (n)
          0: begin xv = 1 << 21; yv = 0;        end
          1: begin xv = 0;       yv = 1 << 21;  end
          2: begin xv = 0;       yv = -(1 << 21); end
          3: begin xv = 1 << 21; yv = 1 << 21;  end
          default: begin
            xv = longint'($urandom_range(0, 1 << 21));
            yv = longint'($urandom_range(0, 1 << 22)) - (1 << 21);
          end
        endcase
        in_valid = 1'b1;
        x_in = XW'(xv);
        y_in = XW'(yv);
        in_tag = 16'(sent);
        q.push_back('{x: xv, y: yv, cyc: cyc, tag: sent & 16'hffff});
        sent++;
      end else begin
        in_valid = 1'b0;
      end
    end
    checks++;
    if (outputs != sent || q.size() != 0) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
