// rpc_scale_factor_tb: self-checking test of the gain correction. Random
// non-negative inputs up to the largest value whose quotient fits the
// 22-bit output (above what the CORDIC can produce) are divided by
// K = 1.646760 in real arithmetic; the RTL result must be within one LSB.
module rpc_scale_factor_tb;
  localparam int IW = 24, OW = 22;
  logic signed [IW-1:0] x_in;
  logic        [OW-1:0] mag_out;
  int checks = 0, failures = 0;

  rpc_scale_factor #(.IW(IW), .OW(OW), .COEF_BITS(22), .GAIN(1.646760)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want, err;
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: x_in = '0;
        1: x_in = IW'(6900000);
        2: x_in = IW'(1);
        default: x_in = IW'($urandom_range(0, 6900000));
      endcase
      #1;
      want = real'(x_in) / 1.646760;
      err  = real'(mag_out) - want;
      checks++;
      if (err > 1.0 || err < -1.0) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d mag=%0d want=%f", x_in, mag_out, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
