// rpc_quadrant_correct_tb: self-checking test of the quadrant correction.
// For every sign combination and random angles in [-pi/2, pi/2] the output
// must be z, 180 degrees - z or -180 degrees - z, with pi = round(pi * 2^8)
// computed here.
module rpc_quadrant_correct_tb;
  localparam int ZW = 22, FB = 8;
  logic signed [ZW-1:0] z_in, z_out;
  logic                 x_neg, y_neg;
  int checks = 0, failures = 0;
  int seen [4];

  rpc_quadrant_correct #(.ZW(ZW), .FRAC_BITS(FB)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pi_q, zv, want;
    pi_q = $rtoi(3.14159265358979 * 256.0 + 0.5);
    for (int n = 0; n < 2000; n++) begin
      zv = $urandom_range(0, 2 * 402) - 402;
      {x_neg, y_neg} = 2'(n);
      z_in = ZW'(zv);
      #1;
      if (!x_neg)      want = zv;
      else if (!y_neg) want = pi_q - zv;
      else             want = -pi_q - zv;
      seen[{x_neg, y_neg}]++;
      checks++;
      if (int'(z_out) != want) begin
        failures++;
        if (failures < 10) $display("FAIL z=%0d xn=%0b yn=%0b got %0d want %0d",
                                    zv, x_neg, y_neg, z_out, want);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
