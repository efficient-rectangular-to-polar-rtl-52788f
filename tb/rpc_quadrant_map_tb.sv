// rpc_quadrant_map_tb: self-checking test of the coarse angle rotation.
// Drives random and corner-case vectors (both signs, zero, the most negative
// value) and checks |x|, the unchanged y and both sign flags against values
// computed here with integer arithmetic.
module rpc_quadrant_map_tb;
  localparam int W = 22;
  logic signed [W-1:0] x_in, y_in;
  logic signed [W:0]   x_out, y_out;
  logic                x_neg, y_neg;
  int checks = 0, failures = 0;

  rpc_quadrant_map #(.W(W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compares the outputs with the expected values for the applied inputs.
  function automatic void check(input longint xv, input longint yv);
    longint ax;
    ax = (xv < 0) ? -xv : xv;
    checks++;
    if (longint'(x_out) != ax || longint'(y_out) != yv ||
        x_neg != (xv < 0) || y_neg != (yv < 0)) begin
      failures++;
      $display("FAIL x=%0d y=%0d -> x_out=%0d y_out=%0d xn=%0b yn=%0b",
               xv, yv, x_out, y_out, x_neg, y_neg);
    end
  endfunction

  initial begin
    longint lim, xv, yv;
    lim = longint'(1) << (W-1);
    for (int n = 0; n < 2005; n++) begin
      case (n)
        0: begin xv = 0;      yv = 0;      end
        1: begin xv = -lim;   yv = -lim;   end
        2: begin xv = lim-1;  yv = lim-1;  end
        3: begin xv = -1;     yv = 1;      end
        4: begin xv = 1;      yv = -1;     end
        default: begin
          xv = longint'($urandom_range(0, 32'(2*lim-1))) - lim;
          yv = longint'($urandom_range(0, 32'(2*lim-1))) - lim;
        end
      endcase
      x_in = W'(xv);
      y_in = W'(yv);
      #1;
      check(xv, yv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
