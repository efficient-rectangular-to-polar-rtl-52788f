// rpc_cordic_pe_tb: self-checking test of single CORDIC processing elements.
// Three elements (stage 0, 3 and 9) get random inputs of both signs. The
// expected outputs use floor division by 2^i and the elementary angle
// round(atan(2^-i) * 2^8), both computed here independently of the RTL.
module rpc_cordic_pe_tb;
  localparam int XW = 24, ZW = 22, FB = 8;
  localparam int NS = 3;
  localparam int SH [NS] = '{0, 3, 9};

  logic signed [XW-1:0] x_in, y_in;
  logic signed [ZW-1:0] z_in;
  logic signed [XW-1:0] xo [NS];
  logic signed [XW-1:0] yo [NS];
  logic signed [ZW-1:0] zo [NS];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NS; k++) begin : g_pe
    rpc_cordic_pe #(.XW(XW), .ZW(ZW), .FRAC_BITS(FB), .SHIFT(SH[k])) dut (
      .x_in(x_in), .y_in(y_in), .z_in(z_in),
      .x_out(xo[k]), .y_out(yo[k]), .z_out(zo[k]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(input longint v, input int s);
    return longint'($floor(real'(v) / (2.0 ** s)));
  endfunction

  initial begin
    longint xv, yv, zv, ex, ey, ez, alpha;
    for (int n = 0; n < 3000; n++) begin
      xv = longint'($urandom_range(0, 1 << 22));
      yv = longint'($urandom_range(0, 1 << 23)) - (1 << 22);
      zv = longint'($urandom_range(0, 2000)) - 1000;
      if (n == 0) yv = 0;
      x_in = XW'(xv); y_in = XW'(yv); z_in = ZW'(zv);
      #1;
      for (int k = 0; k < NS; k++) begin
        alpha = longint'($rtoi($atan(1.0 / (2.0 ** SH[k])) * 256.0 + 0.5));
        if (yv >= 0) begin
          ex = xv + fdiv(yv, SH[k]); ey = yv - fdiv(xv, SH[k]); ez = zv + alpha;
        end else begin
          ex = xv - fdiv(yv, SH[k]); ey = yv + fdiv(xv, SH[k]); ez = zv - alpha;
        end
        checks++;
        if (longint'(xo[k]) != ex || longint'(yo[k]) != ey || longint'(zo[k]) != ez) begin
          failures++;
          if (failures < 10)
            $display("FAIL stage %0d x=%0d y=%0d z=%0d: got %0d %0d %0d want %0d %0d %0d",
                     SH[k], xv, yv, zv, xo[k], yo[k], zo[k], ex, ey, ez);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
