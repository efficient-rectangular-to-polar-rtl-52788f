// rpc_error_variance_tb: error statistics of the converter at its default
// size, in the style of a running error-variance plot. A stream of NSAMP
// complex samples with random phase and random amplitude up to AMAX (in
// operand units, LSB = 2^-8) is converted back to back. For each result the
// magnitude error (in operand units) and the phase error (in radians) against
// real-valued sqrt and atan2 are accumulated, and after every sample the
// running variance of each error is formed. The test checks every result
// against loose absolute bounds and the final and peak running variances
// against MAG_VAR_MAX and PHASE_VAR_MAX.
module rpc_error_variance_tb;
  localparam int  P     = 22;
  localparam int  NSAMP = 500;
  localparam real AMAX  = 4096.0;          // largest amplitude, operand units
  localparam real LSB   = 1.0 / 256.0;
  localparam real MAG_VAR_MAX   = 7.48e-6;  // operand units squared
  localparam real PHASE_VAR_MAX = 3.974e-5; // radians squared

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [P-1:0] x_in = '0, y_in = '0;
  logic out_valid;
  logic [P-1:0] mag_out;
  logic signed [P-1:0] phase_out;

  rpc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint x, y; } sample_t;
  sample_t q[$];

  // Running sums of the errors and of their squares.
  real sm, smm, sp, spp;
  real peak_mv, peak_pv;
  int  nres;

  always @(posedge clk) begin
    if (out_valid && !rst) begin : result
      sample_t s;
      real mr, pr, em, ep, mv, pv;
      s  = q.pop_front();
      mr = $sqrt(real'(s.x) * real'(s.x) + real'(s.y) * real'(s.y)) * LSB;
      pr = $atan2(real'(s.y), real'(s.x));
      em = real'(mag_out) * LSB - mr;
      ep = real'(phase_out) * LSB - pr;
      if (ep >  3.14159265358979) ep = ep - 2.0 * 3.14159265358979;
      if (ep < -3.14159265358979) ep = ep + 2.0 * 3.14159265358979;
      sm  += em; smm += em * em;
      sp  += ep; spp += ep * ep;
      nres++;
      mv = smm / nres - (sm / nres) * (sm / nres);
      pv = spp / nres - (sp / nres) * (sp / nres);
      if (nres >= 10) begin
        if (mv > peak_mv) peak_mv = mv;
        if (pv > peak_pv) peak_pv = pv;
      end
      checks++;
      if (em > 4.0 * LSB || em < -4.0 * LSB || ep > 3.0 * LSB || ep < -3.0 * LSB) begin
        failures++;
        $display("FAIL x=%0d y=%0d mag err %g phase err %g", s.x, s.y, em, ep);
      end
    end
  end

  initial begin
    real a, th, mv, pv;
    sm = 0.0; smm = 0.0; sp = 0.0; spp = 0.0; peak_mv = 0.0; peak_pv = 0.0; nres = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      a  = AMAX * real'($urandom_range(1, 10000)) / 10000.0;
      th = 2.0 * 3.14159265358979 * real'($urandom_range(0, 9999)) / 10000.0 - 3.14159265358979;
      x_in = P'($rtoi(a * $cos(th) / LSB));
      y_in = P'($rtoi(a * $sin(th) / LSB));
      in_valid = 1'b1;
      q.push_back('{x: longint'(x_in), y: longint'(y_in)});
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (P + 5) @(negedge clk);
    mv = smm / nres - (sm / nres) * (sm / nres);
    pv = spp / nres - (sp / nres) * (sp / nres);
    $display("samples=%0d magnitude: mean err %g, variance %g (peak %g); phase: mean err %g, variance %g (peak %g)",
             nres, sm / nres, mv, peak_mv, sp / nres, pv, peak_pv);
    checks++;
    if (nres != NSAMP) failures++;
    checks++;
    if (peak_mv > MAG_VAR_MAX) begin
      failures++;
      $display("FAIL magnitude error variance %g above %g", peak_mv, MAG_VAR_MAX);
    end
    checks++;
    if (peak_pv > PHASE_VAR_MAX) begin
      failures++;
      $display("FAIL phase error variance %g above %g", peak_pv, PHASE_VAR_MAX);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
