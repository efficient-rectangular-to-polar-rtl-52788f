// rpc_top_tb: end-to-end test of the rectangular-to-polar converter at its
// default size (22-bit operands, 8 fractional bits, 22 CORDIC stages).
// Random vectors from all four quadrants, the axes and the range limits stream
// in with random gaps. Every result is matched to its input and checked
// against sqrt(x^2 + y^2) and atan2(y, x) computed in real arithmetic, and the
// latency must be PRECISION + 2 = 24 cycles. The phase is only checked for
// vectors of at least 64 LSB: without guard bits, a vector only a few LSB long
// cannot be rotated accurately and its phase is coarse. A reset in mid-stream must drop
// the samples in flight. The test also counts how often each mechanism was
// exercised (no reflection, second-quadrant and third-quadrant correction,
// the negative x axis, back-to-back samples, gaps, the reset flush) and fails
// if one never happened.
module rpc_top_tb;
  localparam int  P    = 22;
  localparam int  LAT  = P + 2;
  localparam real MTOL = 4.0;   // magnitude tolerance in LSB
  localparam real PTOL = 3.0;   // phase tolerance in LSB of 2^-8 rad

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [P-1:0] x_in = '0, y_in = '0;
  logic out_valid;
  logic [P-1:0] mag_out;
  logic signed [P-1:0] phase_out;

  rpc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint x, y, cyc; } sample_t;
  sample_t q[$];

  // Mechanism counters.
  int n_direct, n_q2, n_q3, n_negaxis, n_b2b, n_gap, n_flushed;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic void check(input sample_t s, input longint mo, input longint po);
    real mr, pr, d, two_pi;
    two_pi = 2.0 * 3.14159265358979 * 256.0;
    mr = $sqrt(real'(s.x) * real'(s.x) + real'(s.y) * real'(s.y));
    pr = $atan2(real'(s.y), real'(s.x)) * 256.0;
    checks++;
    if (fabs(real'(mo) - mr) > MTOL) begin
      failures++;
      $display("FAIL magnitude x=%0d y=%0d got %0d want %f", s.x, s.y, mo, mr);
    end
    if (mr >= 64.0) begin
      d = real'(po) - pr;
      if (d >  two_pi / 2.0) d = d - two_pi;   // +pi and -pi are the same angle
      if (d < -two_pi / 2.0) d = d + two_pi;
      checks++;
      if (fabs(d) > PTOL) begin
        failures++;
        $display("FAIL phase x=%0d y=%0d got %0d want %f", s.x, s.y, po, pr);
      end
    end
    checks++;
    if (cyc - s.cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d, want %0d", cyc - s.cyc, LAT);
    end
    if (s.x >= 0)           n_direct++;
    else if (s.y > 0)       n_q2++;
    else if (s.y < 0)       n_q3++;
    else                    n_negaxis++;
  endfunction

  initial begin
    longint lim, xv, yv;
    int sent = 0, received = 0;
    bit prev_valid = 1'b0;
    lim = longint'(1) << (P-1);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL output without input");
        end else begin
          check(q.pop_front(), longint'(mag_out), longint'(phase_out));
          received++;
        end
      end
      // Reset in mid-stream at cycle 2000: everything in flight is dropped.
      if (n == 2000) begin
        rst = 1'b1;
        n_flushed += q.size();
        q.delete();
        in_valid = 1'b0;
        @(negedge clk);
        rst = 1'b0;
        continue;
      end
      if (n < 3900 && $urandom_range(0, 4) != 0) begin
        case (n % 997)
          0: begin xv = -lim;   yv = 0;      end
          1: begin xv = -lim;   yv = -lim;   end
          2: begin xv = lim-1;  yv = lim-1;  end
          3: begin xv = 0;      yv = 0;      end
          4: begin xv = 0;      yv = -lim;   end
          5: begin xv = -1;     yv = 0;      end
          6: begin xv = -lim;   yv = lim-1;  end
          default: begin
            xv = longint'($urandom_range(0, 32'(2*lim-1))) - lim;
            yv = longint'($urandom_range(0, 32'(2*lim-1))) - lim;
          end
        endcase
        x_in = P'(xv);
        y_in = P'(yv);
        in_valid = 1'b1;
        q.push_back('{x: xv, y: yv, cyc: cyc});
        sent++;
        if (prev_valid) n_b2b++;
      end else begin
        in_valid = 1'b0;
        n_gap++;
      end
      prev_valid = in_valid;
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("mechanisms: direct=%0d q2=%0d q3=%0d neg_axis=%0d back_to_back=%0d gaps=%0d flushed=%0d",
             n_direct, n_q2, n_q3, n_negaxis, n_b2b, n_gap, n_flushed);
    $display("samples sent=%0d results=%0d", sent, received);
    checks++; if (n_direct  == 0) failures++;
    checks++; if (n_q2      == 0) failures++;
    checks++; if (n_q3      == 0) failures++;
    checks++; if (n_negaxis == 0) failures++;
    checks++; if (n_b2b     == 0) failures++;
    checks++; if (n_gap     == 0) failures++;
    checks++; if (n_flushed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
