// rpc_precision_sweep_tb: runs the converter at each of the operand
// precisions 12, 14, 16, 18, 20 and 22 bits (8 fractional bits, one CORDIC
// stage per bit), plus a 22-bit instance without stage registers
// (REGISTER_STAGES = 0, latency 2). Every instance gets its own stream of random vectors from
// all quadrants, scaled to its input range, and every result is checked
// against real-valued sqrt and atan2 and for a latency of PRECISION + 2
// cycles (2 for the unregistered instance). Phases are checked for vectors of at least 64 LSB.
module rpc_precision_sweep_tb;
  localparam int NP = 7;
  localparam int PREC [NP] = '{12, 14, 16, 18, 20, 22, 22};
  localparam bit REGS [NP] = '{1, 1, 1, 1, 1, 1, 0};
  localparam int NSAMP = 400;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks [NP];
  int failures [NP];
  bit done [NP];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  for (genvar k = 0; k < NP; k++) begin : g_p
    localparam int P   = PREC[k];
    localparam int LAT = REGS[k] ? P + 2 : 2;
    logic in_valid = 1'b0;
    logic signed [P-1:0] x_in = '0, y_in = '0;
    logic out_valid;
    logic [P-1:0] mag_out;
    logic signed [P-1:0] phase_out;

    rpc_top #(.PRECISION(P), .REGISTER_STAGES(REGS[k])) dut (.*);

    typedef struct { longint x, y, cyc; } sample_t;
    sample_t q[$];

    initial begin
      sample_t s;
      longint lim, xv, yv;
      real mr, pr, d;
      int got = 0, sent = 0;
      lim = longint'(1) << (P-1);
      checks[k] = 0;
      failures[k] = 0;
      done[k] = 1'b0;
      wait (!rst);
      while (got < NSAMP) begin
        @(negedge clk);
        if (out_valid) begin
          s = q.pop_front();
          got++;
          mr = $sqrt(real'(s.x) * real'(s.x) + real'(s.y) * real'(s.y));
          pr = $atan2(real'(s.y), real'(s.x)) * 256.0;
          d  = real'(phase_out) - pr;
          if (d >  804.25) d = d - 1608.5;
          if (d < -804.25) d = d + 1608.5;
          checks[k] += 2;
          if (fabs(real'(mag_out) - mr) > 4.0 || cyc - s.cyc != LAT ||
              (mr >= 64.0 && fabs(d) > 3.0)) begin
            failures[k]++;
            $display("FAIL P=%0d x=%0d y=%0d mag=%0d phase=%0d want %f %f latency %0d",
                     P, s.x, s.y, mag_out, phase_out, mr, pr, cyc - s.cyc);
          end
        end
        if (sent < NSAMP) begin
          xv = longint'($urandom_range(0, 32'(2*lim-1))) - lim;
          yv = longint'($urandom_range(0, 32'(2*lim-1))) - lim;
          x_in = P'(xv);
          y_in = P'(yv);
          in_valid = 1'b1;
          q.push_back('{x: xv, y: yv, cyc: cyc});
          sent++;
        end else begin
          in_valid = 1'b0;
        end
      end
      done[k] = 1'b1;
    end
  end

  initial begin : watchdog
    repeat (NSAMP + 200) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (done.and());
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
