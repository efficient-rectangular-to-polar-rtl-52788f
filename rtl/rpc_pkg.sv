// rpc_pkg: constants and elaboration-time helper functions shared by the
// rectangular-to-polar converter (RPC).
//
// All operands are signed two's-complement fixed-point numbers of PRECISION
// bits with FRAC_BITS bits after the binary point; angles use the same format
// and are in radians. The default sizes (22-bit operands, 8 fractional bits)
// and the CORDIC gain K = 1.646760 are the published numbers for this
// converter. The helper functions turn real-valued constants (the elementary
// angles atan(2^-i), pi and 1/K) into fixed-point integers at elaboration time,
// so no table has to be stored in a file; they are never evaluated in hardware.
package rpc_pkg;

  // Default operand precision and binary point.
  parameter int  DEFAULT_PRECISION = 22;
  parameter int  DEFAULT_FRAC_BITS = 8;
  // Extra fraction bits of the internal x/y datapath.
  parameter int  DEFAULT_GUARD_BITS = 2;
  // Aggregate CORDIC gain removed at the magnitude output.
  parameter real CORDIC_GAIN       = 1.646760;

  // Elementary rotation angle of stage i, atan(2^-i) in radians, rounded to
  // an integer number of 2^-frac_bits units.
  function automatic int atan_lsb(input int i, input int frac_bits);
    real a;
    a = $atan(1.0 / (2.0 ** i)) * (2.0 ** frac_bits);
    return $rtoi(a + 0.5);
  endfunction

  // pi in 2^-frac_bits units, rounded.
  function automatic int pi_lsb(input int frac_bits);
    real p;
    p = 3.14159265358979323846 * (2.0 ** frac_bits);
    return $rtoi(p + 0.5);
  endfunction

  // 1/gain as an unsigned fraction with coef_bits bits after the point,
  // rounded. The result is below 2^coef_bits for any gain above 1.
  function automatic longint inv_gain_lsb(input real gain, input int coef_bits);
    real c;
    c = (2.0 ** coef_bits) / gain;
    return longint'(c + 0.5);
  endfunction

endpackage
