// Reference FP32 arithmetic for the testbenches, written with the simulator's double
// precision "real" type. A product or sum of two FP32 numbers is rounded once to double and
// then to FP32; with 53 >= 2*24+2 bits this double rounding equals a single correct rounding,
// so the results are the exact round-to-nearest-even FP32 answers. Subnormals flush to zero.
package cg_tb_fp_pkg;

  function automatic real fp2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], {3'b000, f[30:23]} + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2fp(input real r);
    logic [63:0] d;
    logic [10:0] e;
    logic [52:0] m;
    logic [24:0] mr;
    logic        g, s;
    int          ef;
    d = $realtobits(r);
    e = d[62:52];
    if (e == 11'd0) return {d[63], 31'd0};
    m  = {1'b1, d[51:0]};
    g  = m[28];
    s  = |m[27:0];
    mr = {1'b0, m[52:29]} + {24'd0, g & (s | m[29])};
    ef = int'(e) - 1023 + 127;
    if (mr[24]) ef = ef + 1;
    if (ef <= 0)   return {d[63], 31'd0};
    if (ef >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(ef), mr[22:0]};
  endfunction

  // random FP32 number with a moderate exponent, so sums and products stay normal
  function automatic logic [31:0] rand_fp(input int emin = 110, input int emax = 140);
    logic [31:0] f;
    f = $urandom;
    f[30:23] = 8'(emin + ($urandom % (emax - emin + 1)));
    return f;
  endfunction

endpackage
