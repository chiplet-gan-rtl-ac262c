// FP32 adder, one of the 16 adders in front of the accumulation buffer of a PE.
//
// Combinational IEEE-754 single-precision addition with round-to-nearest-even. The operands
// are ordered by magnitude, the smaller one is aligned into a 51-bit field (26 bits below the
// mantissa, the last one a sticky bit), added or subtracted, normalised with a leading-one
// search and rounded. The 32-bit floating-point accumulators are the published
// configuration; the special-value handling is this design's choice, as in the multiplier:
// subnormals flush to zero, overflow gives infinity, NaN and inf - inf give a quiet NaN, and an
// exact cancellation gives +0. Interface: a, b in, y out; purely combinational.
module cg_fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam int W = 51;   // 1 carry + 24 mantissa + 26 extension bits
  logic [31:0] x, z;       // x has the larger magnitude
  logic [7:0]  ex, ez, d;
  logic [W-1:0] mx, mz, mz_sh, sum;
  logic        sub, lost;
  int          lead, sh;
  logic [W-1:0] norm;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic [9:0]  e_fin;

  always_comb begin
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    ex = x[30:23]; ez = z[30:23];
    sub = x[31] ^ z[31];
    mx = {1'b0, 1'b1, x[22:0], 26'd0};
    mz = (ez == 8'd0) ? '0 : {1'b0, 1'b1, z[22:0], 26'd0};
    d  = ex - ez;
    if (d > 8'd49) begin
      mz_sh = '0;
      lost  = (mz != '0);
    end else begin
      mz_sh = mz >> d;
      lost  = ((mz_sh << d) != mz);
    end
    mz_sh[0] = mz_sh[0] | lost;
    sum = sub ? (mx - mz_sh) : (mx + mz_sh);

    lead = -1;
    for (int i = 0; i < W; i++) if (sum[i]) lead = i;
    sh    = (lead < 0) ? 0 : (W - 1 - lead);
    norm  = sum << sh;                        // leading one at bit W-1
    mant  = norm[W-1 -: 24];
    guard = norm[W-25];
    sticky = |norm[W-26:0];
    round_up = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + {24'd0, round_up};
    // value = 1.mant * 2^(ex - 127 + 1 - sh); the leading one of mx sits at bit W-2
    e_fin = {2'b00, ex} + 10'd1 - 10'(sh);
    if (mant_r[24]) e_fin = e_fin + 10'd1;

    if ((ex == 8'hff && x[22:0] != 0) || (ez == 8'hff && z[22:0] != 0))
      y = 32'h7fc0_0000;
    else if (ex == 8'hff && ez == 8'hff && sub)
      y = 32'h7fc0_0000;
    else if (ex == 8'hff)
      y = x;
    else if (ex == 8'd0)
      y = 32'd0;                              // both operands zero or subnormal
    else if (lead < 0)
      y = 32'd0;                              // exact cancellation
    else if (e_fin[9] || e_fin == 10'd0)
      y = {x[31], 31'd0};
    else if (e_fin >= 10'd255)
      y = {x[31], 8'hff, 23'd0};
    else
      y = {x[31], e_fin[7:0], mant_r[22:0]};
  end
endmodule
