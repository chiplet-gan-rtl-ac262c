// FP32 multiplier, one of the 16 multipliers of a PE multiplier array.
//
// Combinational IEEE-754 single-precision multiply with round-to-nearest-even. The 32-bit
// floating-point format of the multipliers is the published configuration; the handling of
// special values is this design's choice: subnormal inputs and results are flushed to zero,
// results that overflow become infinity, and infinity/NaN inputs give infinity or a quiet NaN.
// Interface: a, b in, y out, no clock. Timing: purely combinational (the PE registers the
// accumulated result).
module cg_fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic [9:0]  e_raw;        // biased exponent of the product, signed in 10 bits
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic [9:0]  e_fin;

  always_comb begin
    sa = a[31];  sb = b[31];  sy = sa ^ sb;
    ea = a[30:23]; eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    prod = ma * mb;
    e_raw = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e_raw  = e_raw + 10'd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    e_fin    = e_raw;
    if (mant_r[24]) e_fin = e_raw + 10'd1;   // rounding carried to 2.0, mantissa becomes 1.0

    if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0))
      y = 32'h7fc0_0000;                                       // NaN in
    else if ((ea == 8'hff && eb == 8'd0) || (eb == 8'hff && ea == 8'd0))
      y = 32'h7fc0_0000;                                       // inf * 0
    else if (ea == 8'hff || eb == 8'hff)
      y = {sy, 8'hff, 23'd0};                                  // inf
    else if (ea == 8'd0 || eb == 8'd0)
      y = {sy, 31'd0};                                         // zero (subnormals flushed)
    else if (e_fin[9] || e_fin == 10'd0)
      y = {sy, 31'd0};                                         // underflow, flushed
    else if (e_fin >= 10'd255)
      y = {sy, 8'hff, 23'd0};                                  // overflow
    else
      y = {sy, e_fin[7:0], mant_r[22:0]};
  end
endmodule
