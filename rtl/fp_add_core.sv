// fp_add_core: IEEE754 adder/subtracter with rounding towards zero.
//
// y = a + b, or a - b when sub is 1. The exponent and fraction widths are
// parameters, so one module serves single (8/23) and double (11/52) precision.
// The operand with the larger magnitude is put first, the other one is shifted
// right to line up with it, keeping a guard bit, a round bit and a sticky bit;
// the significands are added or subtracted, the sum is normalised and the three
// extra bits are dropped, which rounds towards zero. Purely combinational.
//
// Handled as in the published design: rounding towards zero, no subnormals
// (subnormal inputs count as zero and results below the normal range become a
// signed zero), exceptions for overflow, infinity and NaN. This design's own
// choices: overflow returns infinity, every NaN result is the quiet NaN with a
// clear sign bit and only the top fraction bit set, and x - x gives +0.
module fp_add_core #(
  parameter int EXP = 8,
  parameter int MAN = 23
) (
  input  logic [EXP+MAN:0] a,
  input  logic [EXP+MAN:0] b,
  input  logic             sub,
  output logic [EXP+MAN:0] y
);
  localparam int M = MAN + 1;          // significand with hidden bit
  localparam int W = M + 3;            // plus guard, round, sticky
  localparam int EW = EXP + 2;         // signed exponent arithmetic
  localparam logic [EXP-1:0] EMAX = '1;
  localparam int EMAX_I = 2**EXP - 1;

  logic            sa, sb;
  logic [EXP-1:0]  ea, eb;
  logic [MAN-1:0]  fa, fb;
  logic            a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    sa = a[EXP+MAN];
    sb = b[EXP+MAN] ^ sub;
    ea = a[EXP+MAN-1:MAN];
    eb = b[EXP+MAN-1:MAN];
    fa = (ea == '0) ? '0 : a[MAN-1:0];
    fb = (eb == '0) ? '0 : b[MAN-1:0];
    a_nan  = (ea == EMAX) && (fa != '0);
    b_nan  = (eb == EMAX) && (fb != '0);
    a_inf  = (ea == EMAX) && (fa == '0);
    b_inf  = (eb == EMAX) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);
  end

  // Order by magnitude: x is the larger operand.
  logic            swap;
  logic            sx, sy;
  logic [EXP-1:0]  ex, ey;
  logic [M-1:0]    mx, my;
  logic            eff_sub;

  always_comb begin
    swap = {eb, fb} > {ea, fa};
    sx = swap ? sb : sa;
    sy = swap ? sa : sb;
    ex = swap ? eb : ea;
    ey = swap ? ea : eb;
    mx = swap ? {~b_zero, fb} : {~a_zero, fa};
    my = swap ? {~a_zero, fa} : {~b_zero, fb};
    eff_sub = sx ^ sy;
  end

  // Alignment of the smaller significand with a sticky bit.
  logic [EXP-1:0] d;
  logic [W-1:0]   ya, xa;
  logic [W-1:0]   yfull;
  logic           sticky;

  always_comb begin
    d     = ex - ey;
    xa    = {mx, 3'b000};
    yfull = {my, 3'b000};
    if (d >= EXP'(W)) begin
      ya     = '0;
      sticky = (my != '0);
    end else begin
      ya     = yfull >> d;
      sticky = 1'b0;
      for (int i = 0; i < W; i++)
        if (i < int'(d) && yfull[i]) sticky = 1'b1;
    end
    ya[0] = ya[0] | sticky;
  end

  // Add or subtract, then normalise.
  logic [W:0]       sum;
  logic [W-1:0]     norm;
  logic signed [EW-1:0] enorm;
  int               lz;

  always_comb begin
    sum = eff_sub ? ({1'b0, xa} - {1'b0, ya}) : ({1'b0, xa} + {1'b0, ya});
    lz  = 0;
    if (sum[W]) begin
      norm  = sum[W:1];
      norm[0] = sum[1] | sum[0];
      enorm = EW'(ex) + 1;
    end else begin
      lz = W;
      for (int i = 0; i < W; i++)
        if (sum[i]) lz = W - 1 - i;
      norm  = sum[W-1:0] << lz;
      enorm = EW'(ex) - EW'(lz);
    end
  end

  always_comb begin
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = {1'b0, EMAX, 1'b1, {(MAN-1){1'b0}}};
    else if (a_inf)
      y = {sa, EMAX, {MAN{1'b0}}};
    else if (b_inf)
      y = {sb, EMAX, {MAN{1'b0}}};
    else if (a_zero && b_zero)
      y = {sa & sb, {(EXP+MAN){1'b0}}};
    else if (sum == '0)
      y = '0;
    else if (int'(enorm) >= EMAX_I)
      y = {sx, EMAX, {MAN{1'b0}}};
    else if (int'(enorm) <= 0)
      y = {sx, {(EXP+MAN){1'b0}}};
    else
      y = {sx, enorm[EXP-1:0], norm[W-2:3]};
  end

endmodule
