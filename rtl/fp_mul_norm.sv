// fp_mul_norm: final stage of an IEEE754 multiplier.
//
// Takes the two operands and the full product of their significands (hidden bits
// included, 2*(MAN+1) bits) and builds the result word: the product is in [1,4),
// so it is shifted by at most one place, the exponents are added and the bias
// removed, and the bits below the fraction are dropped (rounding towards zero).
// Exceptions follow the published design's list (overflow, infinity, NaN, no
// subnormals); overflow to infinity, the flush of small results to a signed zero
// and the quiet NaN with only the top fraction bit set are this design's choices.
// Combinational.
module fp_mul_norm #(
  parameter int EXP = 8,
  parameter int MAN = 23
) (
  input  logic [EXP+MAN:0]     a,
  input  logic [EXP+MAN:0]     b,
  input  logic [2*MAN+1:0]     prod,
  output logic [EXP+MAN:0]     y
);
  localparam int EW   = EXP + 2;
  localparam int BIAS = 2**(EXP-1) - 1;
  localparam int EMAX_I = 2**EXP - 1;
  localparam logic [EXP-1:0] EMAX = '1;

  logic           s;
  logic [EXP-1:0] ea, eb;
  logic           a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic signed [EW-1:0] e;
  logic [MAN-1:0] f;

  always_comb begin
    ea = a[EXP+MAN-1:MAN];
    eb = b[EXP+MAN-1:MAN];
    s  = a[EXP+MAN] ^ b[EXP+MAN];
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_nan  = (ea == EMAX) && (a[MAN-1:0] != '0);
    b_nan  = (eb == EMAX) && (b[MAN-1:0] != '0);
    a_inf  = (ea == EMAX) && (a[MAN-1:0] == '0);
    b_inf  = (eb == EMAX) && (b[MAN-1:0] == '0);
    if (prod[2*MAN+1]) begin
      f = prod[2*MAN -: MAN];
      e = EW'(int'(ea) + int'(eb) - BIAS + 1);
    end else begin
      f = prod[2*MAN-1 -: MAN];
      e = EW'(int'(ea) + int'(eb) - BIAS);
    end
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = {1'b0, EMAX, 1'b1, {(MAN-1){1'b0}}};
    else if (a_inf || b_inf)
      y = {s, EMAX, {MAN{1'b0}}};
    else if (a_zero || b_zero)
      y = {s, {(EXP+MAN){1'b0}}};
    else if (int'(e) >= EMAX_I)
      y = {s, EMAX, {MAN{1'b0}}};
    else if (int'(e) <= 0)
      y = {s, {(EXP+MAN){1'b0}}};
    else
      y = {s, e[EXP-1:0], f};
  end

endmodule
