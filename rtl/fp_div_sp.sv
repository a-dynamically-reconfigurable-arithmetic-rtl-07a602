// fp_div_sp: single-precision IEEE754 divider, restoring method, round to nearest even.
//
// div_out = div_in1 / div_in2. The quotient of the two 24-bit significands lies in
// (0.5, 2); it is developed one bit per step by restoring division (the published
// design's "recovery method"): each step subtracts the divisor from the partial
// remainder, keeps the difference and sets the quotient bit if it is not negative,
// or restores the old remainder and clears the bit. 27 steps give 24 result bits,
// a guard bit and enough bits for the sticky bit (with the final remainder).
// The result is rounded to nearest, ties to even ("Unbiased" rounding, as the
// published design uses for its divider). Combinational, one step per array row.
//
// Exceptions: NaN for a NaN operand, 0/0 and inf/inf; infinity for inf/x and x/0;
// zero for 0/x and x/inf; overflow gives infinity and results below the normal
// range give a signed zero. Subnormal inputs count as zero. These details are
// this design's choices within the published list of exceptions.
module fp_div_sp
  import drac_pkg::*;
(
  input  word_t div_in1,
  input  word_t div_in2,
  output word_t div_out
);
  localparam int STEPS = 27;

  logic        s;
  logic [7:0]  ea, eb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [23:0] ma, mb;
  logic [24:0] rem;
  logic [25:0] trial;
  logic [STEPS-1:0] q;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] rounded;
  int          e;

  always_comb begin
    s  = div_in1[31] ^ div_in2[31];
    ea = div_in1[30:23];
    eb = div_in2[30:23];
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);
    a_nan  = (ea == 8'hFF) && (div_in1[22:0] != 0);
    b_nan  = (eb == 8'hFF) && (div_in2[22:0] != 0);
    a_inf  = (ea == 8'hFF) && (div_in1[22:0] == 0);
    b_inf  = (eb == 8'hFF) && (div_in2[22:0] == 0);
    ma = {1'b1, div_in1[22:0]};
    mb = {1'b1, div_in2[22:0]};

    // Restoring division: q = floor(ma / mb * 2^26).
    rem = {1'b0, ma};
    for (int i = STEPS - 1; i >= 0; i--) begin
      trial = {1'b0, rem} - {2'b00, mb};
      if (trial[25]) begin
        q[i] = 1'b0;                  // negative: restore
      end else begin
        q[i] = 1'b1;
        rem  = trial[24:0];
      end
      rem = rem << 1;
    end

    e = int'(ea) - int'(eb) + 127;
    if (q[STEPS-1]) begin
      mant   = q[26:3];
      guard  = q[2];
      sticky = (q[1:0] != 0) || (rem != 0);
    end else begin
      mant   = q[25:2];
      guard  = q[1];
      sticky = q[0] || (rem != 0);
      e      = e - 1;
    end
    round_up = guard && (sticky || mant[0]);
    rounded  = {1'b0, mant} + 25'(round_up);
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e       = e + 1;
    end

    if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf))
      div_out = SP_QNAN;
    else if (a_inf || b_zero)
      div_out = {s, 8'hFF, 23'd0};
    else if (a_zero || b_inf)
      div_out = {s, 31'd0};
    else if (e >= 255)
      div_out = {s, 8'hFF, 23'd0};
    else if (e <= 0)
      div_out = {s, 31'd0};
    else
      div_out = {s, 8'(e), rounded[22:0]};
  end

endmodule
