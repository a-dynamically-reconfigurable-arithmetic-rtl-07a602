// fp_mul_comb: combinational IEEE754 multiplier, rounding towards zero.
//
// Multiplies the two significands (hidden bit restored) in one step and passes
// the product to fp_mul_norm, which builds the result word. Used for the
// single-precision lanes of the reconfigurable multiplier; the widths are
// parameters.
module fp_mul_comb #(
  parameter int EXP = 8,
  parameter int MAN = 23
) (
  input  logic [EXP+MAN:0] a,
  input  logic [EXP+MAN:0] b,
  output logic [EXP+MAN:0] y
);
  logic [MAN:0]     ma, mb;
  logic [2*MAN+1:0] prod;

  always_comb begin
    ma   = {1'b1, a[MAN-1:0]};
    mb   = {1'b1, b[MAN-1:0]};
    prod = (2*MAN+2)'(ma) * (2*MAN+2)'(mb);
  end

  fp_mul_norm #(.EXP(EXP), .MAN(MAN)) u_norm (.a(a), .b(b), .prod(prod), .y(y));

endmodule
