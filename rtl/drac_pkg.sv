// drac_pkg: types and helpers shared by the reconfigurable arithmetic circuit.
//
// The circuit works on IEEE754 single (32-bit) and double (64-bit) words. A double
// operand travels as two 32-bit halves, high half first, so a double A is the pair
// {a, b} of two single-width input words. The 3-bit "sel" picks one of eight modes;
// the decoder turns it into an 18-bit mux-select word whose fields are laid out in
// mux_sel_t below. The mode list and the 18-bit width follow the published design;
// the assignment of select bits to multiplexers and the mux input orders are this
// design's own.
package drac_pkg;

  typedef logic [31:0] word_t;
  typedef logic [63:0] dword_t;

  // Operating modes, encoded as the value of sel.
  typedef enum logic [2:0] {
    MODE_CMUL    = 3'b000,  // complex multiplication (ac-bd) + j(bc+ad)
    MODE_PAR     = 3'b001,  // four products and two sums in parallel
    MODE_MAC3    = 3'b010,  // a*b+c, e*f+g and a*b*c
    MODE_MAC4    = 3'b011,  // a*b+c*d, e*f+g*h
    MODE_CDIV_RE = 3'b100,  // (ac+bd)/(c^2+d^2)
    MODE_CDIV_IM = 3'b101,  // (bc-ad)/(c^2+d^2)
    MODE_DPAR    = 3'b110,  // double A*B, C*D, E+F
    MODE_DMAC    = 3'b111   // double A*B+C*D
  } mode_e;

  // Index of each of the twelve single-width inputs a..l.
  localparam int IN_A = 0, IN_B = 1, IN_C = 2, IN_D = 3, IN_E = 4, IN_F = 5,
                 IN_G = 6, IN_H = 7, IN_I = 8, IN_J = 9, IN_K = 10, IN_L = 11;
  localparam int NUM_INPUTS = 12;

  // Decoder output "wire": select lines of the twelve operand multiplexers.
  // r1..r4 feed multiplier block R (products m1 = r1*r2, m2 = r3*r4),
  // l1..l4 feed multiplier block L (m3 = l1*l2, m4 = l3*l4),
  // add_in1..4 feed the adder (s1 = add_in1 +/- add_in2, s2 = add_in3 +/- add_in4).
  typedef struct packed {
    logic [1:0] add_in4;  // 0 m4, 1 l, 2 g
    logic       add_in3;  // 0 m3, 1 k
    logic [1:0] add_in2;  // 0 m2, 1 j, 2 c
    logic       add_in1;  // 0 m1, 1 i
    logic [1:0] l4;       // 0 h, 1 a, 2 d, 3 m1
    logic [1:0] l3;       // 0 g, 1 d, 2 c
    logic [1:0] l2;       // 0 f, 1 b, 2 c
    logic       l1;       // 0 e, 1 c
    logic [1:0] r4;       // 0 d, 1 b, 2 a
    logic       r3;       // 0 c, 1 d
    logic       r2;       // 0 b, 1 c
    logic       r1;       // 0 a, 1 b
  } mux_sel_t;

  localparam int WIRE_W = $bits(mux_sel_t);  // 18

  localparam word_t  SP_QNAN = 32'h7FC0_0000;

  // Exact conversion of a single to a double. Subnormal singles are read as zero.
  function automatic dword_t sp_to_dp(input word_t x);
    logic [7:0] e;
    e = x[30:23];
    if (e == 8'h00)      return {x[31], 63'd0};
    else if (e == 8'hFF) return {x[31], 11'h7FF, x[22:0], 29'd0};
    else                 return {x[31], 11'(e) + 11'd896, x[22:0], 29'd0};
  endfunction

  // Double to single with rounding towards zero. Overflow gives infinity,
  // results below the normal range give a signed zero.
  function automatic word_t dp_to_sp_rtz(input dword_t x);
    logic [10:0] e;
    e = x[62:52];
    if (e == 11'h7FF)       return (x[51:0] != 0) ? SP_QNAN : {x[63], 8'hFF, 23'd0};
    else if (e >= 11'd1151) return {x[63], 8'hFF, 23'd0};
    else if (e <= 11'd896)  return {x[63], 31'd0};
    else                    return {x[63], 8'(e - 11'd896), x[51:29]};
  endfunction

endpackage
