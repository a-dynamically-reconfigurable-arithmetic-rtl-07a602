// drac_adder: dynamically reconfigurable single/double precision adder.
//
// With accuracy = 0 it is two independent single-precision adders:
//   add_out1 = add_in1 +/- add_in2 (minus when pmflg[0] = 1),
//   add_out2 = add_in3 +/- add_in4 (minus when pmflg[1] = 1).
// With accuracy = 1 it is one double-precision adder: A = {add_in1, add_in2},
// B = {add_in3, add_in4} (high half first), {add_out1, add_out2} = A +/- B, with
// pmflg[0] choosing the operation. Rounding is towards zero. Combinational.
//
// The split into two single adders or one double adder follows the published
// design; how the hardware is shared is this design's choice. Lane 1 is a
// double-width datapath: in single mode its operands are widened to double
// (exactly) and its result is narrowed back with truncation, which gives the
// same word as a single-precision adder rounding towards zero, because every
// single value is also a double value. Lane 2 is a single-precision datapath.
module drac_adder
  import drac_pkg::*;
(
  input  word_t      add_in1,
  input  word_t      add_in2,
  input  word_t      add_in3,
  input  word_t      add_in4,
  input  logic       accuracy,
  input  logic [1:0] pmflg,
  output word_t      add_out1,
  output word_t      add_out2
);
  dword_t wa, wb, wy;
  word_t  y2;

  always_comb begin
    wa = accuracy ? {add_in1, add_in2} : sp_to_dp(add_in1);
    wb = accuracy ? {add_in3, add_in4} : sp_to_dp(add_in2);
  end

  fp_add_core #(.EXP(11), .MAN(52)) u_lane1 (.a(wa), .b(wb), .sub(pmflg[0]), .y(wy));
  fp_add_core #(.EXP(8),  .MAN(23)) u_lane2 (.a(add_in3), .b(add_in4), .sub(pmflg[1]), .y(y2));

  always_comb begin
    if (accuracy) begin
      add_out1 = wy[63:32];
      add_out2 = wy[31:0];
    end else begin
      add_out1 = dp_to_sp_rtz(wy);
      add_out2 = y2;
    end
  end

endmodule
