// drac_core: the dynamically reconfigurable arithmetic circuit.
//
// Twelve single-width inputs a..l (din[0]..din[11]) feed, through input
// multiplexers, two reconfigurable multipliers (block R with lanes m1, m2 and
// block L with lanes m3, m4), whose outputs and the raw inputs feed, through a
// second rank of multiplexers, the reconfigurable adder (lanes s1, s2). The
// adder's two outputs feed the single-precision divider (s1 / s2). The output
// controller puts the result of the selected mode on calc_out1/calc_out2, with
// sel2 stepping through modes that have more than two result words. The
// decoder derives every multiplexer select, the add/subtract flags and the
// single/double switch from sel, so the circuit changes function from one
// clock cycle to the next without any reconfiguration pause.
//
// Double operands are pairs of inputs, high half first: A={a,b}, B={c,d},
// C={e,f}, D={g,h}, E={i,j}, F={k,l}. In double mode (sel 110, 111) the
// multipliers need three clock cycles per product; dp_valid pulses when a new
// double product has been written (see drac_multiplier for the timing). All
// single-precision modes are combinational from din and sel to the outputs.
//
// The unit structure (two reconfigurable multipliers of two lanes each, one
// reconfigurable adder, one divider, decoder, output controller, eight modes)
// follows the published design. The multiplexer input lists are this design's
// own (see drac_decoder); with both division modes keeping the divisor on the
// s2 lane, the divider inputs need no multiplexer.
module drac_core
  import drac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  input  logic [1:0] sel2,
  input  word_t      din [NUM_INPUTS],
  output word_t      calc_out1,
  output word_t      calc_out2,
  output logic       dp_valid
);
  logic [WIRE_W-1:0] wire_sel;
  mux_sel_t          w;
  logic [1:0]        pmflg;
  logic              accuracy;

  drac_decoder u_dec (.sel(sel), .wire_sel(wire_sel), .pmflg(pmflg), .accuracy(accuracy));
  assign w = mux_sel_t'(wire_sel);

  word_t a, b, c, d, e, f, g, h, i, j, k, l;
  assign {a, b, c, d, e, f, g, h, i, j, k, l} =
    {din[IN_A], din[IN_B], din[IN_C], din[IN_D], din[IN_E], din[IN_F],
     din[IN_G], din[IN_H], din[IN_I], din[IN_J], din[IN_K], din[IN_L]};

  word_t r1, r2, r3, r4, l1, l2, l3, l4;
  word_t m1, m2, m3, m4;
  word_t ai1, ai2, ai3, ai4, s1, s2, q;
  logic  dpv_r, dpv_l;

  // Multiplier input multiplexers.
  always_comb begin
    r1 = w.r1 ? b : a;
    r2 = w.r2 ? c : b;
    r3 = w.r3 ? d : c;
    unique case (w.r4)
      2'd1:    r4 = b;
      2'd2:    r4 = a;
      default: r4 = d;
    endcase
    l1 = w.l1 ? c : e;
    unique case (w.l2)
      2'd1:    l2 = b;
      2'd2:    l2 = c;
      default: l2 = f;
    endcase
    unique case (w.l3)
      2'd1:    l3 = d;
      2'd2:    l3 = c;
      default: l3 = g;
    endcase
    unique case (w.l4)
      2'd1:    l4 = a;
      2'd2:    l4 = d;
      2'd3:    l4 = m1;
      default: l4 = h;
    endcase
  end

  drac_multiplier u_mul_r (
    .clk(clk), .rst_n(rst_n), .accuracy(accuracy),
    .multi_in1(r1), .multi_in2(r2), .multi_in3(r3), .multi_in4(r4),
    .multi_out1(m1), .multi_out2(m2), .dp_valid(dpv_r));

  drac_multiplier u_mul_l (
    .clk(clk), .rst_n(rst_n), .accuracy(accuracy),
    .multi_in1(l1), .multi_in2(l2), .multi_in3(l3), .multi_in4(l4),
    .multi_out1(m3), .multi_out2(m4), .dp_valid(dpv_l));

  // Adder input multiplexers.
  always_comb begin
    ai1 = w.add_in1 ? i : m1;
    unique case (w.add_in2)
      2'd1:    ai2 = j;
      2'd2:    ai2 = c;
      default: ai2 = m2;
    endcase
    ai3 = w.add_in3 ? k : m3;
    unique case (w.add_in4)
      2'd1:    ai4 = l;
      2'd2:    ai4 = g;
      default: ai4 = m4;
    endcase
  end

  drac_adder u_add (
    .add_in1(ai1), .add_in2(ai2), .add_in3(ai3), .add_in4(ai4),
    .accuracy(accuracy), .pmflg(pmflg), .add_out1(s1), .add_out2(s2));

  fp_div_sp u_div (.div_in1(s1), .div_in2(s2), .div_out(q));

  drac_outctrl u_out (
    .sel(sel), .sel2(sel2),
    .data_in1(m1), .data_in2(m2), .data_in3(m3), .data_in4(m4),
    .data_in5(s1), .data_in6(s2), .data_in7(q),
    .calc_out1(calc_out1), .calc_out2(calc_out2));

  assign dp_valid = dpv_r & dpv_l;

  // Both multiplier blocks share one control and step in lockstep.
  assert property (@(posedge clk) disable iff (!rst_n) dpv_r == dpv_l);

endmodule
