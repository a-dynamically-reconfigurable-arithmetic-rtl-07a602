// drac_outctrl: output controller of the reconfigurable arithmetic circuit.
//
// Inputs, as in the published design: data_in1..4 are the four multiplier lane
// outputs (m1..m4; in double mode data_in1/2 are the high/low halves of A*B and
// data_in3/4 those of C*D), data_in5/6 the two adder lane outputs (s1, s2; in
// double mode high/low halves), data_in7 the divider output. sel picks the mode
// and, when a mode has more than two result words, sel2 picks which pair is on
// calc_out1/calc_out2. The pairing below matches the published simulation
// waveforms and board read-out; pairs a mode does not use read as zero.
//   sel   sel2=00        sel2=01        sel2=10
//   000   s1, s2         -              -         (ac-bd, bc+ad)
//   001   m1, m2         m3, m4         s1, s2    (ab, cd | ef, gh | i+j, k+l)
//   010   s1, s2         m4, 0          -         (ab+c, ef+g | abc)
//   011   s1, s2         -              -
//   100   div, 0         -              -
//   101   div, 0         -              -
//   110   m1, m2         m3, m4         s1, s2    (A*B | C*D | E+F, high/low)
//   111   s1, s2         -              -         (A*B+C*D, high/low)
// Combinational.
module drac_outctrl
  import drac_pkg::*;
(
  input  logic [2:0] sel,
  input  logic [1:0] sel2,
  input  word_t      data_in1,
  input  word_t      data_in2,
  input  word_t      data_in3,
  input  word_t      data_in4,
  input  word_t      data_in5,
  input  word_t      data_in6,
  input  word_t      data_in7,
  output word_t      calc_out1,
  output word_t      calc_out2
);
  always_comb begin
    calc_out1 = '0;
    calc_out2 = '0;
    unique case (mode_e'(sel))
      MODE_PAR, MODE_DPAR: begin
        unique case (sel2)
          2'd0: begin calc_out1 = data_in1; calc_out2 = data_in2; end
          2'd1: begin calc_out1 = data_in3; calc_out2 = data_in4; end
          2'd2: begin calc_out1 = data_in5; calc_out2 = data_in6; end
          default: ;
        endcase
      end
      MODE_MAC3: begin
        if (sel2 == 2'd0) begin calc_out1 = data_in5; calc_out2 = data_in6; end
        else if (sel2 == 2'd1) calc_out1 = data_in4;
      end
      MODE_CMUL, MODE_MAC4, MODE_DMAC: begin
        if (sel2 == 2'd0) begin calc_out1 = data_in5; calc_out2 = data_in6; end
      end
      MODE_CDIV_RE, MODE_CDIV_IM: begin
        if (sel2 == 2'd0) calc_out1 = data_in7;
      end
      default: ;
    endcase
  end

endmodule
