// drac_decoder: turns the 3-bit mode select into the control word of the circuit.
//
// Outputs, as in the published design: "wire", an 18-bit word whose one- or
// two-bit fields drive the select inputs of the twelve operand multiplexers
// (layout in drac_pkg::mux_sel_t), "pmflg", which makes each of the two adder
// lanes add (0) or subtract (1), and "accuracy", which switches the adder and the
// multipliers to double precision (1). Combinational.
//
// Which operand each multiplexer passes in each mode is this design's own
// routing, chosen so that the products and sums of every mode land on the
// outputs listed for it:
//   000  m1=a*c m2=d*b m3=c*b m4=d*a   s1=m1-m2 s2=m3+m4
//   001  m1=a*b m2=c*d m3=e*f m4=g*h   s1=i+j   s2=k+l
//   010  m1=a*b        m3=e*f m4=c*m1  s1=m1+c  s2=m3+g
//   011  m1=a*b m2=c*d m3=e*f m4=g*h   s1=m1+m2 s2=m3+m4
//   100  m1=a*c m2=d*b m3=c*c m4=d*d   s1=m1+m2 s2=m3+m4  (divide s1/s2)
//   101  m1=b*c m2=d*a m3=c*c m4=d*d   s1=m1-m2 s2=m3+m4  (divide s1/s2)
//   110  A*B in block R, C*D in block L, s = E+F   (double)
//   111  A*B in block R, C*D in block L, s = A*B + C*D (double)
// In this routing lane 2 only ever adds, so pmflg[1] stays 0; the flag is kept
// because the adder supports subtraction on both lanes.
module drac_decoder
  import drac_pkg::*;
(
  input  logic [2:0]        sel,
  output logic [WIRE_W-1:0] wire_sel,
  output logic [1:0]        pmflg,
  output logic              accuracy
);
  mux_sel_t w;

  always_comb begin
    w        = '0;     // default routing: a..h to the multipliers, products to the adder
    pmflg    = 2'b00;
    accuracy = 1'b0;
    unique case (mode_e'(sel))
      MODE_CMUL: begin
        w.r2 = 1'b1; w.r3 = 1'b1; w.r4 = 2'd1;
        w.l1 = 1'b1; w.l2 = 2'd1; w.l3 = 2'd1; w.l4 = 2'd1;
        pmflg = 2'b01;
      end
      MODE_PAR: begin
        w.add_in1 = 1'b1; w.add_in2 = 2'd1; w.add_in3 = 1'b1; w.add_in4 = 2'd1;
      end
      MODE_MAC3: begin
        w.l3 = 2'd2; w.l4 = 2'd3;
        w.add_in2 = 2'd2; w.add_in4 = 2'd2;
      end
      MODE_MAC4: begin
      end
      MODE_CDIV_RE: begin
        w.r2 = 1'b1; w.r3 = 1'b1; w.r4 = 2'd1;
        w.l1 = 1'b1; w.l2 = 2'd2; w.l3 = 2'd1; w.l4 = 2'd2;
      end
      MODE_CDIV_IM: begin
        w.r1 = 1'b1; w.r2 = 1'b1; w.r3 = 1'b1; w.r4 = 2'd2;
        w.l1 = 1'b1; w.l2 = 2'd2; w.l3 = 2'd1; w.l4 = 2'd2;
        pmflg = 2'b01;
      end
      MODE_DPAR: begin
        w.add_in1 = 1'b1; w.add_in2 = 2'd1; w.add_in3 = 1'b1; w.add_in4 = 2'd1;
        accuracy = 1'b1;
      end
      MODE_DMAC: begin
        accuracy = 1'b1;
      end
      default: ;
    endcase
    wire_sel = w;
  end

endmodule
