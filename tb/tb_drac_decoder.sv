// tb_drac_decoder: self-checking test of the mode decoder.
// For every sel value the select fields are translated back into the operand
// each multiplexer passes (using the encodings listed in drac_pkg), and the
// resulting operand letters, add/subtract flags and precision are compared with
// the computation each mode must perform.
module tb_drac_decoder;
  import drac_pkg::*;

  logic [2:0]        sel;
  logic [WIRE_W-1:0] wire_sel;
  logic [1:0]        pmflg;
  logic              accuracy;
  int checks = 0, failures = 0;

  drac_decoder dut (.sel(sel), .wire_sel(wire_sel), .pmflg(pmflg), .accuracy(accuracy));

  // Operand names: letters a..l, "1".."4" for products m1..m4.
  function automatic string routing(mux_sel_t w);
    string s;
    s = {w.r1 ? "b" : "a", w.r2 ? "c" : "b", w.r3 ? "d" : "c"};
    s = {s, (w.r4 == 1) ? "b" : (w.r4 == 2) ? "a" : (w.r4 == 0) ? "d" : "?", " "};
    s = {s, w.l1 ? "c" : "e"};
    s = {s, (w.l2 == 1) ? "b" : (w.l2 == 2) ? "c" : (w.l2 == 0) ? "f" : "?"};
    s = {s, (w.l3 == 1) ? "d" : (w.l3 == 2) ? "c" : (w.l3 == 0) ? "g" : "?"};
    s = {s, (w.l4 == 1) ? "a" : (w.l4 == 2) ? "d" : (w.l4 == 3) ? "1" : "h", " "};
    s = {s, w.add_in1 ? "i" : "1"};
    s = {s, (w.add_in2 == 1) ? "j" : (w.add_in2 == 2) ? "c" : (w.add_in2 == 0) ? "2" : "?"};
    s = {s, w.add_in3 ? "k" : "3"};
    s = {s, (w.add_in4 == 1) ? "l" : (w.add_in4 == 2) ? "g" : (w.add_in4 == 0) ? "4" : "?"};
    return s;
  endfunction

  // What each mode has to compute, written as products and sums:
  //  "r1 r2 r3 r4 l1 l2 l3 l4 add1..4", then pmflg and accuracy.
  function automatic string expected(int m);
    case (m)
      0: return "acdb cbda 1234";   // ac, db, cb, da; ac-bd, bc+ad
      1: return "abcd efgh ijkl";
      2: return "abcd efc1 1c3g";   // ab, ef, c*(ab); ab+c, ef+g  (m2 unused)
      3: return "abcd efgh 1234";
      4: return "acdb ccdd 1234";   // ac+bd, cc+dd
      5: return "bcda ccdd 1234";   // bc-da, cc+dd
      6: return "abcd efgh ijkl";
      default: return "abcd efgh 1234";
    endcase
  endfunction

  initial begin
    for (int m = 0; m < 8; m++) begin
      logic [1:0] epm;
      sel = 3'(m);
      #1;
      epm = (m == 0 || m == 5) ? 2'b01 : 2'b00;
      checks += 3;
      if (routing(mux_sel_t'(wire_sel)) != expected(m)) begin
        failures++; $display("sel %0d: routing %s expected %s", m, routing(mux_sel_t'(wire_sel)), expected(m));
      end
      if (pmflg !== epm) begin failures++; $display("sel %0d: pmflg %b", m, pmflg); end
      if (accuracy !== (m >= 6)) begin failures++; $display("sel %0d: accuracy %b", m, accuracy); end
    end
    checks++;
    if (WIRE_W != 18) begin failures++; $display("wire width %0d", WIRE_W); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
