// tb_drac_adder: self-checking test of the reconfigurable adder.
// Single mode: two independent lanes, each with its own add/subtract flag.
// Double mode: one 64-bit adder on {in1,in2} +/- {in3,in4}, result split high/low.
// Includes the double E+F of the published example. Reference: fp_ref_pkg.
module tb_drac_adder;
  import fp_ref_pkg::*;

  logic [31:0] in1, in2, in3, in4, out1, out2;
  logic        accuracy;
  logic [1:0]  pmflg;
  int checks = 0, failures = 0;

  drac_adder dut (.add_in1(in1), .add_in2(in2), .add_in3(in3), .add_in4(in4),
                  .accuracy(accuracy), .pmflg(pmflg), .add_out1(out1), .add_out2(out2));

  task automatic check_single(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic [31:0] d,
                              logic [1:0] pm);
    logic [31:0] e1, e2;
    in1 = a; in2 = b; in3 = c; in4 = d; pmflg = pm; accuracy = 1'b0;
    #1;
    e1 = add_sp(a, b, pm[0]);
    e2 = add_sp(c, d, pm[1]);
    checks += 2;
    if (out1 !== e1) begin failures++; $display("lane1 %h,%h pm%b: %h vs %h", a, b, pm, out1, e1); end
    if (out2 !== e2) begin failures++; $display("lane2 %h,%h pm%b: %h vs %h", c, d, pm, out2, e2); end
  endtask

  task automatic check_double(logic [63:0] a, logic [63:0] b, bit sub);
    logic [63:0] e;
    {in1, in2} = a; {in3, in4} = b; pmflg = {1'b0, sub}; accuracy = 1'b1;
    #1;
    e = add(11, 52, a, b, sub);
    checks++;
    if ({out1, out2} !== e) begin failures++; $display("double %h,%h: %h%h vs %h", a, b, out1, out2, e); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // i+j and k+l of the published example: 41CCA61D and 447D6522/3 there.
    check_single(real_to_sp(10.254389), real_to_sp(15.326721),
                 real_to_sp(123.45676), real_to_sp(890.12346), 2'b00);
    checks++;
    if (ulp_diff(8, 23, 64'(out1), 64'h41CC_A61D) > 1 || ulp_diff(8, 23, 64'(out2), 64'h447D_6522) > 1) begin
      failures++; $display("published sums differ: %h %h", out1, out2);
    end
    // E+F of the published double example; 42F6E9DC in the high word there.
    check_double($realtobits(657661.12784750015), $realtobits(4.0309885854732644e14), 1'b0);
    checks++;
    if (out1 !== 32'h42F6_E9DC) begin failures++; $display("E+F high %h", out1); end
    check_single(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000, 32'hFF80_0000, 2'b00); // overflow, NaN
    check_single(32'h3F80_0000, 32'h3380_0000, 32'h4000_0000, 32'h4000_0000, 2'b11);
    for (int n = 0; n < 3000; n++) begin
      int span;
      span = (n % 2 != 0) ? 4 : 60;
      check_single(32'(rand_fp(8, 23, span)), 32'(rand_fp(8, 23, span)),
                   32'(rand_fp(8, 23, span)), 32'(rand_fp(8, 23, span)), 2'($urandom));
      check_double(rand_fp(11, 52, span * 8), rand_fp(11, 52, span * 8), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
