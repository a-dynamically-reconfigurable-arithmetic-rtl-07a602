// tb_fp_div_sp: self-checking test of the single-precision restoring divider.
// Random quotients and exception cases are compared with an exact integer
// division rounded to nearest even (fp_ref_pkg::div_sp); the published
// complex-division imaginary part BEED233x is checked in the high 28 bits.
module tb_fp_div_sp;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_div_sp dut (.div_in1(a), .div_in2(b), .div_out(y));

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    a = x; b = z;
    #1;
    e = div_sp(x, z);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h expected %h", x, z, y, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h4040_0000);   // 1/3
    check(32'h4000_0000, 32'h3F80_0000);   // 2/1
    check(32'h0000_0000, 32'h0000_0000);   // 0/0
    check(32'h3F80_0000, 32'h0000_0000);   // 1/0
    check(32'h7F80_0000, 32'h7F80_0000);   // inf/inf
    check(32'h0000_0000, 32'h4000_0000);   // 0/2
    check(32'h7F00_0000, 32'h0080_0000);   // overflow
    check(32'h0080_0000, 32'h7F00_0000);   // underflow
    check(32'h3F7F_FFFF, 32'h3F80_0001);   // rounding near 1
    // (bc-ad)/(c^2+d^2) with b,c,a,d of the published example, computed in
    // single precision towards zero as the circuit does.
    begin
      logic [31:0] pa, pb, pc, pd, num, den;
      pa = real_to_sp(5.6135645); pb = real_to_sp(4.3465721);
      pc = real_to_sp(2.5847865); pd = real_to_sp(3.6546244);
      num = add_sp(mul_sp(pb, pc), mul_sp(pd, pa), 1'b1);
      den = add_sp(mul_sp(pc, pc), mul_sp(pd, pd), 1'b0);
      check(num, den);
      checks++;
      if (y[31:4] !== 28'hBEE_D233) begin failures++; $display("imag part %h", y); end
    end
    for (int n = 0; n < 20000; n++)
      check(32'(rand_fp(8, 23, (n % 2 != 0) ? 3 : 70)), 32'(rand_fp(8, 23, (n % 2 != 0) ? 3 : 70)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
