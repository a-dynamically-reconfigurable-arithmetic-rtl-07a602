// tb_fp_add_core: self-checking test of fp_add_core in single and double format.
// Random operands (near and far exponents, both signs, add and subtract) and the
// special cases (zeros, infinities, NaN, overflow, cancellation) are compared
// with the exact wide-integer reference of fp_ref_pkg, rounding towards zero.
module tb_fp_add_core;
  import fp_ref_pkg::*;

  logic [31:0] sa, sb, sy;
  logic [63:0] da, db, dy;
  logic        ssub, dsub;
  int checks = 0, failures = 0;

  fp_add_core #(.EXP(8),  .MAN(23)) u_sp (.a(sa), .b(sb), .sub(ssub), .y(sy));
  fp_add_core #(.EXP(11), .MAN(52)) u_dp (.a(da), .b(db), .sub(dsub), .y(dy));

  task automatic check_sp(logic [31:0] a, logic [31:0] b, bit sub);
    logic [31:0] exp_y;
    sa = a; sb = b; ssub = sub;
    #1;
    exp_y = add_sp(a, b, sub);
    checks++;
    if (sy !== exp_y) begin
      failures++;
      if (failures < 10) $display("SP FAIL %h %s %h: got %h expected %h", a, sub ? "-" : "+", b, sy, exp_y);
    end
  endtask

  task automatic check_dp(logic [63:0] a, logic [63:0] b, bit sub);
    logic [63:0] exp_y;
    da = a; db = b; dsub = sub;
    #1;
    exp_y = add(11, 52, a, b, sub);
    checks++;
    if (dy !== exp_y) begin
      failures++;
      if (failures < 10) $display("DP FAIL %h %s %h: got %h expected %h", a, sub ? "-" : "+", b, dy, exp_y);
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
    // special cases
    check_sp(32'h3F80_0000, 32'h3F80_0000, 1'b0);   // 1+1
    check_sp(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1-1 = +0
    check_sp(32'h7F80_0000, 32'h7F80_0000, 1'b1);   // inf-inf
    check_sp(32'h7F80_0000, 32'h3F80_0000, 1'b0);   // inf+1
    check_sp(32'h7FC0_0001, 32'h3F80_0000, 1'b0);   // NaN
    check_sp(32'h8000_0000, 32'h8000_0000, 1'b0);   // -0 + -0
    check_sp(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    check_sp(32'h0080_0001, 32'h0080_0000, 1'b1);   // underflow to zero
    check_sp(32'h3F80_0000, 32'h3380_0000, 1'b1);   // 1 - 2^-24: truncation
    check_sp(32'h3F80_0000, 32'h0000_0000, 1'b1);
    check_sp(32'h0000_0000, 32'h4000_0000, 1'b1);
    check_dp(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000, 1'b1);
    check_dp(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0);
    check_dp(64'h7FF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 1'b0);
    for (int n = 0; n < 3000; n++) begin
      int span;
      span = (n % 3 == 0) ? 2 : (n % 3 == 1) ? 30 : 126;
      check_sp(32'(rand_fp(8, 23, span)), 32'(rand_fp(8, 23, span)), 1'($urandom));
      check_dp(rand_fp(11, 52, span * 4), rand_fp(11, 52, span * 4), 1'($urandom));
    end
    // near cancellation
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] x;
      logic [63:0] z;
      x = 32'(rand_fp(8, 23, 20));
      check_sp(x, x ^ 32'($urandom_range(255)), 1'b1);
      z = rand_fp(11, 52, 20);
      check_dp(z, z ^ 64'($urandom_range(4095)), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
