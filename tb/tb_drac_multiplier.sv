// tb_drac_multiplier: self-checking test of the reconfigurable multiplier.
// Single mode: both lanes combinational, compared with the exact reference
// (rounding towards zero) and with the four published products to one ulp.
// Double mode: operands change, the result must be right at the second dp_valid
// pulse, and dp_valid must come exactly every three clock cycles (the three
// portions of the double product). Includes A*B and C*D of the published example.
module tb_drac_multiplier;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, accuracy = 1'b0;
  logic [31:0] in1 = '0, in2 = '0, in3 = '0, in4 = '0, out1, out2;
  logic        dp_valid;
  int checks = 0, failures = 0;
  int cycle = 0, last_valid = -1, valid_gaps_checked = 0;

  drac_multiplier dut (.clk(clk), .rst_n(rst_n), .accuracy(accuracy),
                       .multi_in1(in1), .multi_in2(in2), .multi_in3(in3), .multi_in4(in4),
                       .multi_out1(out1), .multi_out2(out2), .dp_valid(dp_valid));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (dp_valid) begin
      if (last_valid >= 0 && accuracy) begin
        checks++;
        valid_gaps_checked++;
        if (cycle - last_valid != 3) begin
          failures++; $display("dp_valid gap %0d cycles", cycle - last_valid);
        end
      end
      last_valid <= cycle;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic single(logic [31:0] a, logic [31:0] b, logic [31:0] c, logic [31:0] d);
    @(negedge clk);
    accuracy = 1'b0; in1 = a; in2 = b; in3 = c; in4 = d;
    #1;
    checks += 2;
    if (out1 !== mul_sp(a, b)) begin failures++; $display("lane1 %h*%h = %h vs %h", a, b, out1, mul_sp(a, b)); end
    if (out2 !== mul_sp(c, d)) begin failures++; $display("lane2 %h*%h = %h vs %h", c, d, out2, mul_sp(c, d)); end
  endtask

  task automatic double(logic [63:0] a, logic [63:0] b);
    logic [63:0] e;
    int start;
    @(negedge clk);
    if (!accuracy) last_valid = -1;
    accuracy = 1'b1; {in1, in2} = a; {in3, in4} = b;
    start = cycle;
    @(posedge clk iff dp_valid);
    @(posedge clk iff dp_valid);
    #1;
    e = mul(11, 52, a, b);
    checks += 2;
    if ({out1, out2} !== e) begin failures++; $display("double %h*%h = %h%h vs %h", a, b, out1, out2, e); end
    // The result register is written at most 6 edges after the change; the pulse
    // that announces it is seen one edge later.
    if (cycle - start > 7) begin failures++; $display("double latency %0d", cycle - start); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    single(real_to_sp(5.6135645), real_to_sp(4.3465721), real_to_sp(2.5847865), real_to_sp(3.6546244));
    checks += 2;
    if (ulp_diff(8, 23, 64'(out1), 64'h41C3_32B6) > 1 || ulp_diff(8, 23, 64'(out2), 64'h4117_248D) > 1) begin
      failures++; $display("published a*b, c*d: %h %h", out1, out2);
    end
    single(real_to_sp(5.3678954), real_to_sp(1.4898785), real_to_sp(9.3543321), real_to_sp(6.2456545));
    if (ulp_diff(8, 23, 64'(out1), 64'h40FF_EB9F) > 1 || ulp_diff(8, 23, 64'(out2), 64'h4269_B21A) > 1) begin
      failures++; $display("published e*f, g*h: %h %h", out1, out2);
    end
    single(32'h7F80_0000, 32'h0000_0000, 32'h7F00_0000, 32'h7F00_0000);  // NaN, overflow
    double($realtobits(5026.321297352928), $realtobits(10.713167202879671));
    checks++;
    if (out1 !== 32'h40EA_4AFA) begin failures++; $display("A*B high %h", out1); end
    double($realtobits(3554.900876960291), $realtobits(355030.06326240901));
    checks++;
    if (out1 !== 32'h41D2_CE84) begin failures++; $display("C*D high %h", out1); end
    for (int n = 0; n < 400; n++) begin
      single(32'(rand_fp(8, 23, 60)), 32'(rand_fp(8, 23, 60)), 32'(rand_fp(8, 23, 60)), 32'(rand_fp(8, 23, 60)));
      double(rand_fp(11, 52, 500), rand_fp(11, 52, 500));
      double(rand_fp(11, 52, 3), rand_fp(11, 52, 3));
    end
    double(64'h7FF0_0000_0000_0000, 64'h0);
    double(64'h7FE0_0000_0000_0000, 64'h7FE0_0000_0000_0000);
    checks++;
    if (valid_gaps_checked < 100) begin failures++; $display("too few dp_valid gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
