// tb_drac_core: self-checking test of the whole reconfigurable circuit.
// All eight modes are run on random operands and on the published example
// inputs; for every sel2 step both outputs are compared with the result
// composed from the reference operations (products and sums rounded towards
// zero, the quotient to nearest even). The published single-precision
// simulation values, the double-precision simulation values and the board
// read-out of the double experiment are checked too (to one unit in the last
// place, since the published host rounding of decimal input is not known).
// Double modes wait for the second dp_valid pulse; the cycle count is checked.
// The sel value changes from one check to the next with no pause in between,
// which is the dynamic reconfiguration the circuit is built for.
module tb_drac_core;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  sel = '0;
  logic [1:0]  sel2 = '0;
  logic [31:0] din [12];
  logic [31:0] out1, out2;
  logic        dp_valid;
  int checks = 0, failures = 0, cycle = 0;
  int mode_runs [8];

  drac_core dut (.clk(clk), .rst_n(rst_n), .sel(sel), .sel2(sel2), .din(din),
                 .calc_out1(out1), .calc_out2(out2), .dp_valid(dp_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // Apply operands and mode, wait as the mode needs, check all four steps.
  // got[] returns the observed words, steps 0..2, for comparison with published values.
  task automatic run_mode(int m, logic [31:0] v [12], output logic [31:0] got [6]);
    logic [31:0] e1, e2;
    int start;
    @(negedge clk);
    din = v;
    sel = 3'(m);
    sel2 = 2'd0;
    start = cycle;
    if (m >= 6) begin
      @(posedge clk iff dp_valid);
      @(posedge clk iff dp_valid);
      checks++;
      if (cycle - start > 7) begin failures++; $display("mode %0d latency %0d", m, cycle - start); end
      @(negedge clk);
    end
    #1;
    mode_runs[m]++;
    for (int s = 0; s < 4; s++) begin
      sel2 = 2'(s);
      #1;
      mode_result(m, s, v, e1, e2);
      checks += 2;
      if (out1 !== e1 || out2 !== e2) begin
        failures++;
        if (failures < 20) $display("mode %0d step %0d: got %h %h expected %h %h", m, s, out1, out2, e1, e2);
      end
      if (s < 3) begin got[2*s] = out1; got[2*s+1] = out2; end
    end
  endtask

  task automatic near(string what, logic [31:0] got, logic [31:0] pub);
    checks++;
    if (ulp_diff(8, 23, 64'(got), 64'(pub)) > 1) begin
      failures++; $display("%s: %h, published %h", what, got, pub);
    end
  endtask

  task automatic near_d(string what, logic [63:0] got, logic [63:0] pub);
    checks++;
    if (ulp_diff(11, 52, got, pub) > 1) begin
      failures++; $display("%s: %h, published %h", what, got, pub);
    end
  endtask

  logic [31:0] sv [12], dv [12], xv [12], rv [12], got [6];

  initial begin
    foreach (din[n]) din[n] = '0;
    // Published single-precision inputs a..l.
    sv[0] = real_to_sp(5.6135645);  sv[1] = real_to_sp(4.3465721);
    sv[2] = real_to_sp(2.5847865);  sv[3] = real_to_sp(3.6546244);
    sv[4] = real_to_sp(5.3678954);  sv[5] = real_to_sp(1.4898785);
    sv[6] = real_to_sp(9.3543321);  sv[7] = real_to_sp(6.2456545);
    sv[8] = real_to_sp(10.254389);  sv[9] = real_to_sp(15.326721);
    sv[10] = real_to_sp(123.45676); sv[11] = real_to_sp(890.12346);
    // Published double inputs A..F of the simulation and of the board run.
    {dv[0], dv[1]}   = $realtobits(5026.321297352928);
    {dv[2], dv[3]}   = $realtobits(10.713167202879671);
    {dv[4], dv[5]}   = $realtobits(3554.900876960291);
    {dv[6], dv[7]}   = $realtobits(355030.06326240901);
    {dv[8], dv[9]}   = $realtobits(657661.12784750015);
    {dv[10], dv[11]} = $realtobits(4.0309885854732644e14);
    {xv[0], xv[1]}   = $realtobits(254.2657811245723);
    {xv[2], xv[3]}   = $realtobits(562.2487956427975);
    {xv[4], xv[5]}   = $realtobits(753.5610331726043);
    {xv[6], xv[7]}   = $realtobits(341.5645322624046);
    {xv[8], xv[9]}   = $realtobits(6576.627847498471);
    {xv[10], xv[11]} = $realtobits(4498.513984982131);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run_mode(0, sv, got);
    near("ac-bd", got[0], 32'hBFB0_0750);
    near("bc+ad", got[1], 32'h41FE_00E0);
    run_mode(1, sv, got);
    near("a*b", got[0], 32'h41C3_32B6); near("c*d", got[1], 32'h4117_248D);
    near("e*f", got[2], 32'h40FF_EB9F); near("g*h", got[3], 32'h4269_B21A);
    near("i+j", got[4], 32'h41CC_A61D); near("k+l", got[5], 32'h447D_6523);
    run_mode(2, sv, got);
    // These two published words are compared on their leading hex digits.
    checks++; if (got[0][31:4] !== 28'h41D_7E05) begin failures++; $display("a*b+c %h", got[0]); end
    near("e*f+g", got[1], 32'h418A_D094);
    checks++; if (got[2][31:8] !== 24'h427C45) begin failures++; $display("a*b*c %h", got[2]); end
    run_mode(3, sv, got);
    checks++; if (got[0][31:12] !== 20'h42076) begin failures++; $display("ab+cd %h", got[0]); end
    near("ef+gh", got[1], 32'h4284_D7C6);
    run_mode(4, sv, got);
    // The real part is not printed; compare with the quotient worked out in reals.
    near("real part", got[0], real_to_sp(
      (sp_to_real(sv[0]) * sp_to_real(sv[2]) + sp_to_real(sv[1]) * sp_to_real(sv[3])) /
      (sp_to_real(sv[2]) * sp_to_real(sv[2]) + sp_to_real(sv[3]) * sp_to_real(sv[3]))));
    run_mode(5, sv, got);
    checks++; if (got[0][31:4] !== 28'hBEE_D233) begin failures++; $display("imag part %h", got[0]); end
    run_mode(6, dv, got);
    near_d("A*B", {got[0], got[1]}, 64'h40EA_4AFA_4152_8ED2);
    near_d("C*D", {got[2], got[3]}, 64'h41D2_CE84_4ACF_4896);
    near_d("E+F", {got[4], got[5]}, 64'h42F6_E9DC_44FF_17B9);
    run_mode(7, dv, got);
    near_d("A*B+C*D", {got[0], got[1]}, 64'h41D2_CEB8_E0C3_CB3B);
    run_mode(6, xv, got);
    near_d("board A*B", {got[0], got[1]}, 64'h4101_7385_089F_7F2B);
    near_d("board C*D", {got[2], got[3]}, 64'h410F_6B6D_C64D_1DBE);
    near_d("board E+F", {got[4], got[5]}, 64'h40C5_A192_2791_14D9);

    // Random operands, modes in random order.
    for (int n = 0; n < 1600; n++) begin
      int m;
      m = $urandom_range(7);
      foreach (rv[q]) rv[q] = 32'(rand_fp(8, 23, 20));
      if (m >= 6)
        for (int q = 0; q < 12; q += 2) {rv[q], rv[q+1]} = rand_fp(11, 52, 40);
      run_mode(m, rv, got);
    end
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (mode_runs[m] < 10) begin failures++; $display("mode %0d ran %0d times", m, mode_runs[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
