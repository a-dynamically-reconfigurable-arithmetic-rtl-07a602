// tb_drac_outctrl: self-checking test of the output controller.
// Each of the seven data inputs carries a distinct tag; for every sel and sel2
// the two outputs must carry the tags of the results that mode reports on that
// step (or zero for steps the mode does not use).
module tb_drac_outctrl;
  logic [2:0]  sel;
  logic [1:0]  sel2;
  logic [31:0] d [1:7];
  logic [31:0] o1, o2;
  int checks = 0, failures = 0;

  drac_outctrl dut (.sel(sel), .sel2(sel2),
                    .data_in1(d[1]), .data_in2(d[2]), .data_in3(d[3]), .data_in4(d[4]),
                    .data_in5(d[5]), .data_in6(d[6]), .data_in7(d[7]),
                    .calc_out1(o1), .calc_out2(o2));

  // Expected input numbers (0 = zero output) for (mode, step).
  function automatic void table_entry(int m, int s, output int e1, output int e2);
    e1 = 0; e2 = 0;
    case (m)
      1, 6: begin
        if (s == 0) begin e1 = 1; e2 = 2; end
        if (s == 1) begin e1 = 3; e2 = 4; end
        if (s == 2) begin e1 = 5; e2 = 6; end
      end
      2: begin
        if (s == 0) begin e1 = 5; e2 = 6; end
        if (s == 1) begin e1 = 4; e2 = 0; end
      end
      0, 3, 7: if (s == 0) begin e1 = 5; e2 = 6; end
      default: if (s == 0) e1 = 7;
    endcase
  endfunction

  initial begin
    for (int n = 1; n <= 7; n++) d[n] = 32'h1000_0000 * n + 32'($urandom_range(65535));
    for (int m = 0; m < 8; m++)
      for (int s = 0; s < 4; s++) begin
        int e1, e2;
        sel = 3'(m); sel2 = 2'(s);
        #1;
        table_entry(m, s, e1, e2);
        checks += 2;
        if (o1 !== ((e1 == 0) ? 32'd0 : d[e1])) begin failures++; $display("sel %0d sel2 %0d out1 %h", m, s, o1); end
        if (o2 !== ((e2 == 0) ? 32'd0 : d[e2])) begin failures++; $display("sel %0d sel2 %0d out2 %h", m, s, o2); end
      end
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
