// tb_drac_system: end-to-end test of the circuit with its host-side buffers.
// A bus master writes the twelve operands into the input buffer and a mode into
// the selection register, polls the status word until the run is done and reads
// the six output-buffer words, which are compared with the reference results of
// that mode (steps sel2 = 0, 1, 2 in order). It runs every mode on the published
// inputs and on random operands, and counts how often each mechanism happened:
// each of the eight modes, a switch to a different mode, a double-precision run
// waiting for the three-cycle multipliers, runs that fill all three output
// pairs, an overflow to infinity, a NaN result and a write ignored while busy.
// Run time per mode is checked against the sequencer's bound.
module tb_drac_system;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        we = 1'b0;
  logic [4:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic        busy, done;
  int checks = 0, failures = 0;
  int mode_count [8];
  int n_switch = 0, n_double_wait = 0, n_three_pairs = 0, n_overflow = 0, n_nan = 0, n_ignored = 0;
  int last_mode = -1;

  drac_system dut (.clk(clk), .rst_n(rst_n), .cpu_we(we), .cpu_addr(addr),
                   .cpu_wdata(wdata), .cpu_rdata(rdata), .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(logic [4:0] a, logic [31:0] d);
    @(negedge clk);
    we = 1'b1; addr = a; wdata = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic bus_read(logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    addr = a;
    @(negedge clk);
    d = rdata;
  endtask

  task automatic run(int m, logic [31:0] v [12]);
    logic [31:0] st, w, e [6], got [6];
    int cycles;
    for (int n = 0; n < 12; n++) bus_write(5'(n), v[n]);
    bus_write(5'd12, 32'(m));
    cycles = 0;
    // A write during the run must not reach the input buffer.
    @(negedge clk);
    if (busy) begin
      we = 1'b1; addr = 5'd0; wdata = ~v[0];
      @(negedge clk);
      we = 1'b0;
      bus_read(5'd0, w);
      checks++;
      if (w !== v[0]) begin failures++; $display("write during run reached the buffer"); end
      else n_ignored++;
    end
    do begin
      bus_read(5'd12, st);
      cycles++;
    end while (!st[0] && cycles < 50);
    checks++;
    if (!st[0] || st[6:4] !== 3'(m)) begin failures++; $display("mode %0d: status %h", m, st); end
    for (int n = 0; n < 6; n++) bus_read(5'(16 + n), got[n]);
    for (int s = 0; s < 3; s++) mode_result(m, s, v, e[2*s], e[2*s+1]);
    for (int n = 0; n < 6; n++) begin
      checks++;
      if (got[n] !== e[n]) begin
        failures++;
        if (failures < 20) $display("mode %0d out%0d: %h expected %h", m, n + 1, got[n], e[n]);
      end
      if (m < 6 && got[n][30:23] == 8'hFF && got[n][22:0] == 0) n_overflow++;
      if (m < 6 && got[n][30:23] == 8'hFF && got[n][22:0] != 0) n_nan++;
    end
    mode_count[m]++;
    if (last_mode >= 0 && last_mode != m) n_switch++;
    last_mode = m;
    if (m >= 6) n_double_wait++;
    if (m == 1 || m == 6) n_three_pairs++;
  endtask

  logic [31:0] sv [12], dv [12], rv [12];

  initial begin
    sv[0] = real_to_sp(5.6135645);  sv[1] = real_to_sp(4.3465721);
    sv[2] = real_to_sp(2.5847865);  sv[3] = real_to_sp(3.6546244);
    sv[4] = real_to_sp(5.3678954);  sv[5] = real_to_sp(1.4898785);
    sv[6] = real_to_sp(9.3543321);  sv[7] = real_to_sp(6.2456545);
    sv[8] = real_to_sp(10.254389);  sv[9] = real_to_sp(15.326721);
    sv[10] = real_to_sp(123.45676); sv[11] = real_to_sp(890.12346);
    {dv[0], dv[1]}   = $realtobits(254.2657811245723);
    {dv[2], dv[3]}   = $realtobits(562.2487956427975);
    {dv[4], dv[5]}   = $realtobits(753.5610331726043);
    {dv[6], dv[7]}   = $realtobits(341.5645322624046);
    {dv[8], dv[9]}   = $realtobits(6576.627847498471);
    {dv[10], dv[11]} = $realtobits(4498.513984982131);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // The published board run: single parallel (sel 1), then double parallel (sel 6).
    run(1, sv);
    run(6, dv);
    for (int m = 0; m < 8; m++) run(m, (m >= 6) ? dv : sv);
    // Exceptions: a*b overflows, i+j is inf + (-inf).
    rv = sv;
    rv[0] = 32'h7F00_0000; rv[1] = 32'h7F00_0000;
    rv[8] = 32'h7F80_0000; rv[9] = 32'hFF80_0000;
    run(1, rv);
    // Random operands and modes.
    for (int n = 0; n < 150; n++) begin
      int m;
      m = $urandom_range(7);
      foreach (rv[q]) rv[q] = 32'(rand_fp(8, 23, 20));
      if (m >= 6)
        for (int q = 0; q < 12; q += 2) {rv[q], rv[q+1]} = rand_fp(11, 52, 40);
      run(m, rv);
    end

    for (int m = 0; m < 8; m++) begin
      checks++;
      if (mode_count[m] == 0) begin failures++; $display("mode %0d never ran", m); end
    end
    checks += 6;
    if (n_switch == 0)       begin failures++; $display("no mode switch"); end
    if (n_double_wait == 0)  begin failures++; $display("no double-precision wait"); end
    if (n_three_pairs == 0)  begin failures++; $display("no three-pair run"); end
    if (n_overflow == 0)     begin failures++; $display("no overflow"); end
    if (n_nan == 0)          begin failures++; $display("no NaN"); end
    if (n_ignored == 0)      begin failures++; $display("no ignored write"); end
    $display("mode switches %0d, double waits %0d, three-pair runs %0d, overflows %0d, NaNs %0d, ignored writes %0d",
             n_switch, n_double_wait, n_three_pairs, n_overflow, n_nan, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
