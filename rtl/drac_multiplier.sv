// drac_multiplier: dynamically reconfigurable single/double precision multiplier.
//
// With accuracy = 0 it is two independent single-precision multipliers:
//   multi_out1 = multi_in1 * multi_in2,  multi_out2 = multi_in3 * multi_in4,
// both combinational. With accuracy = 1 it is one double-precision multiplier:
// A = {multi_in1, multi_in2} and B = {multi_in3, multi_in4} (high half first),
// and {multi_out1, multi_out2} = A * B. All results round towards zero.
//
// As in the published design, the double product is computed over three clock
// cycles ("divided into three portions"). How it is divided is this design's
// choice: B's 53-bit significand is cut into three 18-bit portions and each cycle
// multiplies A's significand by one portion and adds it, shifted, to an
// accumulator. A free-running three-phase counter runs while accuracy is 1:
// phase 0 captures A and B, phase 2 writes the finished result to the output
// register and pulses dp_valid for one cycle. A result therefore appears every
// three cycles and reflects the operands present at the phase-0 clock edge of
// its group; after an operand change a correct result is guaranteed at the
// second dp_valid pulse. The double result holds between updates. Leaving
// double mode returns the counter to phase 0. rst_n is an active-low
// asynchronous reset.
module drac_multiplier
  import drac_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  accuracy,
  input  word_t multi_in1,
  input  word_t multi_in2,
  input  word_t multi_in3,
  input  word_t multi_in4,
  output word_t multi_out1,
  output word_t multi_out2,
  output logic  dp_valid
);
  localparam int PORTION = 18;
  localparam int NPORT   = 3;

  // Single-precision lanes.
  word_t sp_out1, sp_out2;
  fp_mul_comb #(.EXP(8), .MAN(23)) u_lane1 (.a(multi_in1), .b(multi_in2), .y(sp_out1));
  fp_mul_comb #(.EXP(8), .MAN(23)) u_lane2 (.a(multi_in3), .b(multi_in4), .y(sp_out2));

  // Double-precision path, three portions.
  logic [1:0]   phase;
  dword_t       op_a, op_b, cur_a, cur_b, dp_res, dp_next;
  logic [52:0]  ma;
  logic [PORTION*NPORT-1:0] mb;
  logic [PORTION-1:0] portion;
  logic [105:0] acc, acc_next;
  logic [70:0]  pp;

  always_comb begin
    cur_a   = (phase == 2'd0) ? {multi_in1, multi_in2} : op_a;
    cur_b   = (phase == 2'd0) ? {multi_in3, multi_in4} : op_b;
    ma      = {1'b1, cur_a[51:0]};
    mb      = {1'b0, 1'b1, cur_b[51:0]};
    portion = mb[PORTION*phase +: PORTION];
    pp      = 71'(ma) * 71'(portion);
    acc_next = ((phase == 2'd0) ? 106'd0 : acc) + (106'(pp) << (PORTION * phase));
  end

  fp_mul_norm #(.EXP(11), .MAN(52)) u_dp_norm (.a(cur_a), .b(cur_b), .prod(acc_next), .y(dp_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= 2'd0;
      op_a     <= '0;
      op_b     <= '0;
      acc      <= '0;
      dp_res   <= '0;
      dp_valid <= 1'b0;
    end else begin
      dp_valid <= 1'b0;
      if (!accuracy) begin
        phase <= 2'd0;
      end else begin
        acc <= acc_next;
        if (phase == 2'd0) begin
          op_a <= cur_a;
          op_b <= cur_b;
        end
        if (phase == 2'(NPORT - 1)) begin
          phase    <= 2'd0;
          dp_res   <= dp_next;
          dp_valid <= 1'b1;
        end else begin
          phase <= phase + 2'd1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) phase < 2'(NPORT));

  assign multi_out1 = accuracy ? dp_res[63:32] : sp_out1;
  assign multi_out2 = accuracy ? dp_res[31:0]  : sp_out2;

endmodule
