// drac_system: the reconfigurable arithmetic circuit with its host-side buffers.
//
// This is the board-level arrangement of the published design: a host processor
// writes a selection value into a register and twelve operands into an input
// buffer; the circuit reads the operands, computes in the selected mode and
// writes its results into an output buffer, from which the processor reads them.
// Only the roles of the register and the two buffers are given by the published
// design; the word-wide bus, the address map and the sequencing are this
// design's own.
//
// Bus (one word per cycle, synchronous to clk):
//   write cpu_addr 0..11   operand a..l into the input buffer
//   write cpu_addr 12      bits [2:0] into the selection register; starts a run
//   read  cpu_addr 0..11   input buffer
//   read  cpu_addr 12      status: bit 0 done, bit 1 busy, bits [6:4] sel
//   read  cpu_addr 16..21  output buffer out1..out6
// cpu_rdata is registered: it shows the addressed word one cycle after the
// address. Writes that arrive while a run is busy are ignored.
//
// A run waits until the core's outputs are valid for the current operands (one
// cycle in single-precision modes; the second dp_valid pulse of the multipliers
// in double modes, at most 6 cycles), then steps sel2 through 0, 1, 2 and stores
// calc_out1/calc_out2 of step k into out(2k+1)/out(2k+2). Result words a mode
// does not produce read as zero. done rises when the run ends and stays high
// until the next run starts. rst_n is an active-low asynchronous reset.
module drac_system
  import drac_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cpu_we,
  input  logic [4:0] cpu_addr,
  input  word_t      cpu_wdata,
  output word_t      cpu_rdata,
  output logic       busy,
  output logic       done
);
  localparam int NUM_OUTPUTS = 6;
  localparam logic [4:0] ADDR_SEL  = 5'd12;
  localparam logic [4:0] ADDR_OBUF = 5'd16;

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_CAPTURE} state_e;

  state_e     state;
  logic [2:0] sel_q;
  logic [1:0] sel2_q;
  logic [1:0] dpv_count;
  word_t      ibuf [NUM_INPUTS];
  word_t      obuf [NUM_OUTPUTS];
  word_t      calc_out1, calc_out2;
  logic       dp_valid;

  drac_core u_core (
    .clk(clk), .rst_n(rst_n), .sel(sel_q), .sel2(sel2_q), .din(ibuf),
    .calc_out1(calc_out1), .calc_out2(calc_out2), .dp_valid(dp_valid));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sel_q     <= '0;
      sel2_q    <= '0;
      dpv_count <= '0;
      done      <= 1'b0;
      for (int n = 0; n < NUM_INPUTS; n++)  ibuf[n] <= '0;
      for (int n = 0; n < NUM_OUTPUTS; n++) obuf[n] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (cpu_we && cpu_addr < 5'(NUM_INPUTS))
            ibuf[cpu_addr[3:0]] <= cpu_wdata;
          if (cpu_we && cpu_addr == ADDR_SEL) begin
            sel_q     <= cpu_wdata[2:0];
            sel2_q    <= '0;
            dpv_count <= '0;
            done      <= 1'b0;
            state     <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          // Double modes: accuracy is set from this cycle on, so the multipliers
          // start a fresh phase-0 group; wait for two finished products.
          if (sel_q[2:1] != 2'b11) begin
            state <= S_CAPTURE;
          end else if (dp_valid) begin
            dpv_count <= dpv_count + 2'd1;
            if (dpv_count == 2'd1) state <= S_CAPTURE;
          end
        end
        S_CAPTURE: begin
          obuf[2*sel2_q]     <= calc_out1;
          obuf[2*sel2_q + 1] <= calc_out2;
          if (sel2_q == 2'd2) begin
            sel2_q <= '0;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            sel2_q <= sel2_q + 2'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_rdata <= '0;
    end else begin
      if (cpu_addr < 5'(NUM_INPUTS))
        cpu_rdata <= ibuf[cpu_addr[3:0]];
      else if (cpu_addr == ADDR_SEL)
        cpu_rdata <= {25'd0, sel_q, 2'b00, busy, done};
      else if (cpu_addr >= ADDR_OBUF && cpu_addr < ADDR_OBUF + 5'(NUM_OUTPUTS))
        cpu_rdata <= obuf[3'(cpu_addr - ADDR_OBUF)];
      else
        cpu_rdata <= '0;
    end
  end

  // A run never steps past the third output pair.
  assert property (@(posedge clk) disable iff (!rst_n) sel2_q <= 2'd2);

endmodule
