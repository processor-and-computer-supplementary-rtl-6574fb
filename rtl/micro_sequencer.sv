// micro_sequencer: steps through one micro-program, one micro-instruction per clock.
//
// Each micro-instruction takes exactly one clock cycle, so an instruction
// whose micro-program has N micro-instructions takes N cycles.  When idle,
// a start pulse latches the opcode; the micro-program counter then runs
// 0, 1, ..., N-1, one value per cycle, while busy is high, and done pulses
// for one cycle right after the last micro-instruction has been executed.
// The program length N comes from the control store for the opcode shown on
// cur_op (the incoming op while idle, the latched op while busy).
//
// Interface: start/op in; len in from the control store; cur_op and step out
// to the control store; busy (a micro-instruction of step `step` is to be
// executed in this cycle), done.
// Timing: start sampled at edge 0 -> steps executed at edges 1..N -> done is
// high during the cycle after edge N.  A start while busy is ignored; an
// opcode of length 0 gives done one cycle later without any step.  These
// handshake details are this design's choices.
module micro_sequencer
  import sgp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  opcode_t              op,
  input  logic [STEP_BITS-1:0] len,
  output opcode_t              cur_op,
  output logic [STEP_BITS-1:0] step,
  output logic                 busy,
  output logic                 done
);

  opcode_t op_q;

  assign cur_op = busy ? op_q : op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q <= OP_NOT;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        step <= '0;
        if (start) begin
          op_q <= op;
          if (len == '0) done <= 1'b1;
          else           busy <= 1'b1;
        end
      end else if (step == len - 1'b1) begin
        step <= '0;
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  a_step_in_range: assert property (@(posedge clk) disable iff (!rst_n) busy |-> step < len)
    else $error("micro-program counter past the end of the program");

endmodule
