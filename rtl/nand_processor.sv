// nand_processor: the microprogrammed single-NAND-gate processor.
//
// The only logic element is one NAND gate; NOT, AND, OR, NOR and XOR are
// each carried out as a micro-program of register transfers over one data
// line and NAND steps.  The operands are placed in RA and RB beforehand and
// the result is left in RZ; R1..R4 serve as scratch registers.
//
// Blocks: micro_sequencer (micro-program counter), microcode_rom (control
// store), single_gate_datapath with a NAND gate (registers, switches, data
// line).
//
// Interface: ld with ld_a/ld_b loads RA/RB (accepted only while idle);
// start with op begins an instruction; busy is high while it runs; done
// pulses once when RZ holds the result.  ra, rb, rz, gpr show the registers and bus the data line;
// mi shows the micro-instruction applied in the current cycle.
// Timing: an instruction of N micro-instructions takes N clock cycles from
// the edge that samples start to the edge after which done is high
// (NOT 2, AND 3, OR 9, NOR 11, XOR 11, XOR by Algorithm I 12).  Loading in
// the same cycle as start is allowed: the load lands at the start edge, before
// the first micro-instruction.
//
// The datapath, switch encoding, micro-programs and one-cycle-per-step timing
// are those of the published processor.  The load port, the start/busy/done
// handshake and the ignoring of start and load while busy are this design's
// own choices; the published processor only assumes the operands are in RA
// and RB before an instruction begins.
module nand_processor
  import sgp_pkg::*;
#(
  parameter int WIDTH = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ld,
  input  logic [WIDTH-1:0]      ld_a,
  input  logic [WIDTH-1:0]      ld_b,
  input  logic                  start,
  input  opcode_t               op,
  output logic                  busy,
  output logic                  done,
  output micro_instr_t          mi,
  output logic [WIDTH-1:0]      ra,
  output logic [WIDTH-1:0]      rb,
  output logic [WIDTH-1:0]      rz,
  output logic [3:0][WIDTH-1:0] gpr,
  output logic [WIDTH-1:0]      bus
);

  opcode_t              cur_op;
  logic [STEP_BITS-1:0] step, len;
  micro_instr_t         rom_mi;

  micro_sequencer u_seq (
    .clk, .rst_n, .start, .op, .len,
    .cur_op, .step, .busy, .done
  );

  microcode_rom u_rom (
    .op(cur_op), .step, .mi(rom_mi), .len
  );

  assign mi = busy ? rom_mi : MI_NOP;

  single_gate_datapath #(.GATE(GATE_NAND), .WIDTH(WIDTH)) u_dp (
    .clk, .rst_n, .mi,
    .ld(ld && !busy), .ld_a, .ld_b,
    .ra, .rb, .rz, .gpr, .bus
  );

endmodule
