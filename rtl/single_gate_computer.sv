// single_gate_computer: the single-NAND-gate processor and the single-NOR-gate processor.
//
// Two small processors that share one architecture: working registers RA,
// RB, RZ, general registers R1..R4, one data line and a single logic gate.
//  * The NAND processor is complete: it runs the micro-programs of its
//    control store for NOT, AND, OR, NOR and XOR (two XOR algorithms).
//  * The NOR processor has the same datapath with a NOR gate in place of the
//    NAND gate.  No control store is defined for it, so its micro-instruction
//    word is an input port (nor_mi) and any micro-program can be driven from
//    outside, one micro-instruction per clock.
// The two stand side by side and share only the clock and reset.
//
// Ports: nand_* as in nand_processor; nor_mi, nor_ld, nor_ld_a, nor_ld_b in
// and nor_ra, nor_rb, nor_rz, nor_gpr out for the NOR processor.
// Timing: both are synchronous to clk with an asynchronous active-low reset.
module single_gate_computer
  import sgp_pkg::*;
#(
  parameter int WIDTH = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // single-NAND-gate processor
  input  logic                  nand_ld,
  input  logic [WIDTH-1:0]      nand_ld_a,
  input  logic [WIDTH-1:0]      nand_ld_b,
  input  logic                  nand_start,
  input  opcode_t               nand_op,
  output logic                  nand_busy,
  output logic                  nand_done,
  output micro_instr_t          nand_mi,
  output logic [WIDTH-1:0]      nand_ra,
  output logic [WIDTH-1:0]      nand_rb,
  output logic [WIDTH-1:0]      nand_rz,
  output logic [3:0][WIDTH-1:0] nand_gpr,
  output logic [WIDTH-1:0]      nand_bus,
  // single-NOR-gate processor
  input  micro_instr_t          nor_mi,
  input  logic                  nor_ld,
  input  logic [WIDTH-1:0]      nor_ld_a,
  input  logic [WIDTH-1:0]      nor_ld_b,
  output logic [WIDTH-1:0]      nor_ra,
  output logic [WIDTH-1:0]      nor_rb,
  output logic [WIDTH-1:0]      nor_rz,
  output logic [3:0][WIDTH-1:0] nor_gpr,
  output logic [WIDTH-1:0]      nor_bus
);

  nand_processor #(.WIDTH(WIDTH)) u_nand (
    .clk, .rst_n,
    .ld(nand_ld), .ld_a(nand_ld_a), .ld_b(nand_ld_b),
    .start(nand_start), .op(nand_op),
    .busy(nand_busy), .done(nand_done), .mi(nand_mi),
    .ra(nand_ra), .rb(nand_rb), .rz(nand_rz), .gpr(nand_gpr), .bus(nand_bus)
  );

  single_gate_datapath #(.GATE(GATE_NOR), .WIDTH(WIDTH)) u_nor (
    .clk, .rst_n, .mi(nor_mi),
    .ld(nor_ld), .ld_a(nor_ld_a), .ld_b(nor_ld_b),
    .ra(nor_ra), .rb(nor_rb), .rz(nor_rz), .gpr(nor_gpr), .bus(nor_bus)
  );

endmodule
