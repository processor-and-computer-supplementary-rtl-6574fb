// logic_gate_unit: the one logic gate of a single-logic-gate processor.
//
// The processor has no ALU: every logical operation is built from repeated
// use of this gate.  GATE selects a NAND gate (the main processor) or a NOR
// gate (the variant whose NAND gate is replaced by a NOR gate).  The gate is
// applied bit by bit, so with WIDTH > 1 it is WIDTH copies of the gate side
// by side; WIDTH = 1 is the single gate itself and the default.  The wider
// option is this design's addition; the processors are defined with one gate.
//
// Interface: x, y inputs, z output.  Purely combinational, no clock.
module logic_gate_unit
  import sgp_pkg::*;
#(
  parameter gate_t GATE  = GATE_NAND,
  parameter int    WIDTH = 1
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] z
);

  always_comb begin
    if (GATE == GATE_NAND) z = ~(x & y);
    else                   z = ~(x | y);
  end

endmodule
