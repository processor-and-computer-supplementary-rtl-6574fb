// sgp_pkg: types and constants shared by the single-logic-gate processors.
//
// A micro-instruction is one 13-bit control word, laid out field by field in
// the order of the processor's micro-instruction tables:
//   {S1, S2, S3, S12[1:0], S13[1:0], S14[1:0], A1, A2, RW[1:0]}
// S1/S2 connect RA/RB to the gate inputs and S3 connects the gate output to
// RZ; all three are set together for a gate step "RZ = RA op RB".
// S12, S13 and S14 are the two-way switches of RA, RB and RZ to the data line
// and RW that of the register R1..R4 picked by {A1, A2}; each of these two-bit
// fields means 01 = the register drives the data line (read), 10 = the
// register loads from the data line (write), 00 = disconnected.
// The code 11 is not used by any micro-program; this design treats it as
// disconnected and flags it with an assertion in the datapath.
package sgp_pkg;

  // Two-way switch setting of one register to the data line.
  typedef enum logic [1:0] {
    SW_OFF   = 2'b00,
    SW_READ  = 2'b01,
    SW_WRITE = 2'b10,
    SW_BAD   = 2'b11
  } sw_t;

  typedef struct packed {
    logic       s1;   // RA -> gate input X
    logic       s2;   // RB -> gate input Y
    logic       s3;   // gate output Z -> RZ
    sw_t        s12;  // RA <-> data line
    sw_t        s13;  // RB <-> data line
    sw_t        s14;  // RZ <-> data line
    logic [1:0] a;    // {A1, A2}: 00 = R1, 01 = R2, 10 = R3, 11 = R4
    sw_t        rw;   // selected R1..R4 <-> data line
  } micro_instr_t;

  localparam int MI_BITS = $bits(micro_instr_t);  // 13

  // The no-operation control word: everything disconnected.
  localparam micro_instr_t MI_NOP = '{s1: 1'b0, s2: 1'b0, s3: 1'b0,
                                      s12: SW_OFF, s13: SW_OFF, s14: SW_OFF,
                                      a: 2'b00, rw: SW_OFF};

  // Kind of the single logic gate.
  typedef enum logic {
    GATE_NAND = 1'b0,
    GATE_NOR  = 1'b1
  } gate_t;

  // Instructions of the single-NAND-gate processor.
  typedef enum logic [2:0] {
    OP_NOT      = 3'd0,  // RZ = ~RA
    OP_AND      = 3'd1,  // RZ = RA & RB
    OP_OR       = 3'd2,  // RZ = RA | RB
    OP_NOR      = 3'd3,  // RZ = ~(RA | RB)
    OP_XOR      = 3'd4,  // RZ = RA ^ RB, Algorithm II (11 steps, 3 registers)
    OP_XOR_ALG1 = 3'd5   // RZ = RA ^ RB, Algorithm I  (12 steps, 4 registers)
  } opcode_t;

  // Width of a micro-program step counter (the longest program has 12 steps).
  localparam int STEP_BITS = 4;

endpackage
