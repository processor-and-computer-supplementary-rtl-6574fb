// microcode_rom: control store of the single-NAND-gate processor.
//
// Holds one micro-program per instruction, each a list of 13-bit
// micro-instructions in the sgp_pkg layout {S1 S2 S3, S12, S13, S14, A1 A2, RW}.
// The programs and their lengths are the processor's published ones:
//   NOT 2, AND 3, OR 9, NOR 11, XOR by Algorithm II 11, XOR by Algorithm I 12
// micro-instructions, using 0, 0, 2, 2, 3 and 4 of the registers R1..R4.
// The programs are packed one after another in a 48-word array; a small
// table of start addresses and lengths, indexed by the opcode, locates them.
// Packing them this way, and the opcode numbering, are this design's choices.
//
// Interface: op and step (0-based index inside the program) in; mi (the
// micro-instruction, or the all-off word past the end or for an unused
// opcode) and len (the program length, 0 for an unused opcode) out.
// Timing: purely combinational (an asynchronous ROM).
module microcode_rom
  import sgp_pkg::*;
(
  input  opcode_t              op,
  input  logic [STEP_BITS-1:0] step,
  output micro_instr_t         mi,
  output logic [STEP_BITS-1:0] len
);

  localparam int ROM_WORDS = 48;

  // The gate step RZ = RA (gate) RB.
  localparam logic [MI_BITS-1:0] G = 13'b111_00_00_00_00_00;

  //                        S1S2S3 S12 S13 S14 A1A2 RW
  localparam logic [MI_BITS-1:0] ROM [ROM_WORDS] = '{
    // NOT RA  (address 0)
    13'b000_01_10_00_00_00,   // RB = RA
    G,                        // RZ = RA . RB
    // AND RA RB  (address 2)
    G,                        // RZ = RA . RB
    13'b000_10_10_01_00_00,   // RA = RZ, RB = RZ
    G,                        // RZ = RA . RB
    // OR RA RB  (address 5)
    13'b000_00_01_00_00_10,   // R1 = RB
    13'b000_01_10_00_00_00,   // RB = RA
    G,                        // RZ = ~A
    13'b000_00_00_01_01_10,   // R2 = RZ
    13'b000_10_10_00_00_01,   // RA = R1, RB = R1
    G,                        // RZ = ~B
    13'b000_00_10_01_00_00,   // RB = RZ
    13'b000_10_00_00_01_01,   // RA = R2
    G,                        // RZ = ~A . ~B = A | B
    // NOR RA RB  (address 14)
    13'b000_00_01_00_00_10,   // R1 = RB
    13'b000_01_10_00_00_00,   // RB = RA
    G,
    13'b000_00_00_01_01_10,   // R2 = RZ
    13'b000_10_10_00_00_01,   // RA = R1, RB = R1
    G,
    13'b000_00_10_01_00_00,   // RB = RZ
    13'b000_10_00_00_01_01,   // RA = R2
    G,                        // RZ = A | B
    13'b000_10_10_01_00_00,   // RA = RZ, RB = RZ
    G,                        // RZ = ~(A | B)
    // XOR RA RB, Algorithm II  (address 25)
    13'b000_00_01_00_00_10,   // R1 = RB
    G,                        // RZ = A.B
    13'b000_00_10_01_01_10,   // R2 = RZ, RB = RZ
    G,                        // RZ = A.(A.B)
    13'b000_00_00_01_10_10,   // R3 = RZ
    13'b000_10_00_00_01_01,   // RA = R2
    13'b000_00_10_00_00_01,   // RB = R1
    G,                        // RZ = (A.B).B
    13'b000_10_00_00_10_01,   // RA = R3
    13'b000_00_10_01_00_00,   // RB = RZ
    G,                        // RZ = A ^ B
    // XOR RA RB, Algorithm I  (address 36)
    13'b000_01_00_00_00_10,   // R1 = RA
    13'b000_00_01_00_01_10,   // R2 = RB
    G,                        // RZ = A.B
    13'b000_00_10_01_00_00,   // RB = RZ
    13'b000_00_00_01_10_10,   // R3 = RZ
    G,                        // RZ = A.(A.B)
    13'b000_00_00_01_11_10,   // R4 = RZ
    13'b000_10_00_00_01_01,   // RA = R2
    G,                        // RZ = B.(A.B)
    13'b000_10_00_00_11_01,   // RA = R4
    13'b000_00_10_01_00_00,   // RB = RZ
    G                         // RZ = A ^ B
  };

  logic [5:0] base;
  logic [5:0] addr;

  always_comb begin
    unique case (op)
      OP_NOT:      begin base = 6'd0;  len = 4'd2;  end
      OP_AND:      begin base = 6'd2;  len = 4'd3;  end
      OP_OR:       begin base = 6'd5;  len = 4'd9;  end
      OP_NOR:      begin base = 6'd14; len = 4'd11; end
      OP_XOR:      begin base = 6'd25; len = 4'd11; end
      OP_XOR_ALG1: begin base = 6'd36; len = 4'd12; end
      default:     begin base = 6'd0;  len = 4'd0;  end
    endcase
    addr = base + 6'(step);
    if (step < len) mi = micro_instr_t'(ROM[addr]);
    else            mi = MI_NOP;
  end

endmodule
