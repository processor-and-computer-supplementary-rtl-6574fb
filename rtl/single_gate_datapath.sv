// single_gate_datapath: the datapath of a single-logic-gate processor.
//
// Three working registers RA, RB and RZ, four general registers R1..R4, one
// logic gate and one shared data line.  Every cycle one micro-instruction
// (see sgp_pkg) sets the switches:
//   * a gate step (S1 = S2 = S3 = 1) loads RZ with gate(RA, RB);
//   * a transfer step connects one register to the data line as the source
//     (switch = 01) and one or more registers as destinations (switch = 10),
//     e.g. "RA = RZ. RB = RZ." is S14 = 01 with S12 = S13 = 10.
// The gate is a NAND gate or, with GATE = GATE_NOR, a NOR gate; the rest of
// the datapath is the same for both.
//
// Interface: mi is the micro-instruction applied in this cycle.  ld loads RA
// and RB from ld_a and ld_b (the operands that are "already available in RA
// and RB" before an instruction runs); ld takes precedence over mi for RA and
// RB.  ra, rb, rz and gpr show the register contents; rz is the result of an
// instruction.  bus shows the data line.
// Timing: one micro-instruction per clock cycle; registers load at the rising
// edge, everything in front of them is combinational.  rst_n is an
// asynchronous active-low reset clearing every register to zero.
//
// Choices of this design, beyond the published architecture: the external load
// port, the reset, the data line reading as zero when nothing drives it,
// and a disconnected gate input reading as zero.  Two sources on the data
// line at once, the unused switch code 11, a gate step without both input
// switches closed and RZ written from the gate and the data line together are
// never produced by a correct micro-program and are caught by assertions.
module single_gate_datapath
  import sgp_pkg::*;
#(
  parameter gate_t GATE  = GATE_NAND,
  parameter int    WIDTH = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  micro_instr_t          mi,
  input  logic                  ld,
  input  logic [WIDTH-1:0]      ld_a,
  input  logic [WIDTH-1:0]      ld_b,
  output logic [WIDTH-1:0]      ra,
  output logic [WIDTH-1:0]      rb,
  output logic [WIDTH-1:0]      rz,
  output logic [3:0][WIDTH-1:0] gpr,
  output logic [WIDTH-1:0]      bus
);

  logic [WIDTH-1:0] gate_x, gate_y, gate_z;
  logic [WIDTH-1:0] gpr_rd;
  logic             gpr_drive;

  // ---- the gate and its switches S1, S2, S3 ----
  assign gate_x = mi.s1 ? ra : '0;
  assign gate_y = mi.s2 ? rb : '0;

  logic_gate_unit #(.GATE(GATE), .WIDTH(WIDTH)) u_gate (
    .x(gate_x), .y(gate_y), .z(gate_z)
  );

  // ---- R1..R4 with the A1/A2 generator ----
  gp_regfile #(.WIDTH(WIDTH)) u_gpr (
    .clk     (clk),
    .rst_n   (rst_n),
    .a       (mi.a),
    .rw      (mi.rw),
    .bus_in  (bus),
    .rd_data (gpr_rd),
    .rd_drive(gpr_drive),
    .regs    (gpr)
  );

  // ---- the data line: the one source whose switch reads ----
  always_comb begin
    bus = '0;
    if (mi.s12 == SW_READ) bus |= ra;
    if (mi.s13 == SW_READ) bus |= rb;
    if (mi.s14 == SW_READ) bus |= rz;
    if (gpr_drive)         bus |= gpr_rd;
  end

  // ---- RA, RB, RZ ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0;
      rb <= '0;
      rz <= '0;
    end else begin
      if (ld) begin
        ra <= ld_a;
        rb <= ld_b;
      end else begin
        if (mi.s12 == SW_WRITE) ra <= bus;
        if (mi.s13 == SW_WRITE) rb <= bus;
      end
      if (mi.s3)                   rz <= gate_z;
      else if (mi.s14 == SW_WRITE) rz <= bus;
    end
  end

  // ---- rules of a well-formed micro-instruction ----
  logic [2:0] n_src;
  always_comb
    n_src = 3'(mi.s12 == SW_READ) + 3'(mi.s13 == SW_READ)
          + 3'(mi.s14 == SW_READ) + 3'(gpr_drive);

  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) n_src <= 3'd1)
    else $error("two registers drive the data line at once");
  a_no_code_11: assert property (@(posedge clk) disable iff (!rst_n)
      mi.s12 != SW_BAD && mi.s13 != SW_BAD && mi.s14 != SW_BAD && mi.rw != SW_BAD)
    else $error("switch code 11 is not defined");
  a_gate_inputs: assert property (@(posedge clk) disable iff (!rst_n) mi.s3 |-> (mi.s1 && mi.s2))
    else $error("gate step without both gate inputs connected");
  a_rz_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
      !(mi.s3 && mi.s14 == SW_WRITE))
    else $error("RZ written from the gate and the data line at once");

endmodule
