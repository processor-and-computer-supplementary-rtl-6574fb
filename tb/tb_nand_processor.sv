// tb_nand_processor: runs every instruction of the NAND processor end to end.
//
// Two processors are tested: the one-bit default, with all four operand
// pairs, and an eight-bit one with random operands.  For each instruction the
// testbench loads RA and RB, pulses start and counts the cycles until done;
// it checks RZ against NOT, AND, OR, NOR or XOR computed directly, the cycle
// count against 2, 3, 9, 11, 11 and 12, and the scratch registers left
// behind by OR/NOR (R1 = B, R2 = NAND(A, A)) and by the two XOR algorithms
// (Algorithm II: R1 = B, R2 = NAND(A,B), R3 = NAND(A, NAND(A,B));
// Algorithm I additionally R1 = A, R2 = B, R4 = NAND(A, NAND(A,B))).
module tb_nand_processor;
  import sgp_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;

  // one-bit processor
  logic ld1, start1, busy1, done1;
  logic a1, b1, ra1, rb1, rz1, bus1;
  logic [3:0][0:0] gpr1;
  micro_instr_t mi1;
  opcode_t op1;

  // eight-bit processor
  logic ld8, start8, busy8, done8;
  logic [W-1:0] a8, b8, ra8, rb8, rz8, bus8;
  logic [3:0][W-1:0] gpr8;
  micro_instr_t mi8;
  opcode_t op8;

  nand_processor u_p1 (
    .clk, .rst_n, .ld(ld1), .ld_a(a1), .ld_b(b1), .start(start1), .op(op1),
    .busy(busy1), .done(done1), .mi(mi1), .ra(ra1), .rb(rb1), .rz(rz1), .gpr(gpr1), .bus(bus1)
  );

  nand_processor #(.WIDTH(W)) u_p8 (
    .clk, .rst_n, .ld(ld8), .ld_a(a8), .ld_b(b8), .start(start8), .op(op8),
    .busy(busy8), .done(done8), .mi(mi8), .ra(ra8), .rb(rb8), .rz(rz8), .gpr(gpr8), .bus(bus8)
  );

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic int exp_cycles(opcode_t o);
    case (o)
      OP_NOT: return 2;
      OP_AND: return 3;
      OP_OR:  return 9;
      OP_NOR: return 11;
      OP_XOR: return 11;
      default: return 12;
    endcase
  endfunction

  function automatic logic [W-1:0] expect_rz(opcode_t o, logic [W-1:0] a, logic [W-1:0] b);
    case (o)
      OP_NOT: return ~a;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_NOR: return ~(a | b);
      default: return a ^ b;
    endcase
  endfunction

  function automatic logic [W-1:0] nd(logic [W-1:0] x, logic [W-1:0] y);
    return ~(x & y);
  endfunction

  // Check the scratch registers the programs leave behind.
  task automatic check_scratch(opcode_t o, logic [W-1:0] a, logic [W-1:0] b,
                               logic [3:0][W-1:0] g, logic [W-1:0] mask);
    case (o)
      OP_OR, OP_NOR: begin
        check(g[0] & mask, b & mask, "R1 = B");
        check(g[1] & mask, nd(a, a) & mask, "R2 = NAND(A,A)");
      end
      OP_XOR: begin
        check(g[0] & mask, b & mask, "R1 = B");
        check(g[1] & mask, nd(a, b) & mask, "R2 = A.B");
        check(g[2] & mask, nd(a, nd(a, b)) & mask, "R3 = A.(A.B)");
      end
      OP_XOR_ALG1: begin
        check(g[0] & mask, a & mask, "R1 = A");
        check(g[1] & mask, b & mask, "R2 = B");
        check(g[2] & mask, nd(a, b) & mask, "R3 = A.B");
        check(g[3] & mask, nd(a, nd(a, b)) & mask, "R4 = A.(A.B)");
      end
      default: ;
    endcase
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [3:0][W-1:0] g1;
    ld1 = 0; start1 = 0; op1 = OP_NOT; a1 = 0; b1 = 0;
    ld8 = 0; start8 = 0; op8 = OP_NOT; a8 = 0; b8 = 0;
    #12 rst_n = 1;
    // one-bit processor, exhaustive
    for (int o = 0; o < 6; o++) begin
      for (int v = 0; v < 4; v++) begin
        @(negedge clk);
        {a1, b1} = 2'(v); ld1 = 1;
        @(negedge clk);
        ld1 = 0; op1 = opcode_t'(o); start1 = 1;
        @(negedge clk);
        start1 = 0; cyc = 0;  // edges counted from the start edge
        while (!done1 && cyc < 40) begin @(negedge clk); cyc++; end
        check(W'(cyc), W'(exp_cycles(op1)), $sformatf("1-bit cycles of op %0d", o));
        check(W'(rz1), W'(expect_rz(op1, W'(a1), W'(b1)) & 8'h01), $sformatf("1-bit op %0d a=%0b b=%0b", o, a1, b1));
        for (int i = 0; i < 4; i++) g1[i] = W'(gpr1[i]);
        check_scratch(op1, W'(a1), W'(b1), g1, 8'h01);
      end
    end
    // eight-bit processor, random; load in the same cycle as start
    for (int n = 0; n < 120; n++) begin
      @(negedge clk);
      a8 = W'($urandom); b8 = W'($urandom);
      op8 = opcode_t'($urandom % 6);
      ld8 = 1; start8 = 1;
      @(negedge clk);
      ld8 = 0; start8 = 0; cyc = 0;
      // a load while busy must be ignored
      ld8 = 1; a8 = ~a8; b8 = ~b8;
      @(negedge clk);
      ld8 = 0; a8 = ~a8; b8 = ~b8; cyc++;
      while (!done8 && cyc < 40) begin @(negedge clk); cyc++; end
      check(W'(cyc), W'(exp_cycles(op8)), "8-bit cycles");
      check(rz8, expect_rz(op8, a8, b8), $sformatf("8-bit op %0d", op8));
      check_scratch(op8, a8, b8, gpr8, 8'hff);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
