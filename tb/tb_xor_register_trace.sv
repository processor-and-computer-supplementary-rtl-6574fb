// tb_xor_register_trace: follows both XOR algorithms register by register.
//
// An eight-bit NAND processor runs XOR by algorithm I (12 steps) and by
// algorithm II (11 steps) on random operands.  After every clock the
// testbench compares RA, RB, RZ and R1..R4 with the register contents each
// algorithm is meant to have after that step, written below step by step in
// terms of A, B and NAND (n).  Registers whose contents are still undefined
// at a step (not yet written by the program) are not compared.
module tb_xor_register_trace;
  import sgp_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic ld, start, busy, done;
  logic [W-1:0] lda, ldb, ra, rb, rz, bus;
  logic [3:0][W-1:0] gpr;
  micro_instr_t mi;
  opcode_t op;

  nand_processor #(.WIDTH(W)) dut (
    .clk, .rst_n, .ld, .ld_a(lda), .ld_b(ldb), .start, .op,
    .busy, .done, .mi, .ra, .rb, .rz, .gpr, .bus
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] n(logic [W-1:0] x, logic [W-1:0] y);
    return ~(x & y);
  endfunction

  // expected state: index 0 RA, 1 RB, 2 RZ, 3..6 R1..R4
  logic [W-1:0] e [7];
  logic         v [7];

  task automatic set(int i, logic [W-1:0] val);
    e[i] = val; v[i] = 1'b1;
  endtask

  task automatic compare(string tag);
    logic [W-1:0] got [7];
    got[0] = ra; got[1] = rb; got[2] = rz;
    for (int i = 0; i < 4; i++) got[3 + i] = gpr[i];
    for (int i = 0; i < 7; i++) if (v[i]) begin
      checks++;
      if (got[i] !== e[i]) begin
        failures++;
        $display("FAIL %s register %0d: got %h expected %h", tag, i, got[i], e[i]);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, ab;
    int steps;
    ld = 0; start = 0; op = OP_XOR; lda = 0; ldb = 0;
    #12 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      a = W'($urandom); b = W'($urandom); ab = n(a, b);
      op = (t % 2 == 1) ? OP_XOR : OP_XOR_ALG1;
      steps = (op == OP_XOR) ? 11 : 12;
      for (int i = 0; i < 7; i++) v[i] = 1'b0;
      set(0, a); set(1, b);
      @(negedge clk);
      ld = 1; lda = a; ldb = b; start = 1;
      @(negedge clk);
      ld = 0; start = 0;
      compare("step 0");
      for (int s = 1; s <= steps; s++) begin
        @(negedge clk);
        if (op == OP_XOR_ALG1) begin
          case (s)
            1:  set(3, a);              // R1 = RA
            2:  set(4, b);              // R2 = RB
            3:  set(2, ab);             // RZ = A.B
            4:  set(1, ab);             // RB = RZ
            5:  set(5, ab);             // R3 = RZ
            6:  set(2, n(a, ab));       // RZ = A.(A.B)
            7:  set(6, n(a, ab));       // R4 = RZ
            8:  set(0, b);              // RA = R2
            9:  set(2, n(b, ab));       // RZ = B.(A.B)
            10: set(0, n(a, ab));       // RA = R4
            11: set(1, n(b, ab));       // RB = RZ
            default: set(2, a ^ b);     // RZ = A ^ B
          endcase
        end else begin
          case (s)
            1:  set(3, b);                      // R1 = RB
            2:  set(2, ab);                     // RZ = A.B
            3:  begin set(4, ab); set(1, ab); end // R2 = RZ, RB = RZ
            4:  set(2, n(a, ab));               // RZ = A.(A.B)
            5:  set(5, n(a, ab));               // R3 = RZ
            6:  set(0, ab);                     // RA = R2
            7:  set(1, b);                      // RB = R1
            8:  set(2, n(ab, b));               // RZ = (A.B).B
            9:  set(0, n(a, ab));               // RA = R3
            10: set(1, n(ab, b));               // RB = RZ
            default: set(2, a ^ b);             // RZ = A ^ B
          endcase
        end
        compare($sformatf("op %0d step %0d", op, s));
        checks++;
        if (done !== (s == steps)) begin
          failures++;
          $display("FAIL done at step %0d of %0d", s, steps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
