// tb_single_gate_computer: end-to-end test of the whole design at its default size.
//
// The NAND processor runs every instruction on every one-bit operand pair.
// The NOR processor is driven, cycle by cycle, with the very micro-instruction
// the NAND processor is executing, and is loaded with the same operands.  By
// De Morgan duality a NAND micro-program run on a NOR gate computes the dual
// function: NOT stays NOT, AND becomes OR, OR becomes AND, NOR becomes NAND
// and XOR becomes XNOR; the testbench checks both results, the cycle counts
// (2, 3, 9, 11, 11, 12) and that start and load pulses given while an
// instruction runs are ignored.  It counts how often each mechanism occurred
// (every instruction, gate steps, transfers to several registers at once,
// reads and writes of each of R1..R4, ignored start and ignored load) and
// counts a failure for any that never did.
module tb_single_gate_computer;
  import sgp_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic nand_ld, nand_start, nand_busy, nand_done;
  logic nand_ld_a, nand_ld_b, nand_ra, nand_rb, nand_rz, nand_bus;
  logic [3:0][0:0] nand_gpr;
  opcode_t nand_op;
  micro_instr_t nand_mi, nor_mi;
  logic nor_ld, nor_ld_a, nor_ld_b, nor_ra, nor_rb, nor_rz, nor_bus;
  logic [3:0][0:0] nor_gpr;

  single_gate_computer dut (.*);

  always #5 clk = ~clk;

  // the NOR processor follows the NAND processor's micro-instructions
  assign nor_mi   = nand_mi;
  assign nor_ld   = nand_ld && !nand_busy;
  assign nor_ld_a = nand_ld_a;
  assign nor_ld_b = nand_ld_b;

  // mechanism counters
  int n_op [6];
  int n_gate, n_multi_dest, n_ign_start, n_ign_load, n_nor_gate;
  int n_gpr_wr [4];
  int n_gpr_rd [4];

  always @(posedge clk) if (rst_n) begin
    if (nand_mi.s3) n_gate++;
    if (nor_mi.s3)  n_nor_gate++;
    if (int'(nand_mi.s12 == SW_WRITE) + int'(nand_mi.s13 == SW_WRITE)
        + int'(nand_mi.s14 == SW_WRITE) + int'(nand_mi.rw == SW_WRITE) > 1) n_multi_dest++;
    if (nand_mi.rw == SW_WRITE) n_gpr_wr[nand_mi.a]++;
    if (nand_mi.rw == SW_READ)  n_gpr_rd[nand_mi.a]++;
    if (nand_busy && nand_start) n_ign_start++;
    if (nand_busy && nand_ld)    n_ign_load++;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, exp_cyc;
    logic a, b, ez, ed;
    nand_ld = 0; nand_start = 0; nand_op = OP_NOT; nand_ld_a = 0; nand_ld_b = 0;
    #12 rst_n = 1;
    for (int rep = 0; rep < 2; rep++)
    for (int o = 0; o < 6; o++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        @(negedge clk);
        nand_ld = 1; nand_ld_a = a; nand_ld_b = b;
        @(negedge clk);
        nand_ld = 0; nand_op = opcode_t'(o); nand_start = 1;
        @(negedge clk);
        nand_start = 0; cyc = 0;
        while (!nand_done && cyc < 40) begin
          @(negedge clk);
          cyc++;
          // on the second pass, poke start and a load mid-instruction
          nand_start = (rep == 1 && cyc == 1);
          nand_ld    = (rep == 1 && cyc == 1);
          nand_ld_a  = (rep == 1 && cyc == 1) ? ~a : a;
          nand_ld_b  = (rep == 1 && cyc == 1) ? ~b : b;
        end
        nand_start = 0; nand_ld = 0;
        n_op[o]++;
        case (opcode_t'(o))
          OP_NOT: begin exp_cyc = 2;  ez = ~a;       ed = ~a;       end
          OP_AND: begin exp_cyc = 3;  ez = a & b;    ed = a | b;    end
          OP_OR:  begin exp_cyc = 9;  ez = a | b;    ed = a & b;    end
          OP_NOR: begin exp_cyc = 11; ez = ~(a | b); ed = ~(a & b); end
          OP_XOR: begin exp_cyc = 11; ez = a ^ b;    ed = ~(a ^ b); end
          default: begin exp_cyc = 12; ez = a ^ b;   ed = ~(a ^ b); end
        endcase
        check(cyc, exp_cyc, $sformatf("cycles of op %0d", o));
        check(int'(nand_rz), int'(ez), $sformatf("NAND processor op %0d a=%0b b=%0b", o, a, b));
        check(int'(nor_rz), int'(ed), $sformatf("NOR processor dual of op %0d a=%0b b=%0b", o, a, b));
        @(negedge clk);
        check(int'(nand_busy), 0, "idle after done (ignored start did not restart)");
      end
    end
    // every mechanism must have happened
    for (int o = 0; o < 6; o++) check(int'(n_op[o] > 0), 1, $sformatf("instruction %0d executed", o));
    for (int i = 0; i < 4; i++) begin
      check(int'(n_gpr_wr[i] > 0), 1, $sformatf("R%0d written", i + 1));
      check(int'(n_gpr_rd[i] > 0), 1, $sformatf("R%0d read", i + 1));
    end
    check(int'(n_gate > 0), 1, "NAND gate steps");
    check(int'(n_nor_gate > 0), 1, "NOR gate steps");
    check(int'(n_multi_dest > 0), 1, "transfers to two registers at once");
    check(int'(n_ign_start > 0), 1, "start ignored while busy");
    check(int'(n_ign_load > 0), 1, "load ignored while busy");
    $display("mechanisms: ops %0d %0d %0d %0d %0d %0d, gate %0d, nor gate %0d, multi-dest %0d, ignored start %0d, ignored load %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_gate, n_nor_gate, n_multi_dest,
             n_ign_start, n_ign_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
