// tb_microcode_rom: checks every micro-program in the control store by running it.
//
// For each opcode the testbench reads the program length and then the
// micro-instructions one by one, and executes them on its own model of the
// processor registers (switch code 01 = drive the data line, 10 = load from
// it, S1 S2 S3 = NAND step).  With eight-bit random operands it checks that
// RZ ends as NOT, AND, OR, NOR or XOR of the operands, that the lengths are
// 2, 3, 9, 11, 11 and 12 and that the programs use 0, 0, 2, 2, 3 and 4 of
// the registers R1..R4.  Every word must be well formed (at most one data-line
// source, no code 11), the words past the end must be all-off and an unused
// opcode must have length 0.
module tb_microcode_rom;
  import sgp_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  opcode_t op;
  logic [STEP_BITS-1:0] step, len;
  micro_instr_t mi;

  microcode_rom dut (.*);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_len [6] = '{2, 3, 9, 11, 11, 12};
    int exp_regs [6] = '{0, 0, 2, 2, 3, 4};
    logic [W-1:0] a, b, ra, rb, rz, bus, expz;
    logic [W-1:0] r [4];
    logic [3:0] used;
    int nsrc;
    for (int o = 0; o < 6; o++) begin
      op = opcode_t'(o);
      step = 0;
      #1;
      check(int'(len), exp_len[o], $sformatf("length of op %0d", o));
      for (int t = 0; t < 30; t++) begin
        a = W'($urandom); b = W'($urandom);
        ra = a; rb = b; rz = W'($urandom);
        for (int i = 0; i < 4; i++) r[i] = W'($urandom);
        used = '0;
        for (int s = 0; s < int'(len); s++) begin
          logic [W-1:0] n_ra, n_rb, n_rz;
          step = STEP_BITS'(s);
          #1;
          nsrc = int'(mi.s12 == SW_READ) + int'(mi.s13 == SW_READ)
               + int'(mi.s14 == SW_READ) + int'(mi.rw == SW_READ);
          if (t == 0) begin
            check(int'(nsrc <= 1), 1, "one data-line source");
            check(int'(mi.s12 != SW_BAD && mi.s13 != SW_BAD && mi.s14 != SW_BAD && mi.rw != SW_BAD),
                  1, "no code 11");
          end
          bus = '0;
          if (mi.s12 == SW_READ) bus = ra;
          if (mi.s13 == SW_READ) bus = rb;
          if (mi.s14 == SW_READ) bus = rz;
          if (mi.rw  == SW_READ) bus = r[mi.a];
          n_ra = ra; n_rb = rb; n_rz = rz;
          if (mi.s12 == SW_WRITE) n_ra = bus;
          if (mi.s13 == SW_WRITE) n_rb = bus;
          if (mi.s14 == SW_WRITE) n_rz = bus;
          if (mi.s1 && mi.s2 && mi.s3) n_rz = ~(ra & rb);
          if (mi.rw != SW_OFF) used[mi.a] = 1'b1;
          if (mi.rw == SW_WRITE) r[mi.a] = bus;
          ra = n_ra; rb = n_rb; rz = n_rz;
        end
        case (opcode_t'(o))
          OP_NOT:  expz = ~a;
          OP_AND:  expz = a & b;
          OP_OR:   expz = a | b;
          OP_NOR:  expz = ~(a | b);
          default: expz = a ^ b;
        endcase
        check(int'(rz), int'(expz), $sformatf("result of op %0d", o));
        if (t == 0) check($countones(used), exp_regs[o], $sformatf("registers used by op %0d", o));
      end
      step = len;
      #1;
      check(int'(mi), int'(MI_NOP), "word past the end");
    end
    for (int o = 6; o < 8; o++) begin
      op = opcode_t'(o);
      step = 0;
      #1;
      check(int'(len), 0, "unused opcode length");
      check(int'(mi), int'(MI_NOP), "unused opcode word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
