// tb_micro_sequencer: checks the step sequence and the cycle count of the sequencer.
//
// The control store is replaced by a table of program lengths kept in the
// testbench (0 to 12 for the eight opcodes, not the real ones, so that every
// length is tried).  For each start the testbench checks that step runs
// 0..N-1 on consecutive cycles with busy high, that done pulses for exactly
// one cycle N cycles after the start edge, that the latched opcode is held,
// and that a start pulse while busy is ignored.
module tb_micro_sequencer;
  import sgp_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start;
  opcode_t op, cur_op;
  logic [STEP_BITS-1:0] len, step;
  logic busy, done;

  int lens [8] = '{3, 0, 12, 1, 7, 11, 2, 9};

  assign len = STEP_BITS'(lens[cur_op]);

  micro_sequencer dut (.*);

  always #5 clk = ~clk;

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
    int n, cyc;
    start = 0; op = OP_NOT;
    #12 rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int o = 0; o < 8; o++) begin
        n = lens[o];
        @(negedge clk);
        check(int'(busy), 0, "idle before start");
        start = 1; op = opcode_t'(o);
        @(negedge clk);
        start = 0;
        op = opcode_t'((o + 3) % 8);   // must not disturb the running program
        cyc = 1;
        for (int s = 0; s < n; s++) begin
          check(int'(busy), 1, "busy");
          check(int'(step), s, "step");
          check(int'(cur_op), o, "latched opcode");
          check(int'(done), 0, "no early done");
          if (s == 1) start = 1;       // a start while busy is ignored
          @(negedge clk);
          start = 0;
          cyc++;
        end
        check(int'(done), 1, "done after the last step");
        check(int'(busy), 0, "idle after the last step");
        check(cyc - 1, n, "cycles from start to done");
        @(negedge clk);
        check(int'(done), 0, "done lasts one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
