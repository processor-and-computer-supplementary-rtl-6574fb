// tb_gp_regfile: checks R1..R4, the A1/A2 selection and the R/W switch.
//
// Random register numbers, R/W codes (00, 01, 10) and data-line values are
// applied for many cycles.  A reference array in the testbench follows the
// writes; before each edge the read drive and read value are compared with
// it, and after each edge all four registers are.
module tb_gp_regfile;
  import sgp_pkg::*;

  localparam int W = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [1:0] a;
  sw_t rw;
  logic [W-1:0] bus_in, rd_data;
  logic rd_drive;
  logic [3:0][W-1:0] regs;
  logic [W-1:0] model [4];

  gp_regfile #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    a = 0; rw = SW_OFF; bus_in = 0;
    for (int i = 0; i < 4; i++) model[i] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      a      = 2'($urandom);
      bus_in = W'($urandom);
      case ($urandom % 3)
        0: rw = SW_OFF;
        1: rw = SW_READ;
        default: rw = SW_WRITE;
      endcase
      #1;
      check(W'(rd_drive), W'(rw == SW_READ), "rd_drive");
      if (rw == SW_READ) check(rd_data, model[a], $sformatf("read R%0d", a + 1));
      @(posedge clk);
      if (rw == SW_WRITE) model[a] = bus_in;
      #1;
      for (int i = 0; i < 4; i++) check(regs[i], model[i], $sformatf("R%0d", i + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
