// tb_logic_gate_unit: checks the single gate against the NAND and NOR truth tables.
//
// A one-bit NAND gate and a one-bit NOR gate are driven with all four input
// pairs and compared with the truth tables written out below; eight-bit
// instances of both are then driven with random words and every bit is
// compared with the same tables.
module tb_logic_gate_unit;
  import sgp_pkg::*;

  int checks = 0, failures = 0;

  // truth tables, indexed by {x, y}
  localparam logic [3:0] NAND_TT = 4'b0111;  // 11 -> 0, else 1
  localparam logic [3:0] NOR_TT  = 4'b0001;  // 00 -> 1, else 0

  logic       x1, y1, zn1, zo1;
  logic [7:0] x8, y8, zn8, zo8;

  logic_gate_unit #(.GATE(GATE_NAND), .WIDTH(1)) u_nand1 (.x(x1), .y(y1), .z(zn1));
  logic_gate_unit #(.GATE(GATE_NOR),  .WIDTH(1)) u_nor1  (.x(x1), .y(y1), .z(zo1));
  logic_gate_unit #(.GATE(GATE_NAND), .WIDTH(8)) u_nand8 (.x(x8), .y(y8), .z(zn8));
  logic_gate_unit #(.GATE(GATE_NOR),  .WIDTH(8)) u_nor8  (.x(x8), .y(y8), .z(zo8));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
    for (int i = 0; i < 4; i++) begin
      {x1, y1} = 2'(i);
      #1;
      check(zn1, NAND_TT[i], $sformatf("NAND %0b%0b", x1, y1));
      check(zo1, NOR_TT[i],  $sformatf("NOR %0b%0b", x1, y1));
    end
    for (int n = 0; n < 200; n++) begin
      x8 = 8'($urandom);
      y8 = 8'($urandom);
      #1;
      for (int b = 0; b < 8; b++) begin
        check(zn8[b], NAND_TT[{x8[b], y8[b]}], "NAND8");
        check(zo8[b], NOR_TT[{x8[b], y8[b]}],  "NOR8");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
