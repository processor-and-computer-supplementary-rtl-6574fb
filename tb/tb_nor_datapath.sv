// tb_nor_datapath: random micro-instructions on the NOR-gate datapath.
//
// Each cycle the testbench builds a well-formed micro-instruction: a gate step
// (S1 = S2 = S3 = 1), a transfer with one source on the data line and a random
// set of destinations among the other registers, or an all-off word; now and
// then it also loads RA and RB from outside.  A reference model of the seven
// registers, written from the meaning of the switch codes, predicts the data
// line before the edge and every register after it.  It ends with the three
// steps "gate; RA = RZ, RB = RZ; gate", which with a NOR gate
// give OR RA RB.
module tb_nor_datapath;
  import sgp_pkg::*;

  localparam int    W = 8;
  localparam gate_t G = GATE_NOR;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  micro_instr_t mi;
  logic ld;
  logic [W-1:0] ld_a, ld_b, ra, rb, rz, bus;
  logic [3:0][W-1:0] gpr;

  single_gate_datapath #(.GATE(G), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] m_ra, m_rb, m_rz, m_bus;
  logic [W-1:0] m_r [4];

  function automatic logic [W-1:0] gate_fn(logic [W-1:0] x, logic [W-1:0] y);
    return (G == GATE_NAND) ? ~(x & y) : ~(x | y);
  endfunction

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Apply one micro-instruction for one cycle and check the result.
  task automatic step(input micro_instr_t w, input logic l, input logic [W-1:0] la, input logic [W-1:0] lb);
    logic [W-1:0] n_ra, n_rb, n_rz;
    @(negedge clk);
    mi = w; ld = l; ld_a = la; ld_b = lb;
    m_bus = '0;
    if (w.s12 == SW_READ) m_bus = m_ra;
    if (w.s13 == SW_READ) m_bus = m_rb;
    if (w.s14 == SW_READ) m_bus = m_rz;
    if (w.rw  == SW_READ) m_bus = m_r[w.a];
    #1;
    check(bus, m_bus, "data line");
    n_ra = m_ra; n_rb = m_rb; n_rz = m_rz;
    if (w.s12 == SW_WRITE) n_ra = m_bus;
    if (w.s13 == SW_WRITE) n_rb = m_bus;
    if (w.s14 == SW_WRITE) n_rz = m_bus;
    if (w.s3) n_rz = gate_fn(m_ra, m_rb);
    if (w.rw == SW_WRITE) m_r[w.a] = m_bus;
    if (l) begin n_ra = la; n_rb = lb; end
    m_ra = n_ra; m_rb = n_rb; m_rz = n_rz;
    @(posedge clk);
    #1;
    check(ra, m_ra, "RA");
    check(rb, m_rb, "RB");
    check(rz, m_rz, "RZ");
    for (int i = 0; i < 4; i++) check(gpr[i], m_r[i], $sformatf("R%0d", i + 1));
  endtask

  function automatic micro_instr_t random_mi();
    micro_instr_t w = MI_NOP;
    int kind = $urandom % 10;
    int src;
    if (kind < 3) begin
      w.s1 = 1; w.s2 = 1; w.s3 = 1;
    end else if (kind < 9) begin
      src = $urandom % 4;  // 0 RA, 1 RB, 2 RZ, 3 R1..R4
      w.a = 2'($urandom);
      w.s12 = (src == 0) ? SW_READ : (($urandom % 2) ? SW_WRITE : SW_OFF);
      w.s13 = (src == 1) ? SW_READ : (($urandom % 2) ? SW_WRITE : SW_OFF);
      w.s14 = (src == 2) ? SW_READ : (($urandom % 2) ? SW_WRITE : SW_OFF);
      w.rw  = (src == 3) ? SW_READ : (($urandom % 2) ? SW_WRITE : SW_OFF);
    end
    return w;
  endfunction

  function automatic micro_instr_t xfer(sw_t s12, sw_t s13, sw_t s14);
    micro_instr_t w = MI_NOP;
    w.s12 = s12; w.s13 = s13; w.s14 = s14;
    return w;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    micro_instr_t g;
    logic [W-1:0] a, b;
    mi = MI_NOP; ld = 0; ld_a = 0; ld_b = 0;
    m_ra = 0; m_rb = 0; m_rz = 0;
    for (int i = 0; i < 4; i++) m_r[i] = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 3000; n++)
      step(random_mi(), ($urandom % 10) == 0, W'($urandom), W'($urandom));
    // AND RA RB by hand: gate; RA = RZ, RB = RZ; gate
    g = MI_NOP; g.s1 = 1; g.s2 = 1; g.s3 = 1;
    for (int n = 0; n < 20; n++) begin
      a = W'($urandom); b = W'($urandom);
      step(MI_NOP, 1'b1, a, b);
      step(g, 1'b0, '0, '0);
      step(xfer(SW_WRITE, SW_WRITE, SW_READ), 1'b0, '0, '0);
      step(g, 1'b0, '0, '0);
      check(rz, (G == GATE_NAND) ? (a & b) : (a | b), "AND/OR by hand");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
