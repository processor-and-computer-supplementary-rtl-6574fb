// gp_regfile: the general registers R1..R4 and their switches to the data line.
//
// The two control signals A1, A2 pick one of the four registers (00 = R1,
// 01 = R2, 10 = R3, 11 = R4) and the two-bit R/W field sets the selected
// register's two-way switch: 01 puts its contents on the data line, 10 loads
// it from the data line at the next clock edge, 00 leaves all four registers
// disconnected.  Only one register is ever connected at a time.
//
// Interface: a = {A1, A2}, rw, bus_in (the data line value to be written),
// rd_data / rd_drive (value and enable of this block's drive onto the data
// line), regs (all four registers, for observation).
// Timing: the read path is combinational; a write takes effect at the rising
// clock edge.  rst_n is an asynchronous, active-low reset clearing all four
// registers to zero (the reset value is this design's choice).
module gp_regfile
  import sgp_pkg::*;
#(
  parameter int WIDTH = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           a,
  input  sw_t                  rw,
  input  logic [WIDTH-1:0]     bus_in,
  output logic [WIDTH-1:0]     rd_data,
  output logic                 rd_drive,
  output logic [3:0][WIDTH-1:0] regs
);

  logic [3:0][WIDTH-1:0] r;
  logic [3:0]            sel;   // one-hot output of the A1/A2 generator

  always_comb begin
    sel = 4'b0000;
    sel[a] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (rw == SW_WRITE) begin
      for (int i = 0; i < 4; i++)
        if (sel[i]) r[i] <= bus_in;
    end
  end

  assign rd_drive = (rw == SW_READ);
  assign rd_data  = rd_drive ? r[a] : '0;
  assign regs     = r;

endmodule
