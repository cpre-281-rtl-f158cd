// program_counter: the i281's 6-bit program counter and next-PC logic.
//
// An incrementer forms PC+1 and an adder forms PC+1+offset, where offset is
// the instruction's I5..I0 read as a two's-complement number (-32..+31).
// The 6-bit 2-to-1 PC mux, selected by PROGRAM_COUNTER_MUX (C2, branch),
// picks PC+1 (0) or the branch target (1); the PC register loads it on the
// rising clock edge when PROGRAM_COUNTER_WRITE_EN (C3, we) is 1. Reset sets
// the PC to 0, the first BIOS word. Addresses wrap modulo 64. The 6-bit mux
// and the two control lines follow the published datapath; the adders and
// the offset field are this design's reading of it.
module program_counter
  import i281_pkg::*;
#(
  parameter int unsigned PC_WIDTH = 6
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                we,
  input  logic                branch,
  input  logic [PC_WIDTH-1:0] offset,
  output logic [PC_WIDTH-1:0] pc
);

  logic [PC_WIDTH-1:0] pc_plus1, target, next_pc;

  assign pc_plus1 = pc + PC_WIDTH'(1);
  assign target   = pc_plus1 + offset;

  bus_mux2 #(.WIDTH(PC_WIDTH)) u_pc_mux (.u(pc_plus1), .v(target), .sel(branch), .z(next_pc));

  par_reg #(.WIDTH(PC_WIDTH)) u_pc (.clk(clk), .rst(rst), .we(we), .d(next_pc), .q(pc));

endmodule
