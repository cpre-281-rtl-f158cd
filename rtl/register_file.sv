// register_file: the i281's four general-purpose registers A, B, C, D.
//
// Four 8-bit parallel-access registers. Two read ports, each a 4-to-1 bus
// multiplexer over A..D: port 0 selected by C4C5, port 1 by C6C7. One write
// port: a 2-to-4 decoder on C8C9, gated by C10, raises the write enable of
// one register, which loads wdata on the next rising clock edge. Reads are
// combinational (a register written this cycle shows its new value next
// cycle). All registers clear on reset. The read multiplexers and registers
// follow the published drawings; the write decoder is this design's simplest
// circuit for the write-select lines.
module register_file
  import i281_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [1:0]       p0_sel,
  input  logic [1:0]       p1_sel,
  input  logic [1:0]       wr_sel,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] p0,
  output logic [WIDTH-1:0] p1,
  output logic [3:0][WIDTH-1:0] regs
);

  logic [3:0] reg_we;

  always_comb begin
    for (int r = 0; r < 4; r++) reg_we[r] = we && (wr_sel == 2'(r));
  end

  for (genvar r = 0; r < 4; r++) begin : g_reg
    par_reg #(.WIDTH(WIDTH)) u_reg (
      .clk(clk), .rst(rst), .we(reg_we[r]), .d(wdata), .q(regs[r])
    );
  end

  bus_mux4 #(.WIDTH(WIDTH)) u_port0 (
    .a(regs[REG_A]), .b(regs[REG_B]), .c(regs[REG_C]), .d(regs[REG_D]),
    .sel(p0_sel), .q(p0)
  );

  bus_mux4 #(.WIDTH(WIDTH)) u_port1 (
    .a(regs[REG_A]), .b(regs[REG_B]), .c(regs[REG_C]), .d(regs[REG_D]),
    .sel(p1_sel), .q(p1)
  );

endmodule
