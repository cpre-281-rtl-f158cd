// data_memory: the i281's 16 x 8 read/write data memory.
//
// Built as a register file of DEPTH 8-bit parallel-access registers with one
// read port and one write port that share the address addr (the output of
// the ALU result mux). Reading is combinational (a DEPTH-to-1 bus mux);
// writing loads wdata into cell addr on the rising clock edge when we (C17)
// is 1. Reset reloads every cell from INIT, which holds the program's initial
// data; the default is the example data (mem[0] = 5). All cells are also
// brought out on mem: cells 0..7 feed the memory-mapped 7-segment displays.
// Sizes and the one-read/one-write register-file organisation follow the
// published description; reset-to-INIT is this design's choice.
module data_memory
  import i281_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8,
  parameter logic [DEPTH-1:0][WIDTH-1:0] INIT = DEFAULT_DMEM
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [$clog2(DEPTH)-1:0]      addr,
  input  logic                          we,
  input  logic [WIDTH-1:0]              wdata,
  output logic [WIDTH-1:0]              rdata,
  output logic [DEPTH-1:0][WIDTH-1:0]   mem
);

  for (genvar i = 0; i < DEPTH; i++) begin : g_cell
    par_reg #(.WIDTH(WIDTH), .RESET_VALUE(INIT[i])) u_cell (
      .clk(clk), .rst(rst),
      .we(we && (addr == ($clog2(DEPTH))'(i))),
      .d(wdata), .q(mem[i])
    );
  end

  assign rdata = mem[addr];

endmodule
