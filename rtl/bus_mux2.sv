// bus_mux2: 2-to-1 bus multiplexer.
//
// A row of WIDTH one-bit 2-to-1 multiplexers that share one select line:
// z = u when sel is 0, z = v when sel is 1. The i281 uses five of these:
// four with 8-bit lines (ALU source C11, ALU result C15, data memory input
// C16, register write-back C18) and one with 6-bit lines (program counter
// C2). Purely combinational. Structure and port names (U, V, Z) follow the
// published bus-multiplexer drawings.
module bus_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] u,
  input  logic [WIDTH-1:0] v,
  input  logic             sel,
  output logic [WIDTH-1:0] z
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      z[i] = sel ? v[i] : u[i];
    end
  end

endmodule
