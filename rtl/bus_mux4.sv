// bus_mux4: 4-to-1 bus multiplexer.
//
// WIDTH one-bit 4-to-1 multiplexers sharing a 2-bit select {SELECT1,SELECT0}:
// 00 -> a, 01 -> b, 10 -> c, 11 -> d. In the i281 two of these form the read
// ports of the register file (select C4C5 for port 0, C6C7 for port 1) with
// registers A, B, C, D on inputs a..d. Purely combinational. The select-to-
// input mapping is this design's reading of the drawings, which label the
// inputs A..D but print no select codes.
module bus_mux4 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] q
);

  always_comb begin
    unique case (sel)
      2'b00: q = a;
      2'b01: q = b;
      2'b10: q = c;
      default: q = d;
    endcase
  end

endmodule
