// flags_register: holds the zero, negative and overflow flags.
//
// A 3-bit parallel-access register (same hold/load circuit as the 8-bit
// registers) that loads the ALU's ZF, NF and OF on the rising clock edge when
// FLAGS_WRITE_ENABLE (C14) is 1, and keeps them otherwise, so a branch tests
// the flags of the most recent ADD, ADDI, SUB, SUBI, SHIFTL, SHIFTR or CMP.
// Cleared by reset. The three flags follow the published description; the
// storage circuit is this design's choice.
module flags_register
  import i281_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   we,
  input  flags_t d,
  output flags_t q
);

  par_reg #(.WIDTH(3)) u_flags (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

endmodule
