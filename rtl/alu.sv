// alu: the i281's 8-bit arithmetic unit.
//
// Operand a comes from register port 0, operand b from the ALU source mux
// (register port 1 or the immediate). ALU_SELECT (C12C13) picks the
// operation: 00 shift a left by one, 01 shift a right by one (both zero
// filled), 10 a + b, 11 a - b. Alongside the result it computes the three
// flags the flags register stores: ZF (result is zero), NF (bit 7 of the
// result) and OF (two's-complement overflow of the add or subtract; 0 for
// shifts). Combinational. The operation codes come from the control table;
// shift details and OF for shifts are this design's choice.
module alu
  import i281_pkg::*;
(
  input  byte_t   a,
  input  byte_t   b,
  input  alu_op_e sel,
  output byte_t   y,
  output flags_t  flags
);

  always_comb begin
    flags.of = 1'b0;
    unique case (sel)
      ALU_SHL: y = {a[6:0], 1'b0};
      ALU_SHR: y = {1'b0, a[7:1]};
      ALU_ADD: begin
        y        = a + b;
        flags.of = (a[7] == b[7]) && (y[7] != a[7]);
      end
      default: begin
        y        = a - b;
        flags.of = (a[7] != b[7]) && (y[7] != a[7]);
      end
    endcase
    flags.zf = (y == 8'h00);
    flags.nf = y[7];
  end

endmodule
