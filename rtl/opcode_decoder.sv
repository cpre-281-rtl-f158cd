// opcode_decoder: turns the top byte of an instruction into one line per
// instruction.
//
// A decoder tree on the opcode I15..I12 selects one of sixteen groups; inside
// the INPUT group (I9..I8), the SHIFT group (I8) and the branch group
// (I9..I8) a second-level decoder picks the instruction. Exactly one of the
// 23 output lines (indexed by instr_e) is 1 for every input. The X bits
// I11..I10 do not pass through the tree; the control logic uses them
// directly. Combinational. The grouping into a tree plus pass-through bits
// follows the published description; the numeric opcodes are this design's.
module opcode_decoder
  import i281_pkg::*;
(
  input  logic [7:0] instr_hi,  // I15..I8
  output lines_t     lines
);

  opcode_e    op;
  logic [1:0] sub;

  assign op  = opcode_e'(instr_hi[7:4]);
  assign sub = instr_hi[1:0];

  always_comb begin
    lines = '0;
    unique case (op)
      OP_NOOP:   lines[I_NOOP]   = 1'b1;
      OP_INPUT:
        unique case (sub)
          2'b00: lines[I_INPUTC]  = 1'b1;
          2'b01: lines[I_INPUTCF] = 1'b1;
          2'b10: lines[I_INPUTD]  = 1'b1;
          default: lines[I_INPUTDF] = 1'b1;
        endcase
      OP_MOVE:   lines[I_MOVE]   = 1'b1;
      OP_LOADI:  lines[I_LOADI]  = 1'b1;
      OP_ADD:    lines[I_ADD]    = 1'b1;
      OP_ADDI:   lines[I_ADDI]   = 1'b1;
      OP_SUB:    lines[I_SUB]    = 1'b1;
      OP_SUBI:   lines[I_SUBI]   = 1'b1;
      OP_LOAD:   lines[I_LOAD]   = 1'b1;
      OP_LOADF:  lines[I_LOADF]  = 1'b1;
      OP_STORE:  lines[I_STORE]  = 1'b1;
      OP_STOREF: lines[I_STOREF] = 1'b1;
      OP_SHIFT:
        if (sub[0]) lines[I_SHIFTR] = 1'b1;
        else        lines[I_SHIFTL] = 1'b1;
      OP_CMP:    lines[I_CMP]    = 1'b1;
      OP_JUMP:   lines[I_JUMP]   = 1'b1;
      default:
        unique case (sub)
          2'b00: lines[I_BRE]  = 1'b1;
          2'b01: lines[I_BRNE] = 1'b1;
          2'b10: lines[I_BRG]  = 1'b1;
          default: lines[I_BRGE] = 1'b1;
        endcase
    endcase
  end

endmodule
