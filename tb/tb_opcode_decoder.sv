// tb_opcode_decoder: exhaustive test of the opcode decoder.
// For all 256 values of I15..I8 the output must be one-hot and must be the
// line of the instruction named in the testbench's own opcode table.
module tb_opcode_decoder;
  import i281_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] hi;
  lines_t lines;

  opcode_decoder dut (.instr_hi(hi), .lines(lines));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(logic [7:0] v);
    int op = int'(v[7:4]);
    int sub = int'(v[1:0]);
    case (op)
      0: return int'(I_NOOP);
      1: return (sub == 0) ? int'(I_INPUTC) : (sub == 1) ? int'(I_INPUTCF) :
                (sub == 2) ? int'(I_INPUTD) : int'(I_INPUTDF);
      2: return int'(I_MOVE);
      3: return int'(I_LOADI);
      4: return int'(I_ADD);
      5: return int'(I_ADDI);
      6: return int'(I_SUB);
      7: return int'(I_SUBI);
      8: return int'(I_LOAD);
      9: return int'(I_LOADF);
      10: return int'(I_STORE);
      11: return int'(I_STOREF);
      12: return v[0] ? int'(I_SHIFTR) : int'(I_SHIFTL);
      13: return int'(I_CMP);
      14: return int'(I_JUMP);
      default: return (sub == 0) ? int'(I_BRE) : (sub == 1) ? int'(I_BRNE) :
                      (sub == 2) ? int'(I_BRG) : int'(I_BRGE);
    endcase
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      hi = 8'(v); #1;
      checks++;
      if (lines !== (lines_t'(1) << expected(hi))) begin
        failures++; $display("FAIL I15..I8=%b lines=%b expected line %0d", hi, lines, expected(hi));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
