// tb_control_logic: self-checking test of the control logic against the
// control table.
// Each instruction's row is written out below as 18 characters for C1..C18:
// '0'/'1' constants, 'x'/'y' bits of the X/Y field (the first of a pair is
// bit 1), 'b' the branch condition. Every row is checked with random X, Y
// and flag values; branch conditions are recomputed from the flags here.
module tb_control_logic;
  import i281_pkg::*;
  int checks = 0, failures = 0;
  lines_t lines;
  logic [1:0] x, y;
  flags_t flags;
  ctrl_t ctrl;
  int taken [4];

  control_logic dut (.lines(lines), .x(x), .y(y), .flags(flags), .ctrl(ctrl));

  string rows [N_INSTR];
  initial begin
    rows[I_NOOP]    = "001000000000000000";
    rows[I_INPUTC]  = "101000000000001000";
    rows[I_INPUTCF] = "101xx0000011000000";
    rows[I_INPUTD]  = "001000000000001110";
    rows[I_INPUTDF] = "001xx0000011000110";
    rows[I_MOVE]    = "001yy00xx111000000";
    rows[I_LOADI]   = "0010000xx100001000";
    rows[I_ADD]     = "001xxyyxx101010000";
    rows[I_ADDI]    = "001xx00xx111010000";
    rows[I_SUB]     = "001xxyyxx101110000";
    rows[I_SUBI]    = "001xx00xx111110000";
    rows[I_LOAD]    = "0010000xx100001001";
    rows[I_LOADF]   = "001yy00xx111000001";
    rows[I_STORE]   = "00100xx00000001010";
    rows[I_STOREF]  = "001yyxx00011000010";
    rows[I_SHIFTL]  = "001xx00xx100010000";
    rows[I_SHIFTR]  = "001xx00xx100110000";
    rows[I_CMP]     = "001xxyy00001110000";
    rows[I_JUMP]    = "011000000000000000";
    rows[I_BRE]     = "0b1000000000000000";
    rows[I_BRNE]    = "0b1000000000000000";
    rows[I_BRG]     = "0b1000000000000000";
    rows[I_BRGE]    = "0b1000000000000000";
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cond(int i, flags_t f);
    case (i)
      I_BRE:   return f.zf;
      I_BRNE:  return !f.zf;
      I_BRG:   return !f.zf && (f.nf == f.of);
      default: return f.nf == f.of;
    endcase
  endfunction

  function automatic logic [17:0] expected(int i, logic [1:0] xv, logic [1:0] yv, flags_t f);
    logic [17:0] e;
    for (int col = 1; col <= 18; col++) begin
      byte ch = rows[i][col-1];
      logic bitv;
      case (ch)
        "0": bitv = 1'b0;
        "1": bitv = 1'b1;
        "x": bitv = (col % 2 == 0) ? xv[1] : xv[0];
        "y": bitv = (col % 2 == 0) ? yv[1] : yv[0];
        default: bitv = cond(i, f);
      endcase
      e[18 - col] = bitv;
    end
    return e;
  endfunction

  initial begin
    #1;
    for (int i = 0; i < N_INSTR; i++) begin
      checks++;
      if (rows[i].len() != 18) begin failures++; $display("bad row %0d", i); end
      for (int k = 0; k < 64; k++) begin
        lines = lines_t'(1) << i;
        x = 2'($urandom); y = 2'($urandom); flags = flags_t'($urandom);
        #1;
        checks++;
        if (18'(ctrl) !== expected(i, x, y, flags)) begin
          failures++;
          $display("FAIL %s x=%b y=%b flags=%b ctrl=%b exp=%b", instr_e'(i), x, y, flags,
                   18'(ctrl), expected(i, x, y, flags));
        end
        if (i >= int'(I_BRE) && ctrl.pc_mux) taken[i - int'(I_BRE)]++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (taken[k] == 0 || taken[k] == 64) begin
        failures++; $display("FAIL branch %0d taken %0d of 64", k, taken[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
