// tb_alu: self-checking test of the ALU.
// Random operands for all four operations; the result and flags are
// recomputed with integer arithmetic (overflow from the signed range).
module tb_alu;
  import i281_pkg::*;
  int checks = 0, failures = 0;
  byte_t a, b, y, ey;
  alu_op_e sel;
  flags_t flags, ef;
  int of_seen = 0;

  alu dut (.a(a), .b(b), .sel(sel), .y(y), .flags(flags));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int sa, sb, s;
      a = 8'($urandom); b = 8'($urandom); sel = alu_op_e'(2'(i));
      if (i % 97 == 0) b = a;  // make zero results appear
      sa = int'($signed(a)); sb = int'($signed(b));
      ef.of = 1'b0;
      case (sel)
        ALU_SHL: ey = 8'((int'(a) * 2) % 256);
        ALU_SHR: ey = 8'(int'(a) / 2);
        ALU_ADD: begin s = sa + sb; ey = 8'(s); ef.of = (s > 127 || s < -128); end
        default: begin s = sa - sb; ey = 8'(s); ef.of = (s > 127 || s < -128); end
      endcase
      ef.zf = (ey == 0);
      ef.nf = (int'(ey) >= 128);
      #1;
      checks++;
      if (y !== ey || flags !== ef) begin
        failures++;
        $display("FAIL %s a=%h b=%h y=%h exp %h flags=%b exp %b", sel.name(), a, b, y, ey, flags, ef);
      end
      if (flags.of) of_seen++;
    end
    checks++;
    if (of_seen == 0) begin failures++; $display("FAIL overflow never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
