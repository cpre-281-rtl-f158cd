// tb_hex7seg: exhaustive test of the hex 7-segment decoder.
// The expected glyphs are written as lists of lit segment letters
// (a = segment 0 top ... g = segment 6 middle) and converted here.
module tb_hex7seg;
  int checks = 0, failures = 0;
  logic [3:0] nibble;
  logic [6:0] seg, e;
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  hex7seg dut (.nibble(nibble), .seg(seg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      e = '0;
      for (int k = 0; k < glyph[v].len(); k++) e[glyph[v][k] - "a"] = 1'b1;
      nibble = 4'(v); #1;
      checks++;
      if (seg !== e) begin failures++; $display("FAIL %h seg=%b exp %b", v, seg, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
