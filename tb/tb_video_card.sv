// tb_video_card: self-checking test of the memory-mapped video card.
// Normal mode: the example values 7 3 2 1 6 4 5 8 (with high bits set that
// must not matter) show as hex digits. Video game mode: the bytes
// 01111001, 01010100, 01011110 draw "E", "n", "d" segment by segment.
module tb_video_card;
  int checks = 0, failures = 0;
  logic [7:0][7:0] mem_lo;
  logic game;
  logic [7:0][6:0] hex;
  // segment patterns of digits 0..F, bit k = segment k
  logic [6:0] digit [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                             7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  video_card dut (.mem_lo(mem_lo), .game_mode(game), .hex(hex));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int i, logic [6:0] e, string what);
    checks++;
    if (hex[i] !== e) begin failures++; $display("FAIL %s display %0d = %b exp %b", what, i, hex[i], e); end
  endtask

  initial begin
    int vals [8] = '{7, 3, 2, 1, 6, 4, 5, 8};
    game = 0;
    for (int i = 0; i < 8; i++) mem_lo[i] = 8'(vals[i]) | (8'(i) << 4);
    #1;
    for (int i = 0; i < 8; i++) check(i, digit[vals[i]], "hex");
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 8; i++) mem_lo[i] = 8'($urandom);
      game = 1'($urandom);
      #1;
      for (int i = 0; i < 8; i++) check(i, game ? mem_lo[i][6:0] : digit[mem_lo[i][3:0]], "random");
    end
    game = 1;
    mem_lo = '0;
    mem_lo[4] = 8'b01111001; mem_lo[5] = 8'b01010100; mem_lo[6] = 8'b01011110;
    #1;
    check(4, 7'b1111001, "E"); check(5, 7'b1010100, "n"); check(6, 7'b1011110, "d");
    check(0, 7'b0000000, "blank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
