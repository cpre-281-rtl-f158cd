// tb_i281_video: the CPU drawing "End" on the displays in video game mode.
//
// A six-instruction user program stores 01111001, 01010100 and 01011110 at
// data addresses 4, 5 and 6. In video game mode each bit 0..6 lights one
// segment (0 top, 1 upper right, 2 lower right, 3 bottom, 4 lower left,
// 5 upper left, 6 middle), so displays 4..6 read "E", "n", "d" and the others
// stay dark. In normal mode the same bytes show their low hex digits 9, 4, E.
// Each store must reach its display on the clock edge that executes it.
module tb_i281_video;
  import i281_pkg::*;
  int checks = 0, failures = 0;

  function automatic logic [USER_WORDS-1:0][15:0] prog();
    logic [USER_WORDS-1:0][15:0] p = '0;
    p[0] = 16'h3079;  // LOADI A,0x79
    p[1] = 16'hA004;  // STORE [4],A
    p[2] = 16'h3054;  // LOADI A,0x54
    p[3] = 16'hA005;  // STORE [5],A
    p[4] = 16'h305E;  // LOADI A,0x5E
    p[5] = 16'hA006;  // STORE [6],A
    p[6] = 16'hE0FF;  // JUMP self
    return p;
  endfunction

  logic clk = 0, rst;
  logic [15:0] code_switches = '0;
  logic [7:0]  data_switches = '0;
  logic        video_game_mode;
  logic [7:0][6:0] hex;
  logic [5:0]  pc;
  logic [3:0][7:0] regs;
  logic [2:0]  flags;

  i281_cpu #(.USER_CODE_INIT(prog()), .DMEM_INIT('0)) dut (
    .clk(clk), .rst(rst), .code_switches(code_switches), .data_switches(data_switches),
    .video_game_mode(video_game_mode), .hex(hex), .pc(pc), .regs(regs), .flags(flags)
  );

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; video_game_mode = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    while (pc != 6'd33) @(negedge clk);       // STORE [4] about to execute
    check(hex[4] == 7'b0000000, "display 4 dark before the store");
    @(negedge clk);
    check(hex[4] == 7'b1111001, "display 4 lit by the store on the next edge");
    while (pc != 6'd38) @(negedge clk);
    check(hex[4] == 7'b1111001, $sformatf("display 4 = %b, expected E", hex[4]));
    check(hex[5] == 7'b1010100, $sformatf("display 5 = %b, expected n", hex[5]));
    check(hex[6] == 7'b1011110, $sformatf("display 6 = %b, expected d", hex[6]));
    for (int i = 0; i < 8; i++)
      if (i < 4 || i == 7) check(hex[i] == 7'b0, $sformatf("display %0d dark", i));
    video_game_mode = 0; #1;
    check(hex[4] == 7'h6F, "normal mode: display 4 shows 9");
    check(hex[5] == 7'h66, "normal mode: display 5 shows 4");
    check(hex[6] == 7'h79, "normal mode: display 6 shows E");
    check(hex[0] == 7'h3F, "normal mode: display 0 shows 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
