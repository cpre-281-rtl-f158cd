// tb_i281_full: the i281 CPU at its default configuration, running the
// built-in example program.
//
// With default parameters the BIOS is all NOOP, so the CPU runs addresses
// 0..31 and then the program at 32..40, which adds 1 + 2 + ... + mem[0]
// (mem[0] = 5) into register B and stores the sum at data address 2. The
// testbench checks the result (15) in B, in data memory and on display 2
// (hex "F"), and that the final STORE completes on exactly the clock edge a
// one-instruction-per-cycle machine predicts: 32 + 3 + 5*5 + 2 + 1 = 63.
module tb_i281_full;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [15:0] code_switches;
  logic [7:0]  data_switches;
  logic        video_game_mode;
  logic [7:0][6:0] hex;
  logic [5:0]  pc;
  logic [3:0][7:0] regs;
  logic [2:0]  flags;
  int cycles;

  i281_cpu dut (
    .clk(clk), .rst(rst), .code_switches(code_switches), .data_switches(data_switches),
    .video_game_mode(video_game_mode), .hex(hex), .pc(pc), .regs(regs), .flags(flags)
  );

  always #5 clk = ~clk;

  initial begin
    #20000;
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
    int sum = 0;
    for (int k = 1; k <= 5; k++) sum += k;
    rst = 1; code_switches = '0; data_switches = '0; video_game_mode = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(pc == 0, "PC starts at 0");
    cycles = 0;
    while (pc != 6'd41 && cycles < 500) begin
      @(posedge clk); cycles++;
      #1;
    end
    $display("final STORE retired after %0d cycles", cycles);
    check(cycles == 63, $sformatf("cycle count %0d, expected 63", cycles));
    check(regs[1] == 8'(sum), $sformatf("B = %0d, expected %0d", regs[1], sum));
    check(regs[0] == 8'd6, $sformatf("A = %0d, expected 6", regs[0]));
    check(regs[3] == 8'd5, $sformatf("D = %0d, expected 5", regs[3]));
    check(hex[2] == 7'b1110001, $sformatf("display 2 = %b, expected F", hex[2]));
    check(hex[0] == 7'b1101101, $sformatf("display 0 = %b, expected 5", hex[0]));
    check(hex[1] == 7'b0111111, $sformatf("display 1 = %b, expected 0", hex[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
