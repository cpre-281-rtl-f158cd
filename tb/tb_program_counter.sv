// tb_program_counter: self-checking test of the program counter.
// Checks reset to 0, sequential increment with wrap from 63 to 0, hold when
// the write enable is low, and branch targets PC+1+offset for random signed
// offsets, including the two offsets of the example program (+3, -5).
module tb_program_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, branch;
  logic [5:0] offset, pc;
  int model;

  program_counter #(.PC_WIDTH(6)) dut (
    .clk(clk), .rst(rst), .we(we), .branch(branch), .offset(offset), .pc(pc)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic w, logic br, logic [5:0] off);
    we = w; branch = br; offset = off;
    @(posedge clk);
    if (w) model = (model + 1 + (br ? int'($signed(off)) : 0) + 64) % 64;
    #1;
    checks++;
    if (int'(pc) != model) begin
      failures++; $display("FAIL we=%b br=%b off=%0d pc=%0d exp %0d", w, br, $signed(off), pc, model);
    end
    @(negedge clk);
  endtask

  initial begin
    rst = 1; we = 0; branch = 0; offset = 0; model = 0;
    @(negedge clk);
    checks++;
    if (pc !== 6'd0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    rst = 0;
    for (int i = 0; i < 70; i++) step(1, 0, 6'd0);   // wraps past 63
    for (int i = 0; i < 5; i++) step(0, 1, 6'd7);    // hold
    // example program: BRG +3 at 36 -> 40, JUMP -5 at 39 -> 35
    while (model != 36) step(1, 0, 6'd0);
    step(1, 1, 6'd3);
    checks++;
    if (pc !== 6'd40) begin failures++; $display("FAIL BRG target %0d", pc); end
    while (model != 39) step(1, 0, 6'd0);
    step(1, 1, 6'h3B);
    checks++;
    if (pc !== 6'd35) begin failures++; $display("FAIL JUMP target %0d", pc); end
    for (int i = 0; i < 300; i++) step(1'($urandom), 1'($urandom), 6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
