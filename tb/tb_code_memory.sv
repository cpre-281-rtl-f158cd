// tb_code_memory: self-checking test of the 64 x 16 code memory.
// Uses a recognisable BIOS table and user table. Checks reads of both
// halves, that writes land in the user half only in BIOS mode, and that
// writes to BIOS addresses are ignored, against a 64-word model.
module tb_code_memory;
  import i281_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we, bios_mode;
  pc_t raddr, waddr;
  instr_t instr;
  logic [15:0] wdata;
  logic [15:0] model [64];
  int blocked_user = 0, blocked_bios = 0, written = 0;

  function automatic logic [BIOS_WORDS-1:0][15:0] bios_tbl();
    for (int i = 0; i < BIOS_WORDS; i++) bios_tbl[i] = 16'hB000 + 16'(i);
  endfunction
  function automatic logic [USER_WORDS-1:0][15:0] user_tbl();
    for (int i = 0; i < USER_WORDS; i++) user_tbl[i] = 16'h5500 + 16'(i * 3);
  endfunction

  code_memory #(.BIOS_INIT(bios_tbl()), .USER_INIT(user_tbl())) dut (
    .clk(clk), .rst(rst), .raddr(raddr), .instr(instr), .waddr(waddr),
    .we(we), .bios_mode(bios_mode), .wdata(wdata)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 64; a++) begin
      raddr = pc_t'(a); #1;
      checks++;
      if (instr !== model[a]) begin
        failures++; $display("FAIL [%0d]=%h exp %h", a, instr, model[a]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; bios_mode = 1; raddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 32; a++) model[a] = 16'hB000 + 16'(a);
    for (int a = 0; a < 32; a++) model[32 + a] = 16'h5500 + 16'(a * 3);
    @(negedge clk); rst = 0;
    check_all();
    for (int i = 0; i < 300; i++) begin
      waddr = pc_t'($urandom); we = 1'($urandom); bios_mode = 1'($urandom);
      wdata = 16'($urandom);
      @(posedge clk);
      if (we && bios_mode && waddr >= 32) begin model[waddr] = wdata; written++; end
      else if (we && !bios_mode && waddr >= 32) blocked_user++;
      else if (we && waddr < 32) blocked_bios++;
      @(negedge clk);
      raddr = waddr; #1;
      checks++;
      if (instr !== model[waddr]) begin
        failures++; $display("FAIL after write [%0d]=%h exp %h", waddr, instr, model[waddr]);
      end
    end
    we = 0;
    check_all();
    checks++;
    if (written == 0 || blocked_user == 0 || blocked_bios == 0) begin
      failures++; $display("FAIL coverage written=%0d blocked_user=%0d blocked_bios=%0d",
                           written, blocked_user, blocked_bios);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
