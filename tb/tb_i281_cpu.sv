// tb_i281_cpu: end-to-end test of the i281 CPU: BIOS loader, bubble sort,
// every instruction, both display modes.
//
// The BIOS (a parameter) is a loader: it copies a program word by word from
// the 16 code switches into user code memory with INPUTCF, reads the data
// switches into data memory with INPUTD and INPUTDF, then jumps to address
// 32. The testbench plays the operator, presenting the next program word on
// the switches whenever an INPUTCF is being executed. The loaded program
// bubble-sorts the 8-byte array at data addresses 0..7 (length-1 in byte 8,
// the published example data 7 3 2 1 6 4 5 8), then runs a short coda using
// MOVE, SHIFTL, SHIFTR, BRE, SUB, an overflowing ADD, STORE, LOAD, a NOOP and
// an INPUTC that must be refused because the CPU is now in user mode.
// Expected results are computed here (the array is sorted by the
// testbench). Each mechanism is counted -- every instruction line, branches
// taken and not taken, code writes accepted (BIOS mode) and refused (user
// mode), the overflow flag, both display modes -- and one that never happens
// is a failure.
module tb_i281_cpu;
  import i281_pkg::*;
  int checks = 0, failures = 0;

  // ---- a tiny assembler ----
  function automatic logic [15:0] enc(int op, int x, int y, int imm);
    return {4'(op), 2'(x), 2'(y), 8'(imm)};
  endfunction
  function automatic int off(int from, int to);
    return to - (from + 1);
  endfunction

  localparam int N_USER = 28;
  localparam int A = 0, B = 1, C = 2, D = 3;

  function automatic logic [USER_WORDS-1:0][15:0] user_prog();
    logic [USER_WORDS-1:0][15:0] p = '0;
    p[0]  = enc(8,  D, 0, 8);              // LOAD   D,[8]      last index
    p[1]  = enc(3,  A, 0, 0);              // outer: LOADI A,0
    p[2]  = enc(13, A, D, 0);              // inner: CMP A,D
    p[3]  = enc(15, 0, 3, off(3, 12));     // BRGE   next_outer
    p[4]  = enc(9,  B, A, 0);              // LOADF  B,[A+0]
    p[5]  = enc(9,  C, A, 1);              // LOADF  C,[A+1]
    p[6]  = enc(13, C, B, 0);              // CMP    C,B
    p[7]  = enc(15, 0, 3, off(7, 10));     // BRGE   cont        (no swap)
    p[8]  = enc(11, C, A, 0);              // STOREF [A+0],C
    p[9]  = enc(11, B, A, 1);              // STOREF [A+1],B
    p[10] = enc(5,  A, 0, 1);              // cont: ADDI A,1
    p[11] = enc(14, 0, 0, off(11, 2));     // JUMP   inner
    p[12] = enc(7,  D, 0, 1);              // next_outer: SUBI D,1
    p[13] = enc(15, 0, 2, off(13, 1));     // BRG    outer
    p[14] = enc(3,  A, 0, 8'h5A);          // LOADI  A,0x5A
    p[15] = enc(2,  B, A, 0);              // MOVE   B,A
    p[16] = enc(12, B, 0, 0);              // SHIFTL B
    p[17] = enc(12, A, 1, 0);              // SHIFTR A
    p[18] = enc(13, A, A, 0);              // CMP    A,A
    p[19] = enc(15, 0, 0, off(19, 21));    // BRE    +1
    p[20] = enc(3,  A, 0, 8'hFF);          // LOADI  A,0xFF     (skipped)
    p[21] = enc(6,  B, A, 0);              // SUB    B,A
    p[22] = enc(4,  B, B, 0);              // ADD    B,B        (overflows)
    p[23] = enc(10, B, 0, 9);              // STORE  [9],B
    p[24] = enc(8,  C, 0, 15);             // LOAD   C,[15]
    p[25] = enc(1,  0, 0, 63);             // INPUTC [63]       (refused)
    p[26] = enc(0,  0, 0, 0);              // NOOP
    p[27] = enc(14, 0, 0, off(27, 27));    // halt: JUMP self
    return p;
  endfunction

  function automatic logic [BIOS_WORDS-1:0][15:0] bios_prog();
    logic [BIOS_WORDS-1:0][15:0] p = '0;
    p[0] = enc(3,  A, 0, 32);              // LOADI A,32
    p[1] = enc(3,  B, 0, 32 + N_USER);     // LOADI B,32+N
    p[2] = enc(1,  A, 1, 0);               // loop: INPUTCF [A+0]
    p[3] = enc(5,  A, 0, 1);               // ADDI A,1
    p[4] = enc(13, A, B, 0);               // CMP A,B
    p[5] = enc(15, 0, 1, off(5, 2));       // BRNE loop
    p[6] = enc(1,  0, 2, 15);              // INPUTD [15]
    p[7] = enc(3,  C, 0, 10);              // LOADI C,10
    p[8] = enc(1,  C, 3, 4);               // INPUTDF [C+4]
    p[9] = enc(14, 0, 0, off(9, 32));      // JUMP 32
    return p;
  endfunction

  localparam logic [USER_WORDS-1:0][15:0] PROG = user_prog();
  localparam logic [DMEM_WORDS-1:0][7:0] DATA = '{0: 8'd7, 1: 8'd3, 2: 8'd2, 3: 8'd1,
                                                  4: 8'd6, 5: 8'd4, 6: 8'd5, 7: 8'd8,
                                                  8: 8'd7, default: 8'd0};

  logic clk = 0, rst;
  logic [15:0] code_switches;
  logic [7:0]  data_switches;
  logic        video_game_mode;
  logic [7:0][6:0] hex;
  logic [5:0]  pc;
  logic [3:0][7:0] regs;
  logic [2:0]  flags;

  i281_cpu #(.BIOS_INIT(bios_prog()), .USER_CODE_INIT('0), .DMEM_INIT(DATA)) dut (
    .clk(clk), .rst(rst), .code_switches(code_switches), .data_switches(data_switches),
    .video_game_mode(video_game_mode), .hex(hex), .pc(pc), .regs(regs), .flags(flags)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- the operator: switches follow the instruction being executed ----
  int n_loaded = 0;
  int line_count [N_INSTR];
  int br_taken = 0, br_not_taken = 0, code_wr_ok = 0, code_wr_refused = 0, overflows = 0;
  bit running = 0;

  always @(negedge clk) begin
    if (running) begin
      if (dut.lines[I_INPUTCF]) begin
        code_switches = PROG[n_loaded];
        n_loaded++;
      end else if (dut.lines[I_INPUTC]) code_switches = 16'hDEAD;
      if (dut.lines[I_INPUTD])  data_switches = 8'hA5;
      if (dut.lines[I_INPUTDF]) data_switches = 8'h3C;
      #1;
      for (int i = 0; i < N_INSTR; i++) if (dut.lines[i]) line_count[i]++;
      if (dut.lines[I_BRE] || dut.lines[I_BRNE] || dut.lines[I_BRG] || dut.lines[I_BRGE]) begin
        if (dut.ctrl.pc_mux) br_taken++; else br_not_taken++;
      end
      if (dut.ctrl.imem_we && dut.bios_mode)  code_wr_ok++;
      if (dut.ctrl.imem_we && !dut.bios_mode) code_wr_refused++;
      if (dut.ctrl.flags_we && dut.alu_flags.of) overflows++;
    end
  end

  initial begin
    byte_t sorted [8];
    int cycles = 0;
    for (int i = 0; i < 8; i++) sorted[i] = DATA[i];
    sorted.sort();
    foreach (line_count[i]) line_count[i] = 0;

    rst = 1; code_switches = '0; data_switches = '0; video_game_mode = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    running = 1;
    while (!(pc == 6'(32 + 27)) && cycles < 5000) begin
      @(posedge clk); cycles++;
    end
    repeat (3) @(posedge clk);
    #2;
    running = 0;
    $display("halted after %0d cycles", cycles);
    check(cycles < 5000, "program reached its halt loop");

    // program loaded by the BIOS, INPUTC in user mode refused
    check(n_loaded == N_USER, $sformatf("loader copied %0d words, expected %0d", n_loaded, N_USER));
    for (int i = 0; i < N_USER; i++)
      check(dut.u_code.user[i] == PROG[i], $sformatf("user code word %0d = %h, expected %h",
                                                     i, dut.u_code.user[i], PROG[i]));
    check(dut.u_code.user[31] == 16'h0000, "user-mode INPUTC must not write code memory");

    // data memory: sorted array, untouched length, coda results, switch inputs
    for (int i = 0; i < 8; i++)
      check(dut.dmem_cells[i] == sorted[i], $sformatf("array[%0d] = %0d, expected %0d",
                                                      i, dut.dmem_cells[i], sorted[i]));
    check(dut.dmem_cells[8]  == 8'd7,  "last stays 7");
    check(dut.dmem_cells[9]  == 8'h0E, $sformatf("mem[9] = %h, expected 0e", dut.dmem_cells[9]));
    check(dut.dmem_cells[14] == 8'h3C, $sformatf("mem[14] = %h, expected 3c (INPUTDF)", dut.dmem_cells[14]));
    check(dut.dmem_cells[15] == 8'hA5, $sformatf("mem[15] = %h, expected a5 (INPUTD)", dut.dmem_cells[15]));

    // registers and flags: A = 0x5A >> 1, B = 2*(0xB4 - 0x2D) mod 256, C from mem[15], D = 0
    check(regs[0] == 8'h2D, $sformatf("A = %h, expected 2d", regs[0]));
    check(regs[1] == 8'h0E, $sformatf("B = %h, expected 0e", regs[1]));
    check(regs[2] == 8'hA5, $sformatf("C = %h, expected a5", regs[2]));
    check(regs[3] == 8'h00, $sformatf("D = %h, expected 00", regs[3]));
    check(flags == 3'b001, $sformatf("flags ZF,NF,OF = %b, expected 001", flags));

    // displays: hex digits of the sorted array, then raw segments in game mode
    begin
      logic [6:0] digit [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                                 7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
      for (int i = 0; i < 8; i++)
        check(hex[i] == digit[sorted[i][3:0]], $sformatf("display %0d = %b", i, hex[i]));
      video_game_mode = 1; #1;
      for (int i = 0; i < 8; i++)
        check(hex[i] == sorted[i][6:0], $sformatf("game-mode display %0d = %b", i, hex[i]));
    end

    // every mechanism happened
    for (int i = 0; i < N_INSTR; i++) begin
      $display("  %-8s executed %0d times", instr_e'(i), line_count[i]);
      check(line_count[i] > 0, $sformatf("%s never executed", instr_e'(i)));
    end
    $display("  branches taken %0d, not taken %0d; code writes accepted %0d, refused %0d; overflows %0d",
             br_taken, br_not_taken, code_wr_ok, code_wr_refused, overflows);
    check(br_taken > 0, "no branch taken");
    check(br_not_taken > 0, "no branch fell through");
    check(code_wr_ok == N_USER, "BIOS-mode code writes");
    check(code_wr_refused > 0, "no user-mode code write attempted");
    check(overflows > 0, "overflow flag never set");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
