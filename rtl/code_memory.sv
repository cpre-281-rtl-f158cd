// code_memory: the i281's 64 x 16 instruction memory.
//
// Split in two halves. Addresses 0..31 hold the BIOS, a read-only table given
// by BIOS_INIT. Addresses 32..63 are user code: 16-bit parallel-access
// registers that reset to USER_INIT and can be written from the code switches
// (wdata) when IMEM_WRITE_ENABLE (we, C1) is 1 -- but only in BIOS mode
// (bios_mode = 1); in user mode the user half is read-only too. Writes to a
// BIOS address are ignored. The instruction at raddr (the PC) is read
// combinationally; a write lands on the rising clock edge.
// The split, sizes and the read-only/read-write rules follow the published
// memory layout; how BIOS mode is selected is decided outside this block.
module code_memory
  import i281_pkg::*;
#(
  parameter logic [BIOS_WORDS-1:0][15:0] BIOS_INIT = DEFAULT_BIOS,
  parameter logic [USER_WORDS-1:0][15:0] USER_INIT = DEFAULT_USER_CODE
) (
  input  logic        clk,
  input  logic        rst,
  input  pc_t         raddr,
  output instr_t      instr,
  input  pc_t         waddr,
  input  logic        we,
  input  logic        bios_mode,
  input  logic [15:0] wdata
);

  logic [USER_WORDS-1:0][15:0] user;
  logic                        user_we;

  // Only the user half (address bit 5 set) is writable, and only in BIOS mode
  assign user_we = we && bios_mode && waddr[5];

  for (genvar i = 0; i < USER_WORDS; i++) begin : g_word
    par_reg #(.WIDTH(16), .RESET_VALUE(USER_INIT[i])) u_word (
      .clk(clk), .rst(rst),
      .we(user_we && (waddr[4:0] == 5'(i))),
      .d(wdata), .q(user[i])
    );
  end

  assign instr = raddr[5] ? user[raddr[4:0]] : BIOS_INIT[raddr[4:0]];

endmodule
