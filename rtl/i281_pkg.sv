// i281_pkg: types and constants shared by the i281 CPU blocks.
//
// The i281 is an 8-bit teaching CPU with four registers (A-D), a 16 x 8 data
// memory and a 64 x 16 code memory. Every instruction is one 16-bit word:
//
//   I15..I12  opcode         I11..I10  X register    I9..I8  Y register or
//   I7..I0    immediate / data address / branch offset      sub-opcode
//
// The 18 control lines C1..C18 and their per-instruction values follow the
// published control table; they are gathered here in ctrl_t in C1..C18 order.
// The numeric opcode values, the X field position and the sub-opcode bits
// are this design's choice (chosen to agree with the published example
// program).
package i281_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [15:0] instr_t;
  typedef logic [5:0]  pc_t;

  // Register numbers (value of an X or Y field)
  typedef enum logic [1:0] {REG_A = 2'd0, REG_B = 2'd1, REG_C = 2'd2, REG_D = 2'd3} reg_e;

  // ALU_SELECT1/ALU_SELECT0 (C12, C13)
  typedef enum logic [1:0] {
    ALU_SHL = 2'b00,
    ALU_SHR = 2'b01,
    ALU_ADD = 2'b10,
    ALU_SUB = 2'b11
  } alu_op_e;

  // Opcode field I15..I12
  typedef enum logic [3:0] {
    OP_NOOP   = 4'b0000,
    OP_INPUT  = 4'b0001,  // I9..I8: 00 INPUTC, 01 INPUTCF, 10 INPUTD, 11 INPUTDF
    OP_MOVE   = 4'b0010,
    OP_LOADI  = 4'b0011,  // LOADI and LOADP share this encoding
    OP_ADD    = 4'b0100,
    OP_ADDI   = 4'b0101,
    OP_SUB    = 4'b0110,
    OP_SUBI   = 4'b0111,
    OP_LOAD   = 4'b1000,
    OP_LOADF  = 4'b1001,
    OP_STORE  = 4'b1010,
    OP_STOREF = 4'b1011,
    OP_SHIFT  = 4'b1100,  // I8: 0 SHIFTL, 1 SHIFTR
    OP_CMP    = 4'b1101,
    OP_JUMP   = 4'b1110,
    OP_BRANCH = 4'b1111   // I9..I8: 00 BRE/BRZ, 01 BRNE/BRNZ, 10 BRG, 11 BRGE
  } opcode_e;

  // One decoder output line per instruction (rows of the control table)
  typedef enum logic [4:0] {
    I_NOOP, I_INPUTC, I_INPUTCF, I_INPUTD, I_INPUTDF, I_MOVE, I_LOADI,
    I_ADD, I_ADDI, I_SUB, I_SUBI, I_LOAD, I_LOADF, I_STORE, I_STOREF,
    I_SHIFTL, I_SHIFTR, I_CMP, I_JUMP, I_BRE, I_BRNE, I_BRG, I_BRGE
  } instr_e;
  localparam int unsigned N_INSTR = 23;

  typedef logic [N_INSTR-1:0] lines_t;

  typedef struct packed {
    logic zf;  // zero
    logic nf;  // negative (bit 7 of the result)
    logic of;  // signed overflow
  } flags_t;

  // Control word C1..C18, MSB first in table order
  typedef struct packed {
    logic       imem_we;         // C1  IMEM_WRITE_ENABLE
    logic       pc_mux;          // C2  PROGRAM_COUNTER_MUX (1 = PC+1+offset)
    logic       pc_we;           // C3  PROGRAM_COUNTER_WRITE_EN
    logic [1:0] p0_sel;          // C4,C5 REGISTERS_PORT0_SELECT1/0
    logic [1:0] p1_sel;          // C6,C7 REGISTERS_PORT1_SELECT1/0
    logic [1:0] wr_sel;          // C8,C9 REGISTERS_WRITE_SELECT1/0
    logic       reg_we;          // C10 REGISTERS_WRITE_ENABLE
    logic       alu_src;         // C11 ALU_SOURCE_MUX (1 = immediate)
    alu_op_e    alu_sel;         // C12,C13 ALU_SELECT1/0
    logic       flags_we;        // C14 FLAGS_WRITE_ENABLE
    logic       alu_result_mux;  // C15 ALU_RESULT_MUX (1 = immediate)
    logic       dmem_in_mux;     // C16 DMEM_INPUT_MUX (1 = data switches)
    logic       dmem_we;         // C17 DMEM_WRITE_ENABLE
    logic       wb_mux;          // C18 REG_WRITEBACK_MUX (1 = data memory)
  } ctrl_t;

  localparam int unsigned BIOS_WORDS = 32;
  localparam int unsigned USER_WORDS = 32;
  localparam int unsigned DMEM_WORDS = 16;

  // Example user program (code addresses 32..40): sums 1..mem[0] into B and
  // stores the sum at data address 2.
  //   32 LOADI B,0   33 LOADI A,1   34 LOAD D,[0]   35 CMP A,D
  //   36 BRG +3      37 ADD B,A     38 ADDI A,1     39 JUMP -5
  //   40 STORE [2],B
  localparam logic [USER_WORDS-1:0][15:0] DEFAULT_USER_CODE = '{
    0: 16'h3400, 1: 16'h3001, 2: 16'h8C00, 3: 16'hD300, 4: 16'hF203,
    5: 16'h4400, 6: 16'h5001, 7: 16'hE0FB, 8: 16'hA402,
    default: 16'h0000
  };

  // BIOS contents are board-specific; the default is all NOOP, so execution
  // falls through from address 0 into the user program at address 32.
  localparam logic [BIOS_WORDS-1:0][15:0] DEFAULT_BIOS = '0;

  // Data memory contents that go with the example program
  localparam logic [DMEM_WORDS-1:0][7:0] DEFAULT_DMEM = '{0: 8'h05, default: 8'h00};

endpackage
