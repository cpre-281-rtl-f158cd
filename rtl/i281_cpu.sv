// i281_cpu: the complete i281 teaching CPU with its memories and display.
//
// Single-cycle machine: each rising clock edge completes one instruction.
// During the cycle the PC addresses the code memory; the opcode decoder and
// control logic turn the instruction into the control lines C1..C18, which
// steer the datapath:
//
//   register port 0 ------------------------------> ALU a
//   register port 1 / immediate   (C11 mux) ------> ALU b
//   ALU result / immediate        (C15 mux) ------> data memory address,
//                                                   code memory write address,
//                                                   write-back mux input 0
//   register port 1 / data switches (C16 mux) ----> data memory write data
//   C15 mux output / data memory  (C18 mux) ------> register write data
//   PC+1 / PC+1+offset            (C2 mux)  ------> next PC
//
// ALU flags are stored when C14 is 1 and drive the branch conditions.
// The code memory's user half can be written from the 16 code switches only
// while the CPU is in BIOS mode, which this design defines as "the PC is in
// the BIOS half (addresses 0..31)". Data memory bytes 0..7 drive the eight
// 7-segment displays through the video card; video_game_mode selects
// per-segment drawing. Reset (active high) clears the PC, registers and
// flags and reloads the memories' initial contents.
//
// The component list, memory sizes, control lines and mux placement follow
// the published datapath; the opcode numbering, instruction field positions,
// branch-offset arithmetic and the BIOS-mode rule are this design's reading.
// pc, regs and flags are brought out for observation only.
module i281_cpu
  import i281_pkg::*;
#(
  parameter logic [BIOS_WORDS-1:0][15:0] BIOS_INIT      = DEFAULT_BIOS,
  parameter logic [USER_WORDS-1:0][15:0] USER_CODE_INIT = DEFAULT_USER_CODE,
  parameter logic [DMEM_WORDS-1:0][7:0]  DMEM_INIT      = DEFAULT_DMEM
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [15:0]     code_switches,
  input  logic [7:0]      data_switches,
  input  logic            video_game_mode,
  output logic [7:0][6:0] hex,
  output logic [5:0]      pc,
  output logic [3:0][7:0] regs,
  output logic [2:0]      flags
);

  instr_t instr;
  lines_t lines;
  ctrl_t  ctrl;
  flags_t flags_q, alu_flags;
  byte_t  imm, p0, p1, alu_b, alu_y, result, dmem_wdata, dmem_rdata, wb_data;
  logic   bios_mode;
  logic [DMEM_WORDS-1:0][7:0] dmem_cells;

  assign imm       = instr[7:0];
  assign bios_mode = ~pc[5];

  program_counter #(.PC_WIDTH(6)) u_pc (
    .clk(clk), .rst(rst), .we(ctrl.pc_we), .branch(ctrl.pc_mux),
    .offset(instr[5:0]), .pc(pc)
  );

  code_memory #(.BIOS_INIT(BIOS_INIT), .USER_INIT(USER_CODE_INIT)) u_code (
    .clk(clk), .rst(rst), .raddr(pc), .instr(instr),
    .waddr(result[5:0]), .we(ctrl.imem_we), .bios_mode(bios_mode),
    .wdata(code_switches)
  );

  opcode_decoder u_dec (.instr_hi(instr[15:8]), .lines(lines));

  control_logic u_ctrl (
    .lines(lines), .x(instr[11:10]), .y(instr[9:8]), .flags(flags_q), .ctrl(ctrl)
  );

  register_file #(.WIDTH(8)) u_regs (
    .clk(clk), .rst(rst),
    .p0_sel(ctrl.p0_sel), .p1_sel(ctrl.p1_sel),
    .wr_sel(ctrl.wr_sel), .we(ctrl.reg_we), .wdata(wb_data),
    .p0(p0), .p1(p1), .regs(regs)
  );

  bus_mux2 #(.WIDTH(8)) u_alu_src_mux (.u(p1), .v(imm), .sel(ctrl.alu_src), .z(alu_b));

  alu u_alu (.a(p0), .b(alu_b), .sel(ctrl.alu_sel), .y(alu_y), .flags(alu_flags));

  flags_register u_flags (
    .clk(clk), .rst(rst), .we(ctrl.flags_we), .d(alu_flags), .q(flags_q)
  );

  bus_mux2 #(.WIDTH(8)) u_alu_result_mux (
    .u(alu_y), .v(imm), .sel(ctrl.alu_result_mux), .z(result)
  );

  bus_mux2 #(.WIDTH(8)) u_dmem_in_mux (
    .u(p1), .v(data_switches), .sel(ctrl.dmem_in_mux), .z(dmem_wdata)
  );

  data_memory #(.DEPTH(DMEM_WORDS), .WIDTH(8), .INIT(DMEM_INIT)) u_dmem (
    .clk(clk), .rst(rst), .addr(result[3:0]), .we(ctrl.dmem_we),
    .wdata(dmem_wdata), .rdata(dmem_rdata), .mem(dmem_cells)
  );

  bus_mux2 #(.WIDTH(8)) u_wb_mux (
    .u(result), .v(dmem_rdata), .sel(ctrl.wb_mux), .z(wb_data)
  );

  video_card u_video (
    .mem_lo(dmem_cells[7:0]), .game_mode(video_game_mode), .hex(hex)
  );

  assign flags = flags_q;

endmodule
