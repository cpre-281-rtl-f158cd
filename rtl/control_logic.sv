// control_logic: produces the i281's 18 control lines C1..C18.
//
// For the instruction whose decoder line is high, the outputs take the
// values of that instruction's row of the control table. Register selects
// are copied from the instruction's X (I11..I10) or Y (I9..I8) field where
// the table says X1 X0 / Y1 Y0. PROGRAM_COUNTER_MUX (C2) is 1 for JUMP and,
// for the four conditional branches, is computed from the flags register:
//   BRE  B1 = ZF            BRNE B2 = ~ZF
//   BRG  B3 = ~ZF & (NF ~^ OF)      BRGE B4 = NF ~^ OF
// Every instruction sets PROGRAM_COUNTER_WRITE_EN (C3), so one instruction
// completes per clock. Blank table cells are 0. Combinational.
// Where the published copies of the table disagree (the INPUTD row), this
// block uses the row that makes INPUTD store the data switches at the
// immediate address: C15, C16, C17.
module control_logic
  import i281_pkg::*;
(
  input  lines_t     lines,
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  flags_t     flags,
  output ctrl_t      ctrl
);

  logic b1, b2, b3, b4;

  assign b1 = flags.zf;
  assign b2 = ~flags.zf;
  assign b3 = ~flags.zf & (flags.nf ~^ flags.of);
  assign b4 = flags.nf ~^ flags.of;

  always_comb begin
    ctrl       = '0;
    ctrl.pc_we = 1'b1;  // C3 is 1 in every row

    if (lines[I_INPUTC]) begin
      ctrl.imem_we        = 1'b1;
      ctrl.alu_result_mux = 1'b1;
    end
    if (lines[I_INPUTCF]) begin
      ctrl.imem_we = 1'b1;
      ctrl.p0_sel  = x;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
    end
    if (lines[I_INPUTD]) begin
      ctrl.alu_result_mux = 1'b1;
      ctrl.dmem_in_mux    = 1'b1;
      ctrl.dmem_we        = 1'b1;
    end
    if (lines[I_INPUTDF]) begin
      ctrl.p0_sel      = x;
      ctrl.alu_src     = 1'b1;
      ctrl.alu_sel     = ALU_ADD;
      ctrl.dmem_in_mux = 1'b1;
      ctrl.dmem_we     = 1'b1;
    end
    if (lines[I_MOVE]) begin
      ctrl.p0_sel  = y;
      ctrl.wr_sel  = x;
      ctrl.reg_we  = 1'b1;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
    end
    if (lines[I_LOADI]) begin
      ctrl.wr_sel         = x;
      ctrl.reg_we         = 1'b1;
      ctrl.alu_result_mux = 1'b1;
    end
    if (lines[I_ADD] || lines[I_SUB]) begin
      ctrl.p0_sel   = x;
      ctrl.p1_sel   = y;
      ctrl.wr_sel   = x;
      ctrl.reg_we   = 1'b1;
      ctrl.alu_sel  = lines[I_SUB] ? ALU_SUB : ALU_ADD;
      ctrl.flags_we = 1'b1;
    end
    if (lines[I_ADDI] || lines[I_SUBI]) begin
      ctrl.p0_sel   = x;
      ctrl.wr_sel   = x;
      ctrl.reg_we   = 1'b1;
      ctrl.alu_src  = 1'b1;
      ctrl.alu_sel  = lines[I_SUBI] ? ALU_SUB : ALU_ADD;
      ctrl.flags_we = 1'b1;
    end
    if (lines[I_LOAD]) begin
      ctrl.wr_sel         = x;
      ctrl.reg_we         = 1'b1;
      ctrl.alu_result_mux = 1'b1;
      ctrl.wb_mux         = 1'b1;
    end
    if (lines[I_LOADF]) begin
      ctrl.p0_sel  = y;
      ctrl.wr_sel  = x;
      ctrl.reg_we  = 1'b1;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
      ctrl.wb_mux  = 1'b1;
    end
    if (lines[I_STORE]) begin
      ctrl.p1_sel         = x;
      ctrl.alu_result_mux = 1'b1;
      ctrl.dmem_we        = 1'b1;
    end
    if (lines[I_STOREF]) begin
      ctrl.p0_sel  = y;
      ctrl.p1_sel  = x;
      ctrl.alu_src = 1'b1;
      ctrl.alu_sel = ALU_ADD;
      ctrl.dmem_we = 1'b1;
    end
    if (lines[I_SHIFTL] || lines[I_SHIFTR]) begin
      ctrl.p0_sel   = x;
      ctrl.wr_sel   = x;
      ctrl.reg_we   = 1'b1;
      ctrl.alu_sel  = lines[I_SHIFTR] ? ALU_SHR : ALU_SHL;
      ctrl.flags_we = 1'b1;
    end
    if (lines[I_CMP]) begin
      ctrl.p0_sel   = x;
      ctrl.p1_sel   = y;
      ctrl.alu_sel  = ALU_SUB;
      ctrl.flags_we = 1'b1;
    end
    if (lines[I_JUMP]) ctrl.pc_mux = 1'b1;
    if (lines[I_BRE])  ctrl.pc_mux = b1;
    if (lines[I_BRNE]) ctrl.pc_mux = b2;
    if (lines[I_BRG])  ctrl.pc_mux = b3;
    if (lines[I_BRGE]) ctrl.pc_mux = b4;
  end

endmodule
