// decoder: instruction decoder of the ID stage.
//
// Splits the 32-bit instruction word into its R, I or J format fields and
// produces the control word of the pipeline (rpp_pkg::ctrl_t). Besides the
// usual ALU, memory and branch controls it classifies the instruction for
// the hazard controllers:
//   * producer class: RES_EXE for ALU instructions (result at the end of
//     EXE), RES_MEM for loads (result at the end of MEM), RES_NONE for
//     instructions that write no register or write R0;
//   * consumer flags: rs read in ID (JR), rs/rt read in EXE (ALU operands,
//     branch comparison, address base), rt read in MEM (store data).
// Purely combinational. Unknown opcodes decode to an invalid (no-op)
// control word.
//
// Instruction classes (ALU with register or immediate operands, loads and
// stores as base + offset, conditional and unconditional jumps) follow the
// design description. The branch target is the 16-bit immediate taken as
// an absolute byte address and the J target the 26-bit field taken as an
// absolute byte address, which matches the reference waveform (a BNEZ at
// 0x4004 with immediate 0x4000 returns to 0x4000); JR and the exact opcode
// subset are this design's choices.
module decoder (
  input  rpp_pkg::word_t instr,
  output rpp_pkg::ctrl_t ctrl
);
  import rpp_pkg::*;
  logic [5:0] opc, fn;
  reg_t       rs, rt, rd;
  logic [4:0] shamt;
  logic [15:0] imm16;
  word_t      simm, zimm;

  assign opc   = instr[31:26];
  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign shamt = instr[10:6];
  assign fn    = instr[5:0];
  assign imm16 = instr[15:0];
  assign simm  = {{16{imm16[15]}}, imm16};
  assign zimm  = {16'h0000, imm16};

  always_comb begin
    ctrl            = '0;
    ctrl.rs         = rs;
    ctrl.rt         = rt;
    ctrl.alu_op     = ALU_ADD;
    ctrl.imm        = simm;
    ctrl.target     = zimm;
    unique case (opc)
      OP_RTYPE: begin
        ctrl.valid      = 1'b1;
        ctrl.res        = RES_EXE;
        ctrl.rd         = rd;
        ctrl.use_rs_exe = 1'b1;
        ctrl.use_rt_exe = 1'b1;
        ctrl.imm        = {27'b0, shamt};
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.shamt_op = 1'b1; ctrl.use_rs_exe = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.shamt_op = 1'b1; ctrl.use_rs_exe = 1'b0; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.shamt_op = 1'b1; ctrl.use_rs_exe = 1'b0; end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_JR: begin
            ctrl.res        = RES_NONE;
            ctrl.rd         = '0;
            ctrl.use_rs_exe = 1'b0;
            ctrl.use_rt_exe = 1'b0;
            ctrl.use_rs_id  = 1'b1;
            ctrl.is_jr      = 1'b1;
          end
          default: ctrl = '0;
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.valid      = 1'b1;
        ctrl.res        = RES_EXE;
        ctrl.rd         = rt;
        ctrl.alu_imm    = 1'b1;
        ctrl.use_rs_exe = (opc != OP_LUI);
        unique case (opc)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND; ctrl.imm = zimm; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;  ctrl.imm = zimm; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR; ctrl.imm = zimm; end
          OP_LUI:   begin ctrl.alu_op = ALU_LUI; ctrl.imm = zimm; end
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.valid      = 1'b1;
        ctrl.res        = RES_MEM;
        ctrl.rd         = rt;
        ctrl.alu_imm    = 1'b1;
        ctrl.use_rs_exe = 1'b1;
        ctrl.mem_read   = 1'b1;
      end
      OP_SW: begin
        ctrl.valid      = 1'b1;
        ctrl.alu_imm    = 1'b1;
        ctrl.use_rs_exe = 1'b1;
        ctrl.use_rt_mem = 1'b1;
        ctrl.mem_write  = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.valid      = 1'b1;
        ctrl.use_rs_exe = 1'b1;
        ctrl.use_rt_exe = 1'b1;
        ctrl.is_branch  = 1'b1;
        ctrl.br_ne      = (opc == OP_BNE);
        ctrl.alu_op     = ALU_SUB;
      end
      OP_J: begin
        ctrl.valid   = 1'b1;
        ctrl.is_jump = 1'b1;
        ctrl.target  = {6'b0, instr[25:0]};
      end
      default: ctrl = '0;
    endcase
    if (ctrl.rd == '0) ctrl.res = RES_NONE;
  end
endmodule
