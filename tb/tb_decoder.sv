// tb_decoder: encodes one instruction of every kind with random fields
// and checks the decoded control word: producer class and destination,
// consumer flags, ALU operation and operand choice, immediate extension,
// branch/jump targets and memory controls. Expected values are written
// here per instruction kind.
`timescale 1ns/1ps
module tb_decoder;
  import rpp_pkg::*;
  import rpp_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decoder dut (.instr, .ctrl(c));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (instr %h)", s, instr); end
  endtask

  initial begin
    int rs, rt, rd, sh, imm;
    // the two words of the data-hazard example
    instr = 32'h8C430000; #1;
    chk(c.valid && c.res == RES_MEM && c.rd == 3 && c.rs == 2 && c.mem_read && c.use_rs_exe, "LW R3,0(R2)");
    instr = 32'h00432021; #1;
    chk(c.valid && c.res == RES_EXE && c.rd == 4 && c.alu_op == ALU_ADD && c.use_rs_exe && c.use_rt_exe && !c.alu_imm, "ADDU R4,R2,R3");
    instr = 32'h14404000; #1;
    chk(c.is_branch && c.br_ne && c.target == 32'h4000 && c.res == RES_NONE, "BNEZ R2,0x4000");
    instr = 32'h0; #1;
    chk(c.res == RES_NONE, "all-zero word writes nothing");
    for (int k = 0; k < 400; k++) begin
      rs = $urandom_range(1, 31); rt = $urandom_range(1, 31); rd = $urandom_range(1, 31);
      sh = $urandom_range(0, 31); imm = $urandom_range(0, 65535);
      instr = i_subu(rd, rs, rt); #1;
      chk(c.valid && c.res == RES_EXE && c.rd == 5'(rd) && c.alu_op == ALU_SUB && c.use_rs_exe && c.use_rt_exe, "SUBU");
      instr = i_sra(rd, rt, sh); #1;
      chk(c.res == RES_EXE && c.alu_op == ALU_SRA && c.shamt_op && c.imm == 32'(sh) && !c.use_rs_exe && c.use_rt_exe, "SRA");
      instr = i_srav(rd, rt, rs); #1;
      chk(c.alu_op == ALU_SRA && !c.shamt_op && c.use_rs_exe && c.use_rt_exe, "SRAV");
      instr = i_slt(rd, rs, rt); #1;   chk(c.alu_op == ALU_SLT, "SLT");
      instr = i_nor(rd, rs, rt); #1;   chk(c.alu_op == ALU_NOR, "NOR");
      instr = i_addiu(rt, rs, imm); #1;
      chk(c.res == RES_EXE && c.rd == 5'(rt) && c.alu_imm && c.imm == {{16{imm[15]}}, 16'(imm)} && c.use_rs_exe && !c.use_rt_exe, "ADDIU sign-extends");
      instr = i_ori(rt, rs, imm); #1;
      chk(c.alu_op == ALU_OR && c.imm == 32'(imm) && c.alu_imm, "ORI zero-extends");
      instr = i_sltiu(rt, rs, imm); #1; chk(c.alu_op == ALU_SLTU && c.alu_imm, "SLTIU");
      instr = i_lui(rt, imm); #1;
      chk(c.alu_op == ALU_LUI && !c.use_rs_exe && c.rd == 5'(rt), "LUI");
      instr = i_lw(rt, imm, rs); #1;
      chk(c.res == RES_MEM && c.mem_read && !c.mem_write && c.rd == 5'(rt) && c.alu_op == ALU_ADD, "LW");
      instr = i_sw(rt, imm, rs); #1;
      chk(c.res == RES_NONE && c.mem_write && c.use_rt_mem && !c.use_rt_exe && c.use_rs_exe, "SW");
      instr = i_beq(rs, rt, 32'(imm)); #1;
      chk(c.is_branch && !c.br_ne && c.target == 32'(imm) && c.use_rs_exe && c.use_rt_exe && c.res == RES_NONE, "BEQ");
      instr = i_j(32'(imm) << 4); #1;
      chk(c.is_jump && c.target == ((32'(imm) << 4) & 32'h03FF_FFFF) && c.res == RES_NONE && !c.use_rs_exe, "J");
      instr = i_jr(rs); #1;
      chk(c.is_jr && c.use_rs_id && !c.use_rs_exe && c.rs == 5'(rs) && c.res == RES_NONE, "JR");
      instr = i_addu(0, rs, rt); #1;
      chk(c.res == RES_NONE, "write to R0 is no producer");
      instr = {6'h3F, 26'($urandom)}; #1;
      chk(!c.valid && c.res == RES_NONE && !c.mem_write, "unknown opcode is a no-op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
