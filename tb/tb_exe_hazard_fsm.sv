// tb_exe_hazard_fsm: random stage contents for the EXE-stage controller,
// compared with a model of the selection rule (nearest producer first:
// MEM = 1, WB = 2, additional register = 3, else 0) and of condition C
// (a used operand produced by a load in MEM stalls exactly one cycle, after
// which the FSM is in S1 and does not stall again). Also the three cycles
// of the load/use example: S_OP1 = 1 for LW, then 2 with a stall, then the
// loaded operand from input 2.
`timescale 1ns/1ps
module tb_exe_hazard_fsm;
  import rpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ex_valid = 0, ex_use_rs = 0, ex_use_rt = 0, add_valid = 0;
  reg_t ex_rs = 0, ex_rt = 0, mem_rd = 0, wb_rd = 0, add_rd = 0;
  res_class_e mem_res = RES_NONE, wb_res = RES_NONE;
  logic stall, in_s1;
  op_src_e s1, s2;
  int checks = 0, failures = 0;

  exe_hazard_fsm dut (.clk, .rst_n, .ex_valid, .ex_use_rs, .ex_use_rt, .ex_rs, .ex_rt,
                      .mem_res, .mem_rd, .wb_res, .wb_rd, .add_valid, .add_rd,
                      .stall, .s_op1(s1), .s_op2(s2), .in_s1);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic op_src_e model_sel(reg_t r);
    if (r == 0) return SRC_ID;
    if (mem_res != RES_NONE && mem_rd == r) return SRC_MEM;
    if (wb_res != RES_NONE && wb_rd == r) return SRC_WB;
    if (add_valid && add_rd == r) return SRC_ADD;
    return SRC_ID;
  endfunction

  initial begin
    bit mstate, c;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // load/use example: ADDI R2; LW R3,0(R2); ADDU R4,R2,R3
    ex_valid = 1; ex_use_rs = 1; ex_use_rt = 0; ex_rs = 2; ex_rt = 3;
    mem_res = RES_EXE; mem_rd = 2; #1;
    chk(s1 == SRC_MEM && !stall, "LW: S_OP1 = 1");
    @(posedge clk); @(negedge clk);
    ex_use_rt = 1; mem_res = RES_MEM; mem_rd = 3; wb_res = RES_EXE; wb_rd = 2; #1;
    chk(s1 == SRC_WB && stall, "ADDU: S_OP1 = 2 and one stall");
    @(posedge clk); @(negedge clk);
    mem_res = RES_NONE; wb_res = RES_MEM; wb_rd = 3; add_valid = 1; add_rd = 2; #1;
    chk(in_s1 && !stall && s2 == SRC_WB && s1 == SRC_ADD, "ADDU after stall: S_OP2 from WB, S_OP1 from additional register");
    @(posedge clk);
    mstate = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ex_valid = $urandom_range(0, 7) != 0;
      ex_use_rs = $urandom_range(0, 1); ex_use_rt = $urandom_range(0, 1);
      ex_rs = 5'($urandom_range(0, 4)); ex_rt = 5'($urandom_range(0, 4));
      mem_res = res_class_e'($urandom_range(0, 2)); mem_rd = 5'($urandom_range(1, 4));
      wb_res = res_class_e'($urandom_range(0, 2)); wb_rd = 5'($urandom_range(1, 4));
      add_valid = $urandom_range(0, 1); add_rd = 5'($urandom_range(1, 4));
      #1;
      c = ex_valid && mem_res == RES_MEM &&
          ((ex_use_rs && ex_rs == mem_rd) || (ex_use_rt && ex_rt == mem_rd));
      chk(s1 == model_sel(ex_rs), "S_OP1");
      chk(s2 == model_sel(ex_rt), "S_OP2");
      chk(stall == (!mstate && c), "stall = S0 and C");
      chk(in_s1 == mstate, "state");
      mstate = !mstate && c;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
