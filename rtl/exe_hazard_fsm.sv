// exe_hazard_fsm: data-hazard controller of the EXE stage.
//
// Drives the two EXE-stage operand multiplexers, S_OP1 (rs) and S_OP2
// (rt), whose inputs are: 0 the value carried from ID, 1 the bypass from
// the MEM stage (result of the instruction one ahead), 2 the bypass from
// the WB stage (two ahead) and 3 the additional register, which keeps the
// result written to the register bank in the previous cycle (three ahead;
// the instruction read the bank in that same cycle and got the old value).
// The nearest producer wins.
//
// Of the six hazards with a consumer in EXE only ResMEM_RegEXE_i+1 (a load
// directly ahead) needs a waiting cycle. The two-state FSM detects it in
// S0 with condition C: the EXE instruction reads rs (one or two operands)
// or rt (two operands) equal to the destination of the ResMEM instruction
// in MEM. It then raises `stall` (EXE and the stages before it hold, a
// bubble goes to MEM) and moves to S1, where the operand is taken from the
// WB bypass and the instruction proceeds. Outputs are combinational; the
// state changes on the rising clock edge.
// The states, condition C and the 0..3 input numbering follow the design
// description; the stage-based priority of the bypasses is this design's.
module exe_hazard_fsm (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ex_valid,
  input  logic                 ex_use_rs,
  input  logic                 ex_use_rt,
  input  rpp_pkg::reg_t        ex_rs,
  input  rpp_pkg::reg_t        ex_rt,
  input  rpp_pkg::res_class_e  mem_res,
  input  rpp_pkg::reg_t        mem_rd,
  input  rpp_pkg::res_class_e  wb_res,
  input  rpp_pkg::reg_t        wb_rd,
  input  logic                 add_valid,
  input  rpp_pkg::reg_t        add_rd,
  output logic                 stall,
  output rpp_pkg::op_src_e     s_op1,
  output rpp_pkg::op_src_e     s_op2,
  output logic                 in_s1
);
  import rpp_pkg::*;
  typedef enum logic {S0, S1} state_e;
  state_e state;

  function automatic op_src_e pick(input reg_t r, input res_class_e mres, input reg_t mrd,
                                   input res_class_e wres, input reg_t wrd,
                                   input logic av, input reg_t ard);
    if (r == '0)                          return SRC_ID;
    if (mres != RES_NONE && mrd == r)     return SRC_MEM;
    if (wres != RES_NONE && wrd == r)     return SRC_WB;
    if (av && ard == r)                   return SRC_ADD;
    return SRC_ID;
  endfunction

  logic c;
  assign c = ex_valid && (mem_res == RES_MEM) && (mem_rd != '0) &&
             ((ex_use_rs && ex_rs == mem_rd) || (ex_use_rt && ex_rt == mem_rd));

  assign s_op1 = pick(ex_rs, mem_res, mem_rd, wb_res, wb_rd, add_valid, add_rd);
  assign s_op2 = pick(ex_rt, mem_res, mem_rd, wb_res, wb_rd, add_valid, add_rd);
  assign stall = (state == S0) && c;
  assign in_s1 = (state == S1);

  always_ff @(posedge clk) begin
    if (!rst_n)              state <= S0;
    else if (state == S0)    state <= c ? S1 : S0;
    else                     state <= S0;
  end
endmodule
