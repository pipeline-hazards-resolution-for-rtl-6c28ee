// id_hazard_fsm: data-hazard controller of the ID stage.
//
// Only an instruction that needs a register in ID itself (a RegID consumer,
// here JR, whose jump address is the register value) is concerned. Six
// hazards can reach it. Three need waiting cycles, recognised in state S0
// by the conditions
//   C1: the instruction one ahead (in EXE) is a ResEXE producer of rs
//       (ResEXE_RegID_i+1: 1 stall, then read the MEM-stage bypass),
//   C2: the instruction one ahead (in EXE) is a ResMEM producer of rs
//       (ResMEM_RegID_i+1: 2 stalls, then read the WB-stage bypass),
//   C3: the instruction two ahead (in MEM) is a ResMEM producer of rs
//       (ResMEM_RegID_i+2: 1 stall, then read the WB-stage bypass).
// The other three (ResEXE_RegID_i+2, ResEXE_RegID_i+3, ResMEM_RegID_i+3)
// are read at once from the MEM-stage or WB-stage bypass.
//
// States: S0 default (immediate read, or first waiting cycle), S1 read
// after one wait for C1, S2A second wait for C2, S2B read for C2, S3 read
// after one wait for C3. In S0 and S2A `stall` is raised: the instruction
// stays in ID and a bubble goes to EXE. `advance` low (the EXE stage is
// holding the whole front end) freezes the state; `flush` (the ID
// instruction is discarded by a branch redirection) returns to S0. `sel`
// is the ID operand multiplexer control. Outputs are combinational from
// the state and the inputs; the state changes on the rising clock edge.
// States, conditions and stall counts follow the design description; the
// use of the FSM for JR and the freeze/flush inputs are this design's.
module id_hazard_fsm (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 advance,
  input  logic                 flush,
  // consumer in ID
  input  logic                 id_valid,
  input  logic                 id_use_rs,
  input  rpp_pkg::reg_t        id_rs,
  // instruction in EXE (i-1), MEM (i-2) and WB (i-3)
  input  rpp_pkg::res_class_e  ex_res,
  input  rpp_pkg::reg_t        ex_rd,
  input  rpp_pkg::res_class_e  mem_res,
  input  rpp_pkg::reg_t        mem_rd,
  input  rpp_pkg::res_class_e  wb_res,
  input  rpp_pkg::reg_t        wb_rd,
  output logic                 stall,
  output rpp_pkg::id_src_e     sel,
  output logic                 enter_s1,
  output logic                 enter_s2a,
  output logic                 enter_s3
);
  import rpp_pkg::*;
  typedef enum logic [2:0] {S0, S1, S2A, S2B, S3} state_e;
  state_e state, state_n;

  logic cons, c1, c2, c3;
  assign cons = id_valid && id_use_rs && (id_rs != '0);
  assign c1   = cons && (ex_res == RES_EXE) && (ex_rd == id_rs);
  assign c2   = cons && (ex_res == RES_MEM) && (ex_rd == id_rs);
  assign c3   = cons && !c1 && !c2 && (mem_res == RES_MEM) && (mem_rd == id_rs);

  always_comb begin
    state_n = state;
    stall   = 1'b0;
    sel     = IDSRC_RF;
    unique case (state)
      S0: begin
        if (c1)      begin stall = 1'b1; state_n = S1;  end
        else if (c2) begin stall = 1'b1; state_n = S2A; end
        else if (c3) begin stall = 1'b1; state_n = S3;  end
        else if (mem_res == RES_EXE && mem_rd == id_rs && id_rs != '0) sel = IDSRC_MEM;
        else if (wb_res != RES_NONE && wb_rd == id_rs && id_rs != '0)  sel = IDSRC_WB;
      end
      S1:  begin sel = IDSRC_MEM; state_n = S0; end
      S2A: begin stall = 1'b1;    state_n = S2B; end
      S2B: begin sel = IDSRC_WB;  state_n = S0; end
      S3:  begin sel = IDSRC_WB;  state_n = S0; end
      default: state_n = S0;
    endcase
  end

  assign enter_s1  = advance && !flush && (state == S0) && c1;
  assign enter_s2a = advance && !flush && (state == S0) && c2;
  assign enter_s3  = advance && !flush && (state == S0) && c3;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) state <= S0;
    else if (advance)    state <= state_n;
  end
endmodule
