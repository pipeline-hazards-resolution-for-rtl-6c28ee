// rpp_top: five-stage pipelined 32-bit RISC processor with hazard control.
//
// Stages: IF (fetch, branch prediction), ID (decode, register bank read,
// J/JR resolution), EXE (ALU, branch decision), MEM (data memory), WB
// (register bank write). Instruction and data memories are separate
// (Harvard), so there is no structural hazard.
//
// Control hazards. The IF stage looks the fetch address up in the
// branch-target buffer (btb); a line whose 2-bit counter predicts taken
// sends the fetch to the stored jump address. A J (target in the word) or
// JR (target in a register) is resolved in ID: if the fetch did not already
// go there, the fetch is redirected and the one wrong instruction behind it
// is dropped. A conditional branch is decided in EXE; on a wrong direction
// or target the fetch is redirected and the two wrong instructions in IF/ID
// and ID/EX are neutralised. Every branch and J that reaches EXE updates or
// allocates its BTB line.
//
// Data hazards. Producers are ResEXE (ALU) or ResMEM (load); consumers use
// a register in ID (JR), EXE (operands) or MEM (store data). Bypasses bring
// results back from the MEM stage (EX/MEM), the WB stage (MEM/WB) and an
// additional register that keeps the value written to the bank in the
// previous cycle (the bank itself has no write-to-read forwarding). The ID
// controller (id_hazard_fsm) inserts 1 or 2 bubbles for JR, the EXE
// controller (exe_hazard_fsm) inserts 1 bubble for a load directly followed
// by its consumer, and MEM only sets its store-data multiplexer
// (mem_bypass_ctrl). While EXE holds an instruction, the bypassed operand
// values are written back into ID/EX so that none is lost while waiting.
//
// Interface: the program is written through prog_* (any time, typically
// during reset); dm_ext_* preloads and inspects the data memory; dbg_reg_*
// reads a register; alu_pg_* rewrites one truth-table page of the ALU
// (used by instructions in EXE from the next cycle; reset restores the
// standard pages); `events` flags per cycle which mechanism acted;
// retire_valid/retire_pc report the instruction leaving WB. Synchronous
// active-low reset; fetch starts at RESET_PC one cycle after reset.
// The stages, bypass sources, stall counts and predictor follow the design
// description; the exact instruction subset, the JR/J resolution in ID, the
// hold-time operand refresh and all sizes are this design's choices.
module rpp_top #(
  parameter logic [31:0] RESET_PC    = 32'h0000_4000,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 1024,
  parameter int unsigned BTB_ENTRIES = 16,
  parameter int unsigned CNT_W       = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // program loading
  input  logic               prog_we,
  input  logic [31:0]        prog_addr,
  input  logic [31:0]        prog_data,
  // data memory preload / inspection
  input  logic               dm_ext_we,
  input  logic [31:0]        dm_ext_addr,
  input  logic [31:0]        dm_ext_wdata,
  output logic [31:0]        dm_ext_rdata,
  // register inspection
  input  logic [4:0]         dbg_reg_addr,
  output logic [31:0]        dbg_reg_data,
  // observation
  output rpp_pkg::events_t   events,
  output logic               retire_valid,
  output logic [31:0]        retire_pc,
  output logic [31:0]        if_pc,
  output logic [CNT_W-1:0]   if_pred_cnt,
  output rpp_pkg::op_src_e   exe_s_op1,
  output rpp_pkg::op_src_e   exe_s_op2,
  output logic [31:0]        exe_result,
  // ALU look-up-table page rewrite
  input  logic               alu_pg_we,
  input  logic [2:0]         alu_pg_sel,
  input  rpp_pkg::lut_page_t alu_pg_data
);
  import rpp_pkg::*;

  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t instr;
    logic  pred_taken;
    word_t pred_target;
  } fd_t;

  typedef struct packed {
    logic  valid;
    word_t pc;
    ctrl_t ctrl;
    word_t rs_val;
    word_t rt_val;
    logic  pred_taken;
    word_t pred_target;
  } de_t;

  typedef struct packed {
    logic       valid;
    word_t      pc;
    res_class_e res;
    reg_t       rd;
    reg_t       rt;
    logic       use_rt_mem;
    logic       mem_read;
    logic       mem_write;
    word_t      alu_res;
    word_t      st_data;
  } xm_t;

  typedef struct packed {
    logic       valid;
    word_t      pc;
    res_class_e res;
    reg_t       rd;
    word_t      result;
  } mw_t;

  typedef struct packed {
    logic  valid;
    reg_t  rd;
    word_t value;
  } add_t;

  word_t pc;
  fd_t   fd;
  de_t   de;
  xm_t   xm;
  mw_t   mw;
  add_t  addr_q;   // the additional register

  // ---------------------------------------------------------------- IF
  word_t if_instr, pc_plus4, pred_next;
  logic  lk_hit, lk_taken;
  word_t lk_target;

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk   (clk),
    .addr  (pc),
    .rdata (if_instr),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data)
  );

  logic  bt_up_en, bt_up_taken;
  word_t bt_up_pc, bt_up_target;

  btb #(.ENTRIES(BTB_ENTRIES), .CNT_W(CNT_W)) u_btb (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_pc     (pc),
    .lk_hit    (lk_hit),
    .lk_taken  (lk_taken),
    .lk_target (lk_target),
    .lk_cnt    (if_pred_cnt),
    .up_en     (bt_up_en),
    .up_pc     (bt_up_pc),
    .up_target (bt_up_target),
    .up_taken  (bt_up_taken)
  );

  assign pc_plus4  = pc + 32'd4;
  assign pred_next = lk_taken ? lk_target : pc_plus4;
  assign if_pc     = pc;

  // ---------------------------------------------------------------- ID
  ctrl_t id_ctrl_raw, id_ctrl;
  word_t rf_rd1, rf_rd2, id_jr_val, id_target;
  logic  id_stall_raw, id_redirect;
  id_src_e id_sel;
  logic  id_e1, id_e2, id_e3;

  // forward declarations of later-stage signals used here
  logic  exe_stall, ex_redirect;
  word_t ex_next_pc;
  word_t wb_result;
  logic  wb_we;

  decoder u_dec (.instr(fd.instr), .ctrl(id_ctrl_raw));

  always_comb begin
    id_ctrl = id_ctrl_raw;
    if (!fd.valid) id_ctrl = '0;
  end

  regfile u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .ra1      (id_ctrl_raw.rs),
    .rd1      (rf_rd1),
    .ra2      (id_ctrl_raw.rt),
    .rd2      (rf_rd2),
    .we       (wb_we),
    .wa       (mw.rd),
    .wd       (wb_result),
    .dbg_addr (dbg_reg_addr),
    .dbg_data (dbg_reg_data)
  );

  id_hazard_fsm u_idfsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .advance   (!exe_stall),
    .flush     (ex_redirect),
    .id_valid  (id_ctrl.valid),
    .id_use_rs (id_ctrl.use_rs_id),
    .id_rs     (id_ctrl.rs),
    .ex_res    (de.valid ? de.ctrl.res : RES_NONE),
    .ex_rd     (de.ctrl.rd),
    .mem_res   (xm.valid ? xm.res : RES_NONE),
    .mem_rd    (xm.rd),
    .wb_res    (mw.valid ? mw.res : RES_NONE),
    .wb_rd     (mw.rd),
    .stall     (id_stall_raw),
    .sel       (id_sel),
    .enter_s1  (id_e1),
    .enter_s2a (id_e2),
    .enter_s3  (id_e3)
  );

  always_comb begin
    unique case (id_sel)
      IDSRC_MEM: id_jr_val = xm.alu_res;
      IDSRC_WB:  id_jr_val = wb_result;
      default:   id_jr_val = rf_rd1;
    endcase
  end

  logic id_stall;
  assign id_stall    = id_stall_raw && !exe_stall && !ex_redirect;
  assign id_target   = id_ctrl.is_jr ? id_jr_val : id_ctrl.target;
  assign id_redirect = (id_ctrl.is_jump || id_ctrl.is_jr) && !id_stall_raw &&
                       !exe_stall && !ex_redirect &&
                       !(fd.pred_taken && fd.pred_target == id_target);

  // ---------------------------------------------------------------- EXE
  op_src_e s_op1, s_op2;
  logic    exe_in_s1;
  word_t   ex_rs_v, ex_rt_v, alu_a, alu_b, alu_y;
  logic    ex_taken, ex_mispredict;

  exe_hazard_fsm u_exfsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .ex_valid  (de.valid),
    .ex_use_rs (de.ctrl.use_rs_exe),
    .ex_use_rt (de.ctrl.use_rt_exe),
    .ex_rs     (de.ctrl.rs),
    .ex_rt     (de.ctrl.rt),
    .mem_res   (xm.valid ? xm.res : RES_NONE),
    .mem_rd    (xm.rd),
    .wb_res    (mw.valid ? mw.res : RES_NONE),
    .wb_rd     (mw.rd),
    .add_valid (addr_q.valid),
    .add_rd    (addr_q.rd),
    .stall     (exe_stall),
    .s_op1     (s_op1),
    .s_op2     (s_op2),
    .in_s1     (exe_in_s1)
  );

  function automatic word_t opmux(input op_src_e s, input word_t id_v, input word_t m_v,
                                  input word_t w_v, input word_t a_v);
    unique case (s)
      SRC_MEM: return m_v;
      SRC_WB:  return w_v;
      SRC_ADD: return a_v;
      default: return id_v;
    endcase
  endfunction

  assign ex_rs_v = opmux(s_op1, de.rs_val, xm.alu_res, wb_result, addr_q.value);
  assign ex_rt_v = opmux(s_op2, de.rt_val, xm.alu_res, wb_result, addr_q.value);
  assign alu_a   = de.ctrl.shamt_op ? de.ctrl.imm : ex_rs_v;
  assign alu_b   = de.ctrl.alu_imm  ? de.ctrl.imm : ex_rt_v;

  alu u_alu (
    .clk     (clk),
    .rst_n   (rst_n),
    .pg_we   (alu_pg_we),
    .pg_sel  (alu_pg_sel),
    .pg_data (alu_pg_data),
    .op      (de.ctrl.alu_op),
    .a       (alu_a),
    .b       (alu_b),
    .y       (alu_y)
  );

  assign ex_taken = de.ctrl.is_branch && ((ex_rs_v == ex_rt_v) ^ de.ctrl.br_ne);

  always_comb begin
    ex_mispredict = 1'b0;
    ex_next_pc    = de.pc + 32'd4;
    if (de.ctrl.is_branch) begin
      ex_next_pc    = ex_taken ? de.ctrl.target : de.pc + 32'd4;
      ex_mispredict = (ex_taken != de.pred_taken) ||
                      (ex_taken && de.pred_target != de.ctrl.target);
    end else if (!(de.ctrl.is_jump || de.ctrl.is_jr)) begin
      // a non-branch that the predictor sent elsewhere
      ex_mispredict = de.pred_taken;
    end
  end

  assign ex_redirect  = de.valid && !exe_stall && ex_mispredict;
  assign bt_up_en     = de.valid && !exe_stall && (de.ctrl.is_branch || de.ctrl.is_jump);
  assign bt_up_pc     = de.pc;
  assign bt_up_target = de.ctrl.target;
  assign bt_up_taken  = de.ctrl.is_jump || ex_taken;

  assign exe_s_op1  = s_op1;
  assign exe_s_op2  = s_op2;
  assign exe_result = alu_y;

  // ---------------------------------------------------------------- MEM
  logic  mem_sel;
  word_t mem_st_data, dm_rdata, mem_result;

  mem_bypass_ctrl u_memctl (
    .mem_valid  (xm.valid),
    .mem_use_rt (xm.use_rt_mem),
    .mem_rt     (xm.rt),
    .wb_res     (mw.valid ? mw.res : RES_NONE),
    .wb_rd      (mw.rd),
    .sel        (mem_sel)
  );

  assign mem_st_data = mem_sel ? wb_result : xm.st_data;

  dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk       (clk),
    .addr      (xm.alu_res),
    .rdata     (dm_rdata),
    .we        (xm.valid && xm.mem_write),
    .wdata     (mem_st_data),
    .ext_we    (dm_ext_we),
    .ext_addr  (dm_ext_addr),
    .ext_wdata (dm_ext_wdata),
    .ext_rdata (dm_ext_rdata)
  );

  assign mem_result = xm.mem_read ? dm_rdata : xm.alu_res;

  // ---------------------------------------------------------------- WB
  assign wb_result    = mw.result;
  assign wb_we        = mw.valid && (mw.res != RES_NONE);
  assign retire_valid = mw.valid;
  assign retire_pc    = mw.pc;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc     <= RESET_PC;
      fd     <= '0;
      de     <= '0;
      xm     <= '0;
      mw     <= '0;
      addr_q <= '0;
    end else begin
      // WB -> additional register
      addr_q.valid <= wb_we;
      addr_q.rd    <= mw.rd;
      addr_q.value <= wb_result;

      // MEM -> WB
      mw.valid  <= xm.valid;
      mw.pc     <= xm.pc;
      mw.res    <= xm.valid ? xm.res : RES_NONE;
      mw.rd     <= xm.rd;
      mw.result <= mem_result;

      // EXE -> MEM
      if (exe_stall) begin
        xm <= '0;
      end else begin
        xm.valid      <= de.valid;
        xm.pc         <= de.pc;
        xm.res        <= de.valid ? de.ctrl.res : RES_NONE;
        xm.rd         <= de.ctrl.rd;
        xm.rt         <= de.ctrl.rt;
        xm.use_rt_mem <= de.ctrl.use_rt_mem;
        xm.mem_read   <= de.valid && de.ctrl.mem_read;
        xm.mem_write  <= de.valid && de.ctrl.mem_write;
        xm.alu_res    <= alu_y;
        xm.st_data    <= ex_rt_v;
      end

      // front end
      if (ex_redirect) begin
        pc <= ex_next_pc;
        fd <= '0;
        de <= '0;
      end else if (exe_stall) begin
        // hold IF, ID and EXE; keep the bypassed operands of EXE
        de.rs_val <= ex_rs_v;
        de.rt_val <= ex_rt_v;
      end else begin
        // ID -> EXE
        if (id_stall) begin
          de <= '0;
        end else begin
          de.valid       <= id_ctrl.valid;
          de.pc          <= fd.pc;
          de.ctrl        <= id_ctrl;
          de.rs_val      <= rf_rd1;
          de.rt_val      <= rf_rd2;
          de.pred_taken  <= id_redirect ? 1'b1 : fd.pred_taken;
          de.pred_target <= id_redirect ? id_target : fd.pred_target;
        end
        // IF -> ID
        if (id_redirect) begin
          pc <= id_target;
          fd <= '0;
        end else if (!id_stall) begin
          pc             <= pred_next;
          fd.valid       <= 1'b1;
          fd.pc          <= pc;
          fd.instr       <= if_instr;
          fd.pred_taken  <= lk_taken;
          fd.pred_target <= lk_target;
        end
      end
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    events             = '0;
    events.retire      = mw.valid;
    events.id_c1       = id_e1;
    events.id_c2       = id_e2;
    events.id_c3       = id_e3;
    events.id_stall    = id_stall;
    events.id_byp_mem  = id_ctrl.use_rs_id && !id_stall_raw && !exe_stall && id_sel == IDSRC_MEM;
    events.id_byp_wb   = id_ctrl.use_rs_id && !id_stall_raw && !exe_stall && id_sel == IDSRC_WB;
    events.exe_stall   = exe_stall;
    events.exe_byp_mem = de.valid && !exe_stall &&
                         ((de.ctrl.use_rs_exe && s_op1 == SRC_MEM) || (de.ctrl.use_rt_exe && s_op2 == SRC_MEM));
    events.exe_byp_wb  = de.valid && !exe_stall &&
                         ((de.ctrl.use_rs_exe && s_op1 == SRC_WB) || (de.ctrl.use_rt_exe && s_op2 == SRC_WB));
    events.exe_byp_add = de.valid && !exe_stall &&
                         ((de.ctrl.use_rs_exe && s_op1 == SRC_ADD) || (de.ctrl.use_rt_exe && s_op2 == SRC_ADD));
    events.mem_byp_wb  = mem_sel;
    events.pred_taken  = lk_taken && !ex_redirect && !id_redirect && !exe_stall && !id_stall;
    events.id_redirect = id_redirect;
    events.mispredict  = ex_redirect;
    events.br_correct  = de.valid && !exe_stall && de.ctrl.is_branch && !ex_mispredict;
  end

  // An instruction never both stalls in ID and is redirected from ID.
  assert property (@(posedge clk) disable iff (!rst_n) !(id_stall && id_redirect));
  // EXE never redirects while it is waiting for an operand.
  assert property (@(posedge clk) disable iff (!rst_n) !(exe_stall && ex_redirect));
  // The EXE controller never waits twice for the same load.
  assert property (@(posedge clk) disable iff (!rst_n) exe_in_s1 |-> !exe_stall);
  // A taken prediction only comes from a line that holds the fetch address.
  assert property (@(posedge clk) disable iff (!rst_n) lk_taken |-> lk_hit);
endmodule
