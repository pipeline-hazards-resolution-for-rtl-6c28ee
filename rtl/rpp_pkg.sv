// rpp_pkg: shared types and constants of the five-stage pipelined 32-bit
// RISC processor.
//
// The instruction word is 32 bits in three formats (R, I, J). The field
// layout and the opcode/function numbers follow the MIPS-style encodings
// visible in the reference waveforms (0x24020008 = ADDI R2,R0,8;
// 0x14404000 = BNEZ R2; 0x8C430000 = LW R3,0(R2); 0x00432021 =
// ADDU R4,R2,R3); the remaining opcodes of the subset are this design's
// choice from the same family.
//
// Hazard vocabulary used throughout the design:
//   producer class  RES_EXE  result computed in EXE (ALU instructions)
//                   RES_MEM  result produced in MEM (loads)
//   consumer class  RegID    register needed in ID  (JR target)
//                   RegEXE   register needed in EXE (ALU operands,
//                            branch compare, address base)
//                   RegMEM   register needed in MEM (store data)
package rpp_pkg;

  localparam int XLEN = 32;
  localparam int NREG = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_t;

  // Primary opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-format function codes (instr[5:0])
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SLTU = 6'h2B;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  // One page of the look-up-table ALU: the truth table of one operation,
  // applied to every bit position i as a function of (a[i], b[i], c[i]),
  // where c[i] is the carry out of bit i-1 and c[0] = cin. The table index
  // is {a[i], b[i], c[i]}.
  localparam int LUT_PAGES = 6;
  typedef struct packed {
    logic       cin;      // carry into bit 0
    logic [7:0] cout_tt;  // carry out of a bit position
    logic [7:0] res_tt;   // result bit
  } lut_page_t;

  // Producer class of an instruction: where its register result appears.
  typedef enum logic [1:0] {
    RES_NONE = 2'd0,
    RES_EXE  = 2'd1,
    RES_MEM  = 2'd2
  } res_class_e;

  // Operand source of the EXE-stage input multiplexers (S_OP1 / S_OP2).
  typedef enum logic [1:0] {
    SRC_ID  = 2'd0,   // value carried from the ID stage (register bank)
    SRC_MEM = 2'd1,   // bypass from the MEM stage (EX/MEM result)
    SRC_WB  = 2'd2,   // bypass from the WB stage (MEM/WB result)
    SRC_ADD = 2'd3    // additional register (result written back last cycle)
  } op_src_e;

  // Operand source of the ID-stage input multiplexer (JR target).
  typedef enum logic [1:0] {
    IDSRC_RF  = 2'd0, // register bank
    IDSRC_MEM = 2'd1, // bypass from the MEM stage
    IDSRC_WB  = 2'd2  // bypass from the WB stage
  } id_src_e;

  // Decoded control word.
  typedef struct packed {
    logic       valid;      // a real instruction (not a bubble / unknown)
    res_class_e res;        // producer class
    reg_t       rd;         // destination register (0: none)
    reg_t       rs;
    reg_t       rt;
    logic       use_rs_id;  // RegID consumer of rs (JR)
    logic       use_rs_exe; // RegEXE consumer of rs
    logic       use_rt_exe; // RegEXE consumer of rt
    logic       use_rt_mem; // RegMEM consumer of rt (store data)
    alu_op_e    alu_op;
    logic       alu_imm;    // second ALU operand is the immediate
    logic       shamt_op;   // first ALU operand is the shift amount field
    word_t      imm;        // extended immediate
    logic       is_branch;  // conditional branch (BEQ/BNE), decided in EXE
    logic       br_ne;      // BNE
    logic       is_jump;    // J, target known in ID
    logic       is_jr;      // JR, target read in ID
    word_t      target;     // branch / jump target address (not JR)
    logic       mem_read;
    logic       mem_write;
  } ctrl_t;

  // Per-cycle event flags of the pipeline, brought out for observation.
  typedef struct packed {
    logic retire;          // an instruction left WB
    logic id_c1;           // ID FSM entered S1 (ResEXE_RegID_i+1)
    logic id_c2;           // ID FSM entered S2a (ResMEM_RegID_i+1)
    logic id_c3;           // ID FSM entered S3 (ResMEM_RegID_i+2)
    logic id_stall;        // ID stage inserted a bubble
    logic id_byp_mem;      // ID read its operand from the MEM bypass
    logic id_byp_wb;       // ID read its operand from the WB bypass
    logic exe_stall;       // EXE stage inserted a bubble (S0 -> S1)
    logic exe_byp_mem;     // an EXE operand came from the MEM bypass
    logic exe_byp_wb;      // an EXE operand came from the WB bypass
    logic exe_byp_add;     // an EXE operand came from the additional register
    logic mem_byp_wb;      // store data taken from the WB bypass in MEM
    logic pred_taken;      // IF followed a taken prediction from the BTB
    logic id_redirect;     // J / JR redirected the fetch from ID
    logic mispredict;      // EXE found a wrong prediction and flushed
    logic br_correct;      // EXE found a correct prediction of a branch
  } events_t;

endpackage
