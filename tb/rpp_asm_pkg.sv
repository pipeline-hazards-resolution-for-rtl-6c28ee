// rpp_asm_pkg: instruction encoders and a sequential reference model of the
// processor's instruction set, for the testbenches.
//
// The encoders build 32-bit instruction words field by field (R: op rs rt
// rd shamt funct, I: op rs rt imm16, J: op target26). The reference model
// executes a program one instruction at a time, with no pipeline, so its
// register and memory state after a program is an independent expectation
// for the pipelined design: branch targets are the 16-bit immediate as an
// absolute byte address, J targets the 26-bit field, JR the register value;
// R0 is always zero; memory is word addressed by address bits [11:2].
package rpp_asm_pkg;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] enc_r(input int rs, input int rt, input int rd,
                                        input int sh, input logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rs, input int rt,
                                        input logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] i_addu(int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h21); endfunction
  function automatic logic [31:0] i_subu(int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h23); endfunction
  function automatic logic [31:0] i_and (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h24); endfunction
  function automatic logic [31:0] i_or  (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h25); endfunction
  function automatic logic [31:0] i_xor (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h26); endfunction
  function automatic logic [31:0] i_nor (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h27); endfunction
  function automatic logic [31:0] i_slt (int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h2A); endfunction
  function automatic logic [31:0] i_sltu(int rd, int rs, int rt); return enc_r(rs, rt, rd, 0, 6'h2B); endfunction
  function automatic logic [31:0] i_sllv(int rd, int rt, int rs); return enc_r(rs, rt, rd, 0, 6'h04); endfunction
  function automatic logic [31:0] i_srav(int rd, int rt, int rs); return enc_r(rs, rt, rd, 0, 6'h07); endfunction
  function automatic logic [31:0] i_sll (int rd, int rt, int sh); return enc_r(0, rt, rd, sh, 6'h00); endfunction
  function automatic logic [31:0] i_srl (int rd, int rt, int sh); return enc_r(0, rt, rd, sh, 6'h02); endfunction
  function automatic logic [31:0] i_sra (int rd, int rt, int sh); return enc_r(0, rt, rd, sh, 6'h03); endfunction
  function automatic logic [31:0] i_jr  (int rs);                 return enc_r(rs, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] i_addi (int rt, int rs, int imm); return enc_i(6'h08, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_addiu(int rt, int rs, int imm); return enc_i(6'h09, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_slti (int rt, int rs, int imm); return enc_i(6'h0A, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_sltiu(int rt, int rs, int imm); return enc_i(6'h0B, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_andi (int rt, int rs, int imm); return enc_i(6'h0C, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_ori  (int rt, int rs, int imm); return enc_i(6'h0D, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_xori (int rt, int rs, int imm); return enc_i(6'h0E, rs, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_lui  (int rt, int imm);         return enc_i(6'h0F, 0, rt, 16'(imm)); endfunction
  function automatic logic [31:0] i_lw   (int rt, int off, int rs); return enc_i(6'h23, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] i_sw   (int rt, int off, int rs); return enc_i(6'h2B, rs, rt, 16'(off)); endfunction
  function automatic logic [31:0] i_beq  (int rs, int rt, logic [31:0] tgt); return enc_i(6'h04, rs, rt, tgt[15:0]); endfunction
  function automatic logic [31:0] i_bne  (int rs, int rt, logic [31:0] tgt); return enc_i(6'h05, rs, rt, tgt[15:0]); endfunction
  function automatic logic [31:0] i_j    (logic [31:0] tgt); return {6'h02, tgt[25:0]}; endfunction
  function automatic logic [31:0] i_nop  (); return 32'h0000_0000; endfunction

  // ---------------------------------------------------------------- reference model
  localparam int IWORDS = 1024;
  localparam int DWORDS = 1024;

  class iss;
    logic [31:0] regs [32];
    logic [31:0] dmem [DWORDS];
    logic [31:0] imem [IWORDS];
    int unsigned steps;
    bit          xor_is_xnor;  // ALU xor page rewritten as xnor (XOR, XORI)

    function new();
      foreach (regs[r]) regs[r] = '0;
      foreach (dmem[a]) dmem[a] = '0;
      foreach (imem[a]) imem[a] = '0;
      steps = 0;
      xor_is_xnor = 0;
    endfunction

    // Run from `pc` until the instruction at `halt_pc` is reached.
    function automatic bit run(logic [31:0] pc, logic [31:0] halt_pc, int unsigned max_steps);
      logic [31:0] ins, a, b, nxt, res, simm, zimm;
      logic [5:0]  op, fn;
      int          rs, rt, rd, sh, wr;
      while (pc != halt_pc) begin
        if (steps >= max_steps) return 0;
        steps++;
        ins  = imem[pc[11:2]];
        op   = ins[31:26]; fn = ins[5:0];
        rs   = ins[25:21]; rt = ins[20:16]; rd = ins[15:11]; sh = ins[10:6];
        simm = {{16{ins[15]}}, ins[15:0]};
        zimm = {16'h0, ins[15:0]};
        a    = regs[rs]; b = regs[rt];
        nxt  = pc + 4;
        wr   = 0; res = '0;
        case (op)
          6'h00: begin
            wr = rd;
            case (fn)
              6'h00: res = b << sh;
              6'h02: res = b >> sh;
              6'h03: res = 32'($signed(b) >>> sh);
              6'h04: res = b << a[4:0];
              6'h06: res = b >> a[4:0];
              6'h07: res = 32'($signed(b) >>> a[4:0]);
              6'h08: begin wr = 0; nxt = a; end
              6'h20, 6'h21: res = a + b;
              6'h22, 6'h23: res = a - b;
              6'h24: res = a & b;
              6'h25: res = a | b;
              6'h26: res = xor_is_xnor ? ~(a ^ b) : a ^ b;
              6'h27: res = ~(a | b);
              6'h2A: res = {31'b0, $signed(a) < $signed(b)};
              6'h2B: res = {31'b0, a < b};
              default: wr = 0;
            endcase
          end
          6'h08, 6'h09: begin wr = rt; res = a + simm; end
          6'h0A: begin wr = rt; res = {31'b0, $signed(a) < $signed(simm)}; end
          6'h0B: begin wr = rt; res = {31'b0, a < simm}; end
          6'h0C: begin wr = rt; res = a & zimm; end
          6'h0D: begin wr = rt; res = a | zimm; end
          6'h0E: begin wr = rt; res = xor_is_xnor ? ~(a ^ zimm) : a ^ zimm; end
          6'h0F: begin wr = rt; res = {ins[15:0], 16'h0}; end
          6'h23: begin wr = rt; res = dmem[(a + simm) >> 2 & (DWORDS-1)]; end
          6'h2B: dmem[(a + simm) >> 2 & (DWORDS-1)] = b;
          6'h04: if (a == b) nxt = zimm;
          6'h05: if (a != b) nxt = zimm;
          6'h02: nxt = {6'b0, ins[25:0]};
          default: ;
        endcase
        if (wr != 0) regs[wr] = res;
        pc = nxt;
      end
      return 1;
    endfunction
  endclass

endpackage
