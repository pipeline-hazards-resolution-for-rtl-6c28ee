// tb_rpp_top: end-to-end test of the pipelined processor at its default
// parameters.
//
// Each program is assembled here, executed by the sequential reference
// model (rpp_asm_pkg::iss) and by the processor; at the end every register
// and the preloaded data memory region are compared. Programs:
//   1. load/use sequence (ADDI, LW, ADDU): checks the EXE operand selects
//      0/1/2 and the single load-use bubble, and the result 0x180;
//   2a. the four-instruction branch detection loop: fetch-address trace
//      and counter values;
//   2. a counted loop closed by BNEZ: checks the counter starts at "01",
//      the first pass is predicted not taken, the counter then reads "10"
//      and the next pass is fetched from the branch target at once;
//   3. J and JR with every ID-stage hazard (C1, C2, C3 and the immediate
//      bypass reads): checks the bubble count of each from retire times;
//   3b. a load-use stall while another operand sits in the additional
//      register, and a load followed by a store of the loaded word;
//   3c. the ALU xor page rewritten as xnor right after reset: XOR and XORI
//      results (with bypassed operands) follow the new page, and the next
//      reset restores the standard pages for the programs after it;
//   4. random loops of ALU, load, store, forward-branch, J and JR
//      instructions (JR targets from an ALU result or from memory).
// Every mechanism (ID stalls C1/C2/C3, ID bypasses, EXE stall, EXE
// bypasses from MEM/WB/additional register, MEM store bypass, taken
// prediction, ID redirection, misprediction flush, correct prediction) is
// counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_rpp_top;
  import rpp_pkg::*;
  import rpp_asm_pkg::*;

  localparam logic [31:0] BASE = 32'h0000_4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic prog_we = 1'b0;
  logic [31:0] prog_addr = '0, prog_data = '0;
  logic dm_ext_we = 1'b0;
  logic [31:0] dm_ext_addr = '0, dm_ext_wdata = '0, dm_ext_rdata;
  logic [4:0]  dbg_reg_addr = '0;
  logic [31:0] dbg_reg_data;
  events_t     ev;
  logic        retire_valid;
  logic [31:0] retire_pc, if_pc, exe_result;
  logic [1:0]  if_pred_cnt;
  op_src_e     s_op1, s_op2;
  logic        alu_pg_we = 1'b0;
  logic [2:0]  alu_pg_sel = '0;
  lut_page_t   alu_pg_data = '0;
  bit          xnor_page = 0;

  rpp_top dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data,
    .dm_ext_we, .dm_ext_addr, .dm_ext_wdata, .dm_ext_rdata,
    .dbg_reg_addr, .dbg_reg_data,
    .events(ev), .retire_valid, .retire_pc, .if_pc, .if_pred_cnt,
    .exe_s_op1(s_op1), .exe_s_op2(s_op2), .exe_result,
    .alu_pg_we, .alu_pg_sel, .alu_pg_data
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  localparam int NEV = 15;
  string ev_name [NEV] = '{"id_c1", "id_c2", "id_c3", "id_stall", "id_byp_mem", "id_byp_wb",
                           "exe_stall", "exe_byp_mem", "exe_byp_wb", "exe_byp_add", "mem_byp_wb",
                           "pred_taken", "id_redirect", "mispredict", "br_correct"};
  int ev_cnt [NEV];
  initial foreach (ev_cnt[i]) ev_cnt[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev.id_c1)       ev_cnt[0]++;
    if (ev.id_c2)       ev_cnt[1]++;
    if (ev.id_c3)       ev_cnt[2]++;
    if (ev.id_stall)    ev_cnt[3]++;
    if (ev.id_byp_mem)  ev_cnt[4]++;
    if (ev.id_byp_wb)   ev_cnt[5]++;
    if (ev.exe_stall)   ev_cnt[6]++;
    if (ev.exe_byp_mem) ev_cnt[7]++;
    if (ev.exe_byp_wb)  ev_cnt[8]++;
    if (ev.exe_byp_add) ev_cnt[9]++;
    if (ev.mem_byp_wb)  ev_cnt[10]++;
    if (ev.pred_taken)  ev_cnt[11]++;
    if (ev.id_redirect) ev_cnt[12]++;
    if (ev.mispredict)  ev_cnt[13]++;
    if (ev.br_correct)  ev_cnt[14]++;
  end

  // retire time of each program word (last retirement)
  longint ret_cyc [1024];
  always @(posedge clk) if (rst_n && retire_valid) ret_cyc[retire_pc[11:2]] <= cycle;

  // program image being built
  logic [31:0] prog [$];
  function automatic logic [31:0] here(); return BASE + 32'(prog.size() * 4); endfunction
  function automatic void emit(logic [31:0] w); prog.push_back(w); endfunction

  logic [31:0] dinit [256];

  // Load the program and data, run DUT and reference model, compare.
  task automatic run_program(input string name, input logic [31:0] halt_pc);
    iss ref_m;
    bit ok;
    longint t0;
    ref_m = new();
    ref_m.xor_is_xnor = xnor_page;
    rst_n = 1'b0;
    foreach (prog[k]) ref_m.imem[k] = prog[k];
    foreach (dinit[k]) ref_m.dmem[k] = dinit[k];
    ok = ref_m.run(BASE, halt_pc, 200000);
    check(ok, {name, ": reference model reached the halt"});
    @(negedge clk);
    for (int k = 0; k < prog.size(); k++) begin
      prog_we = 1'b1; prog_addr = BASE + 32'(4 * k); prog_data = prog[k];
      @(negedge clk);
    end
    prog_we = 1'b0;
    for (int k = 0; k < 256; k++) begin
      dm_ext_we = 1'b1; dm_ext_addr = 32'(4 * k); dm_ext_wdata = dinit[k];
      @(negedge clk);
    end
    dm_ext_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    if (xnor_page) begin
      // xnor table over {a, b, carry}; written before the first instruction reaches EXE
      alu_pg_we = 1'b1; alu_pg_sel = 3'd4; alu_pg_data = '{cin: 1'b0, cout_tt: 8'h00, res_tt: 8'hC3};
      @(negedge clk);
      alu_pg_we = 1'b0;
    end
    while (!(retire_valid && retire_pc == halt_pc)) begin
      @(posedge clk); #1;
      if (cycle - t0 > 300000) break;
    end
    check(retire_valid && retire_pc == halt_pc, {name, ": processor reached the halt"});
    @(negedge clk);
    for (int r = 1; r < 32; r++) begin
      dbg_reg_addr = 5'(r); #1;
      check(dbg_reg_data == ref_m.regs[r],
            $sformatf("%s: r%0d = %h, expected %h", name, r, dbg_reg_data, ref_m.regs[r]));
    end
    for (int k = 0; k < 256; k++) begin
      dm_ext_addr = 32'(4 * k); #1;
      check(dm_ext_rdata == ref_m.dmem[k],
            $sformatf("%s: mem[%0d] = %h, expected %h", name, k, dm_ext_rdata, ref_m.dmem[k]));
    end
    $display("%s: %0d instructions, %0d cycles", name, ref_m.steps, cycle - t0);
  endtask

  // ------------------------------------------------------------ program 2 probe
  int  p2_phase = 0;
  bit  p2_first_seen = 0, p2_second_seen = 0;
  // ------------------------------------------------------------ program 1 probe
  int  p1_mode = 0;
  bit  p1_lw_ok = 0, p1_stall_ok = 0, p1_use_ok = 0;

  always @(posedge clk) if (rst_n) begin
    if (p1_mode == 1) begin
      if (dut.de.valid && dut.de.pc == BASE + 4)
        p1_lw_ok <= (s_op1 == SRC_MEM);
      if (dut.de.valid && dut.de.pc == BASE + 8 && ev.exe_stall)
        p1_stall_ok <= (s_op1 == SRC_WB);
      if (dut.de.valid && dut.de.pc == BASE + 8 && !ev.exe_stall)
        p1_use_ok <= (s_op2 == SRC_WB) && (exe_result == 32'h180);
    end
    if (p2_phase == 1 && if_pc == BASE + 8) begin
      // bnez fetched: first time counter "01" (no line yet reads as reset value)
      if (!p2_first_seen) begin
        p2_first_seen <= 1;
        check(!ev.pred_taken, "fig14: first BNEZ predicted not taken");
      end else if (!p2_second_seen) begin
        p2_second_seen <= 1;
        check(if_pred_cnt == 2'b10, $sformatf("fig14: counter is 10 at second fetch (%b)", if_pred_cnt));
        check(dut.pred_next == BASE, "fig14: second BNEZ fetched with jump to its target");
      end
    end
  end

  int gap;

  initial begin
    foreach (dinit[k]) dinit[k] = $urandom;
    repeat (3) @(posedge clk);

    // ---------------- 1: load/use (pseudo code of the data hazard example)
    dinit[64] = 32'h80;  // word at byte 0x100
    prog.delete();
    emit(i_addi(2, 0, 32'h100));
    emit(i_lw(3, 0, 2));
    emit(i_addu(4, 2, 3));
    emit(i_j(here()));
    p1_mode = 1;
    run_program("load_use", BASE + 12);
    p1_mode = 0;
    check(p1_lw_ok,    "load_use: LW takes its base from the MEM bypass (S_OP1=1)");
    check(p1_stall_ok, "load_use: ADDU first cycle S_OP1=2 and stalls");
    check(p1_use_ok,   "load_use: ADDU takes the loaded word from the WB bypass, result 0x180");
    check(ret_cyc[2] - ret_cyc[1] == 2, $sformatf("load_use: one bubble before ADDU (%0d)", ret_cyc[2] - ret_cyc[1]));
    check(ret_cyc[1] - ret_cyc[0] == 1, "load_use: no bubble before LW");

    // ---------------- 2a: the branch detection sequence, fetch trace
    // ADDI R2,R0,8 / BNEZ R2,0x4000 / ADDI R3,R0,2 / ADDU R4,R2,R3 (an
    // endless loop): expected fetch order 4000 4004 4008 400C 4000 4004 4000
    // with the counter at 01 on the first BNEZ fetch and 10 on the second.
    begin
      logic [31:0] words [4] = '{32'h24020008, 32'h14404000, 32'h24030002, 32'h00432021};
      logic [31:0] exp_pc [7] = '{32'h4000, 32'h4004, 32'h4008, 32'h400C, 32'h4000, 32'h4004, 32'h4000};
      logic [1:0]  cnt_at [7];
      rst_n = 1'b0;
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        prog_we = 1'b1; prog_addr = BASE + 32'(4 * k); prog_data = words[k];
        @(negedge clk);
      end
      prog_we = 1'b0;
      rst_n = 1'b1;
      for (int k = 0; k < 7; k++) begin
        #1;
        check(if_pc == exp_pc[k], $sformatf("branch trace: fetch %0d at %h, expected %h", k, if_pc, exp_pc[k]));
        cnt_at[k] = if_pred_cnt;
        @(negedge clk);
      end
      check(cnt_at[1] == 2'b01, "branch trace: Pred = 01 at the first BNEZ fetch");
      check(cnt_at[5] == 2'b10, "branch trace: Pred = 10 at the second BNEZ fetch");
      rst_n = 1'b0;
    end

    // ---------------- 2: branch loop
    prog.delete();
    emit(i_addiu(2, 2, 1));          // 0x4000
    emit(i_slti(3, 2, 5));           // 0x4004
    emit(i_bne(3, 0, BASE));         // 0x4008 BNEZ r3, 0x4000
    emit(i_addu(4, 2, 3));           // 0x400C
    emit(i_j(here()));               // 0x4010
    p2_phase = 1; p2_first_seen = 0; p2_second_seen = 0;
    run_program("branch_loop", BASE + 16);
    p2_phase = 0;
    check(p2_first_seen && p2_second_seen, "fig14: both fetches observed");

    // ---------------- 3: J / JR hazards in ID
    prog.delete();
    dinit[10] = BASE + 32'h40;   // JR targets read from memory
    dinit[11] = BASE + 32'h60;
    emit(i_addiu(20, 0, 0));
    // C1: ResEXE i+1
    emit(i_addiu(9, 0, BASE + 32'h20));   // 0x4004
    emit(i_jr(9));                        // 0x4008
    emit(i_addiu(20, 20, 1));             // must be squashed
    while (prog.size() < 8) emit(i_addiu(20, 20, 1));
    // 0x4020: C2: ResMEM i+1
    emit(i_lw(9, 40, 0));                 // 0x4020 -> 0x4040
    emit(i_jr(9));                        // 0x4024
    while (prog.size() < 16) emit(i_addiu(20, 20, 1));
    // 0x4040: C3: ResMEM i+2
    emit(i_lw(9, 44, 0));                 // 0x4040 -> 0x4060
    emit(i_addiu(21, 0, 7));              // 0x4044
    emit(i_jr(9));                        // 0x4048
    while (prog.size() < 24) emit(i_addiu(20, 20, 1));
    // 0x4060: ResEXE i+2 (MEM bypass, no stall)
    emit(i_addiu(9, 0, BASE + 32'h80));   // 0x4060
    emit(i_addiu(22, 0, 3));              // 0x4064
    emit(i_jr(9));                        // 0x4068
    while (prog.size() < 32) emit(i_addiu(20, 20, 1));
    // 0x4080: ResEXE i+3 (WB bypass, no stall)
    emit(i_addiu(9, 0, BASE + 32'hA0));   // 0x4080
    emit(i_addiu(23, 0, 4));              // 0x4084
    emit(i_addiu(24, 0, 5));              // 0x4088
    emit(i_jr(9));                        // 0x408C
    while (prog.size() < 40) emit(i_addiu(20, 20, 1));
    // 0x40A0: J
    emit(i_j(BASE + 32'hC0));             // 0x40A0
    while (prog.size() < 48) emit(i_addiu(20, 20, 1));
    emit(i_addiu(25, 0, 9));              // 0x40C0
    emit(i_j(here()));                    // 0x40C4 halt
    run_program("jr_hazards", BASE + 32'hC4);
    gap = int'(ret_cyc[2] - ret_cyc[1]);
    check(gap == 2, $sformatf("C1: one stall before JR (gap %0d)", gap));
    gap = int'(ret_cyc[9] - ret_cyc[8]);
    check(gap == 3, $sformatf("C2: two stalls before JR (gap %0d)", gap));
    gap = int'(ret_cyc[18] - ret_cyc[16]);
    check(gap == 3, $sformatf("C3: one stall before JR (gap %0d)", gap));
    gap = int'(ret_cyc[26] - ret_cyc[25]);
    check(gap == 1, $sformatf("ResEXE_i+2: no stall before JR (gap %0d)", gap));
    gap = int'(ret_cyc[35] - ret_cyc[34]);
    check(gap == 1, $sformatf("ResEXE_i+3: no stall before JR (gap %0d)", gap));
    gap = int'(ret_cyc[16] - ret_cyc[9]);
    check(gap == 2, $sformatf("JR redirect costs one bubble (gap %0d)", gap));

    // ---------------- 3b: operand from the additional register while EXE waits
    prog.delete();
    dinit[5] = 32'h1234;
    emit(i_addiu(3, 0, 77));              // producer three ahead of the consumer
    emit(i_addiu(6, 0, 1));
    emit(i_lw(1, 20, 0));                 // load directly ahead
    emit(i_addu(2, 1, 3));                // r1 from the load (stall), r3 from the additional register
    emit(i_sw(2, 24, 0));
    emit(i_lw(4, 24, 0));
    emit(i_sw(4, 28, 0));                 // store data from the WB bypass in MEM
    emit(i_j(here()));
    run_program("stall_refresh", BASE + 28);

    // ---------------- 3c: rewritten ALU page
    prog.delete();
    dinit[6] = 32'hF0F0_1234;
    emit(i_addiu(1, 0, 16'h0FF0));
    emit(i_lui(2, 16'hA5A5));
    emit(i_xor(3, 1, 2));                 // operands from MEM and the additional register
    emit(i_xori(4, 3, 16'h00FF));         // operand from the MEM bypass
    emit(i_lw(5, 24, 0));
    emit(i_xor(6, 5, 4));                 // load-use stall, then xnor
    emit(i_addu(7, 6, 1));                // add page unchanged
    emit(i_sw(6, 32, 0));
    emit(i_j(here()));
    xnor_page = 1;
    run_program("xnor_page", here() - 4);
    xnor_page = 0;

    // ---------------- 4: random loops
    for (int seed = 0; seed < 24; seed++) begin
      int body, iters, skip_left, simple_left;
      logic [31:0] loop_pc;
      prog.delete();
      simple_left = 0;
      iters = 3 + seed % 4;
      emit(i_addiu(10, 0, 32'h200));      // memory base
      emit(i_addiu(11, 0, iters));        // loop counter
      for (int r = 1; r <= 8; r++) emit(i_addiu(r, 0, $urandom_range(0, 200) - 100));
      loop_pc = here();
      body = 40 + 10 * (seed % 3);
      for (int k = 0; k < body; k++) begin
        int kind, d, s1, s2;
        kind = $urandom_range(0, 23);
        // a forward branch may skip up to two words: keep JR sequences out of its reach
        if (kind >= 20 && simple_left > 0) kind = 0;
        simple_left = (kind == 18 || kind == 19) ? 3 : (simple_left > 0 ? simple_left - 1 : 0);
        d  = $urandom_range(1, 8);
        s1 = $urandom_range(0, 8);
        s2 = $urandom_range(0, 8);
        case (kind)
          0:  emit(i_addu(d, s1, s2));
          1:  emit(i_subu(d, s1, s2));
          2:  emit(i_and(d, s1, s2));
          3:  emit(i_or(d, s1, s2));
          4:  emit(i_xor(d, s1, s2));
          5:  emit(i_nor(d, s1, s2));
          6:  emit(i_slt(d, s1, s2));
          7:  emit(i_sltu(d, s1, s2));
          8:  emit(i_sll(d, s1, $urandom_range(0, 31)));
          9:  emit(i_sra(d, s1, $urandom_range(0, 31)));
          10: emit(i_srav(d, s1, s2));
          11: emit(i_addiu(d, s1, $urandom_range(0, 65535)));
          12: emit(i_xori(d, s1, $urandom_range(0, 65535)));
          13: emit(i_lui(d, $urandom_range(0, 65535)));
          14, 15: emit(i_lw(d, 4 * $urandom_range(0, 31), 10));
          16, 17: emit(i_sw(s1, 4 * $urandom_range(0, 31), 10));
          18: emit(i_beq(s1, s2, here() + 32'(4 * $urandom_range(2, 3))));
          19: emit(i_bne(s1, s2, here() + 32'(4 * $urandom_range(2, 3))));
          20, 21: begin
            // JR whose target comes from an ALU result or from memory, with
            // 0..2 unrelated instructions in between, then one wrong-path word
            int gap_n, st; bit via_mem;
            gap_n = $urandom_range(0, 2); via_mem = (kind == 21);
            st = prog.size();
            emit(i_nop());                       // patched below with the target
            if (via_mem) begin
              emit(i_sw(9, 128, 10));
              emit(i_lw(9, 128, 10));
            end
            for (int g = 0; g < gap_n; g++) emit(i_addu($urandom_range(1, 8), $urandom_range(0, 8), $urandom_range(0, 8)));
            emit(i_jr(9));
            emit(i_addiu(13, 13, 1));
            prog[st] = i_addiu(9, 0, here());
          end
          default: begin
            emit(i_j(here() + 8));
            emit(i_addiu(13, 13, 1));
          end
        endcase
      end
      // padding so forward branches near the end land inside the program
      emit(i_addiu(12, 12, 1));
      emit(i_addiu(12, 12, 1));
      emit(i_addiu(11, 11, -1));
      emit(i_bne(11, 0, loop_pc));
      emit(i_j(here()));
      run_program($sformatf("random_%0d", seed), here() - 4);
    end

    // ---------------- mechanisms
    foreach (ev_cnt[i]) begin
      $display("mechanism %-12s %0d", ev_name[i], ev_cnt[i]);
      check(ev_cnt[i] > 0, {"mechanism never exercised: ", ev_name[i]});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
