// tb_id_hazard_fsm: directed scenarios for the ID-stage controller.
// A JR consumer is held in ID while the producer (ResEXE or ResMEM)
// advances one stage per cycle, as in the pipeline (a bubble enters EXE
// on every stall). For each of the six ID hazards the number of stall
// cycles (2, 1, 1 or 0) and the multiplexer input used on the read cycle
// are checked, then freezing (advance low) and flushing.
`timescale 1ns/1ps
module tb_id_hazard_fsm;
  import rpp_pkg::*;
  logic clk = 0, rst_n = 0, advance = 1, flush = 0;
  logic id_valid = 0, id_use_rs = 0;
  reg_t id_rs = 0, ex_rd = 0, mem_rd = 0, wb_rd = 0;
  res_class_e ex_res = RES_NONE, mem_res = RES_NONE, wb_res = RES_NONE;
  logic stall, e1, e2, e3;
  id_src_e sel;
  int checks = 0, failures = 0;

  id_hazard_fsm dut (.clk, .rst_n, .advance, .flush, .id_valid, .id_use_rs, .id_rs,
                     .ex_res, .ex_rd, .mem_res, .mem_rd, .wb_res, .wb_rd,
                     .stall, .sel, .enter_s1(e1), .enter_s2a(e2), .enter_s3(e3));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // producer position: 1 = EXE, 2 = MEM, 3 = WB, 4 = gone
  task automatic place(int pos, res_class_e cls);
    ex_res = RES_NONE; mem_res = RES_NONE; wb_res = RES_NONE;
    ex_rd = 5'd9; mem_rd = 5'd9; wb_rd = 5'd9;
    case (pos)
      1: ex_res = cls;
      2: mem_res = cls;
      3: wb_res = cls;
      default: ;
    endcase
  endtask

  // JR r9 enters ID with the producer `dist` instructions ahead.
  task automatic scenario(int dst, res_class_e cls, int exp_stalls, id_src_e exp_sel, string name);
    int pos, stalls;
    pos = dst; stalls = 0;
    @(negedge clk);
    id_valid = 1; id_use_rs = 1; id_rs = 5'd9;
    place(pos, cls); #1;
    while (stall && stalls < 5) begin
      stalls++;
      @(posedge clk); @(negedge clk);
      pos++; place(pos, cls); #1;
    end
    chk(stalls == exp_stalls, $sformatf("%s: %0d stalls, expected %0d", name, stalls, exp_stalls));
    chk(sel == exp_sel, $sformatf("%s: read from %s, expected %s", name, sel.name(), exp_sel.name()));
    @(posedge clk); @(negedge clk);
    id_valid = 0; place(4, RES_NONE); #1;
    chk(!stall && sel == IDSRC_RF, {name, ": back to S0"});
  endtask

  int ne1 = 0, ne2 = 0, ne3 = 0;
  always @(posedge clk) begin if (e1) ne1++; if (e2) ne2++; if (e3) ne3++; end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    scenario(1, RES_EXE, 1, IDSRC_MEM, "ResEXE_RegID_i+1");
    scenario(1, RES_MEM, 2, IDSRC_WB,  "ResMEM_RegID_i+1");
    scenario(2, RES_MEM, 1, IDSRC_WB,  "ResMEM_RegID_i+2");
    scenario(2, RES_EXE, 0, IDSRC_MEM, "ResEXE_RegID_i+2");
    scenario(3, RES_EXE, 0, IDSRC_WB,  "ResEXE_RegID_i+3");
    scenario(3, RES_MEM, 0, IDSRC_WB,  "ResMEM_RegID_i+3");
    scenario(4, RES_EXE, 0, IDSRC_RF,  "no hazard");
    chk(ne1 == 1 && ne2 == 1 && ne3 == 1, "each of C1, C2, C3 entered once");
    // a non-consumer never stalls
    @(negedge clk) begin id_valid = 1; id_use_rs = 0; place(1, RES_MEM); end
    #1 chk(!stall, "non-RegID instruction does not stall");
    // freeze: advance low keeps S0 decision pending
    @(negedge clk) begin id_use_rs = 1; advance = 0; place(1, RES_EXE); end
    #1 chk(stall, "C1 seen while frozen");
    @(posedge clk); @(negedge clk); #1;
    chk(stall, "state did not move while frozen (still S0)");
    advance = 1;
    @(posedge clk); @(negedge clk); place(2, RES_EXE); #1;
    chk(!stall && sel == IDSRC_MEM, "after freeze: S1 reads MEM bypass");
    @(posedge clk);
    // flush from S2A
    @(negedge clk) place(1, RES_MEM); #1;
    chk(stall, "C2 stall");
    @(posedge clk); @(negedge clk) flush = 1; #1;
    @(posedge clk); @(negedge clk) begin flush = 0; id_valid = 0; place(4, RES_NONE); end
    #1 chk(!stall && sel == IDSRC_RF, "flush returns to S0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
