// tb_mem_bypass_ctrl: all relevant combinations of the store in MEM and
// the instruction in WB; the WB bypass must be chosen exactly when a
// valid store's data register (not R0) is written by the WB instruction.
`timescale 1ns/1ps
module tb_mem_bypass_ctrl;
  import rpp_pkg::*;
  logic mem_valid, mem_use_rt, sel;
  reg_t mem_rt, wb_rd;
  res_class_e wb_res;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mem_bypass_ctrl dut (.mem_valid, .mem_use_rt, .mem_rt, .wb_res, .wb_rd, .sel);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e;
    for (int v = 0; v < 2; v++)
      for (int u = 0; u < 2; u++)
        for (int r = 0; r < 3; r++)
          for (int a = 0; a < 4; a++)
            for (int b = 0; b < 4; b++) begin
              mem_valid = v[0]; mem_use_rt = u[0]; wb_res = res_class_e'(r);
              mem_rt = 5'(a); wb_rd = 5'(b); #1;
              e = v && u && r != 0 && a != 0 && a == b;
              checks++;
              if (sel != e) begin failures++; $display("FAIL: v%0d u%0d r%0d rt%0d rd%0d", v, u, r, a, b); end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
