// tb_regfile: random writes and reads of the register bank against an
// array model. Checks that R0 reads zero whatever is written to it and
// that a read in the cycle of a write returns the old value.
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0, dbg_addr = 0;
  logic [31:0] rd1, rd2, wd = 0, dbg_data;
  logic [31:0] m [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd, .dbg_addr, .dbg_data);
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

  initial begin
    foreach (m[i]) m[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) != 0; wa = 5'($urandom); wd = $urandom;
      ra1 = (k % 7 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom); dbg_addr = 5'($urandom);
      #1;
      chk(rd1 == m[ra1], $sformatf("rd1 r%0d", ra1));
      chk(rd2 == m[ra2], $sformatf("rd2 r%0d", ra2));
      chk(dbg_data == m[dbg_addr], "dbg port");
      @(posedge clk); #1;
      if (we && wa != 0) m[wa] = wd;
    end
    chk(m[0] == 0, "model r0");
    ra1 = 0; #1; chk(rd1 == 0, "R0 reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
