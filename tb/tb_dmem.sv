// tb_dmem: random stores through the processor port and preloads through
// the external port, read back through both ports against an array
// model; a load reads in the same cycle, a store lands at the clock edge.
`timescale 1ns/1ps
module tb_dmem;
  localparam int D = 256;
  logic clk = 0, we = 0, ext_we = 0;
  logic [31:0] addr = 0, rdata, wdata = 0, ext_addr = 0, ext_wdata = 0, ext_rdata;
  logic [31:0] m [D];
  int checks = 0, failures = 0;

  dmem #(.DEPTH(D)) dut (.clk, .addr, .rdata, .we, .wdata, .ext_we, .ext_addr, .ext_wdata, .ext_rdata);
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
    for (int i = 0; i < D; i++) begin
      @(negedge clk) begin ext_we = 1; ext_addr = 32'(4 * i); ext_wdata = 32'(i * 7 + 1); end
      @(posedge clk); m[i] = 32'(i * 7 + 1);
    end
    @(negedge clk) ext_we = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = 32'(4 * $urandom_range(0, D - 1)); wdata = $urandom;
      ext_addr = 32'(4 * $urandom_range(0, D - 1));
      #1;
      chk(rdata == m[addr[9:2]], "processor port read");
      chk(ext_rdata == m[ext_addr[9:2]], "external port read");
      @(posedge clk);
      if (we) m[addr[9:2]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
