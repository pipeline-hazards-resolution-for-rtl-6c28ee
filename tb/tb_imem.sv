// tb_imem: writes random words to random addresses of the instruction
// memory and reads them back through the fetch port, against an array
// model; also checks that addresses beyond the size wrap (0x4000 -> 0).
`timescale 1ns/1ps
module tb_imem;
  localparam int D = 256;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, rdata, waddr = 0, wdata = 0;
  logic [31:0] m [D];
  bit          w [D];
  int checks = 0, failures = 0;

  imem #(.DEPTH(D)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (w[i]) w[i] = 0;
    for (int k = 0; k < 3000; k++) begin
      int i;
      @(negedge clk);
      we = $urandom_range(0, 1); i = $urandom_range(0, D - 1);
      waddr = 32'h4000 + 32'(4 * i); wdata = $urandom;
      addr = 32'(4 * $urandom_range(0, D - 1));
      #1;
      if (w[addr[9:2]]) begin
        checks++;
        if (rdata != m[addr[9:2]]) begin failures++; $display("FAIL: read %h", addr); end
      end
      @(posedge clk);
      if (we) begin m[i] = wdata; w[i] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
