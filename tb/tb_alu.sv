// tb_alu: random and corner operands for every ALU operation, compared
// with results computed here from the operation definitions, after reset
// (standard pages). Then the xor page is rewritten to xnor: xor must
// change and every other operation must stay as it was.
`timescale 1ns/1ps
module tb_alu;
  import rpp_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y, e;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pg_we = 0;
  logic [2:0] pg_sel = '0;
  lut_page_t pg_data = '0;
  bit xnor_mode = 0;
  always #5 clk = ~clk;

  alu dut (.clk, .rst_n, .pg_we, .pg_sel, .pg_data, .op, .a, .b, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 12000; k++) begin
      if (k == 6000) begin
        // rewrite page 4 (xor) as xnor: result table ~(a ^ b) over {a, b, c}
        @(negedge clk);
        pg_we = 1; pg_sel = 3'd4; pg_data = '{cin: 1'b0, cout_tt: 8'h00, res_tt: 8'hC3};
        @(negedge clk);
        pg_we = 0;
        xnor_mode = 1;
      end
      op = alu_op_e'(k % 12);
      a = (k % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (k % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      #1;
      case (op)
        ALU_ADD:  e = a + b;
        ALU_SUB:  e = a + ~b + 1;
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_XOR:  e = xnor_mode ? ~(a ^ b) : a ^ b;
        ALU_NOR:  e = ~a & ~b;
        ALU_SLT:  e = (a[31] != b[31]) ? {31'b0, a[31]} : {31'b0, a < b};
        ALU_SLTU: e = {31'b0, a < b};
        ALU_SLL:  begin e = b; for (int s = 0; s < a[4:0]; s++) e = {e[30:0], 1'b0}; end
        ALU_SRL:  begin e = b; for (int s = 0; s < a[4:0]; s++) e = {1'b0, e[31:1]}; end
        ALU_SRA:  begin e = b; for (int s = 0; s < a[4:0]; s++) e = {e[31], e[31:1]}; end
        ALU_LUI:  e = {b[15:0], 16'h0};
        default:  e = '0;
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: op %s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
