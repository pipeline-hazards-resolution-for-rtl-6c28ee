// alu: programmable arithmetic and logic unit of the EXE stage.
//
// The arithmetic and logic operations (add, subtract, and, or, xor, nor)
// are looked up in rewritable truth-table pages (lut_alu), one page per
// operation, so an application can redefine them by rewriting a page: for
// example turn the xor page into xnor, or the subtract page into reverse
// subtract. Shifts (logical left/right, arithmetic right, shift amount from
// the low 5 bits of operand a), the signed and unsigned set-on-less-than
// comparisons and the upper-immediate load use fixed logic.
//
// Interface: op/a/b/y are the operation and operands (combinational
// result). pg_we/pg_sel/pg_data rewrite page pg_sel on the rising clock
// edge (page numbers: ALU_ADD 0, ALU_SUB 1, ALU_AND 2, ALU_OR 3, ALU_XOR 4,
// ALU_NOR 5); synchronous active-low reset restores the standard pages.
//
// The page-per-operation look-up organisation follows the design
// description; which operations go through pages and which stay fixed, and
// the operation list itself, are this design's choices.
module alu (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pg_we,
  input  logic [2:0]         pg_sel,
  input  rpp_pkg::lut_page_t pg_data,
  input  rpp_pkg::alu_op_e   op,
  input  rpp_pkg::word_t     a,
  input  rpp_pkg::word_t     b,
  output rpp_pkg::word_t     y
);
  import rpp_pkg::*;
  logic [4:0] sh;
  logic [2:0] page;
  word_t      lut_y;
  assign sh = a[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD: page = 3'd0;
      ALU_SUB: page = 3'd1;
      ALU_AND: page = 3'd2;
      ALU_OR:  page = 3'd3;
      ALU_XOR: page = 3'd4;
      ALU_NOR: page = 3'd5;
      default: page = 3'd0;
    endcase
  end

  lut_alu #(.PAGES(LUT_PAGES), .W(XLEN)) u_lut (
    .clk, .rst_n, .pg_we, .pg_sel, .pg_data, .page, .a, .b, .y(lut_y)
  );

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR: y = lut_y;
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << sh;
      ALU_SRL:  y = b >> sh;
      ALU_SRA:  y = word_t'($signed(b) >>> sh);
      ALU_LUI:  y = {b[15:0], 16'h0000};
      default:  y = '0;
    endcase
  end
endmodule
