// lut_alu: paged look-up-table operation unit of the programmable ALU.
//
// Each page holds the truth table of one operation, and the pages are
// rewritable storage, so the arithmetic and logic operations of the
// processor can be changed for an application. The selected page is applied
// to the operands bit-slice by bit-slice: bit i of the result is
// res_tt[{a[i], b[i], c[i]}] and the carry into bit i+1 is
// cout_tt[{a[i], b[i], c[i]}], starting from c[0] = cin (rpp_pkg::lut_page_t).
// One 17-bit page therefore describes any operation built from a bitwise
// function and a ripple carry: add, subtract, increment, the logic
// operations and their complements.
//
// Interface: `page` selects the operation, a/b/y are the operands and the
// result (combinational). Pages are written through pg_we/pg_sel/pg_data on
// the rising clock edge; a rewritten page is used from the next cycle.
// Synchronous active-low reset loads the standard set: page 0 add, 1
// subtract, 2 and, 3 or, 4 xor, 5 nor. Pages above 5 reset to all zeros.
//
// The paged, rewritable truth-table organisation follows the design
// description; the bit-slice page format with a carry chain, the number of
// pages and the write port are this design's choices.
module lut_alu #(
  parameter int unsigned PAGES = rpp_pkg::LUT_PAGES,
  parameter int unsigned W     = 32,
  localparam int unsigned SW   = (PAGES > 1) ? $clog2(PAGES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pg_we,
  input  logic [SW-1:0]      pg_sel,
  input  rpp_pkg::lut_page_t pg_data,
  input  logic [SW-1:0]      page,
  input  logic [W-1:0]       a,
  input  logic [W-1:0]       b,
  output logic [W-1:0]       y
);
  import rpp_pkg::*;

  // standard pages: index {a, b, c} = 7..0
  function automatic lut_page_t std_page(input int unsigned p);
    unique case (p)
      0:       return '{cin: 1'b0, cout_tt: 8'hE8, res_tt: 8'h96}; // a + b
      1:       return '{cin: 1'b1, cout_tt: 8'hB2, res_tt: 8'h69}; // a + ~b + 1
      2:       return '{cin: 1'b0, cout_tt: 8'h00, res_tt: 8'hC0}; // a & b
      3:       return '{cin: 1'b0, cout_tt: 8'h00, res_tt: 8'hFC}; // a | b
      4:       return '{cin: 1'b0, cout_tt: 8'h00, res_tt: 8'h3C}; // a ^ b
      5:       return '{cin: 1'b0, cout_tt: 8'h00, res_tt: 8'h03}; // ~(a | b)
      default: return '0;
    endcase
  endfunction

  lut_page_t pages [PAGES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < PAGES; p++) pages[p] <= std_page(p);
    end else if (pg_we && 32'(pg_sel) < PAGES) begin
      pages[pg_sel] <= pg_data;
    end
  end

  lut_page_t sel;
  assign sel = (32'(page) < PAGES) ? pages[page] : '0;

  always_comb begin
    logic       c;
    logic [2:0] idx;
    c = sel.cin;
    for (int i = 0; i < W; i++) begin
      idx  = {a[i], b[i], c};
      y[i] = sel.res_tt[idx];
      c    = sel.cout_tt[idx];
    end
  end
endmodule
