// tb_lut_alu: checks the paged look-up-table operation unit.
//
// After reset the six standard pages must compute add, subtract, and, or,
// xor and nor; expected values are computed here with the arithmetic and
// logic operators. Then pages are rewritten with tables derived here from
// boolean functions of (a, b, carry) for xnor, a and not b, increment of a,
// reverse subtract (b - a) and a + b + 1, each checked against its
// arithmetic meaning; a rewrite must leave the other pages unchanged, take
// effect from the next cycle, and a second reset must restore the
// standard set.
`timescale 1ns/1ps
module tb_lut_alu;
  import rpp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pg_we = 1'b0;
  logic [2:0] pg_sel = '0, page = '0;
  lut_page_t pg_data = '0;
  logic [31:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;

  lut_alu dut (.clk, .rst_n, .pg_we, .pg_sel, .pg_data, .page, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // truth table of f(a, b, c) over the index {a, b, c}
  typedef enum int {F_XOR3, F_MAJ, F_AND, F_OR, F_XOR, F_NOR, F_XNOR, F_ANDN,
                    F_A_XOR_C, F_A_AND_C, F_NA_XOR_B_XOR_C, F_MAJ_NA, F_ZERO} fn_e;
  function automatic logic [7:0] tt(fn_e f);
    logic [7:0] t;
    for (int i = 0; i < 8; i++) begin
      logic xa, xb, xc;
      xa = i[2]; xb = i[1]; xc = i[0];
      case (f)
        F_XOR3:           t[i] = xa ^ xb ^ xc;
        F_MAJ:            t[i] = (xa & xb) | (xa & xc) | (xb & xc);
        F_AND:            t[i] = xa & xb;
        F_OR:             t[i] = xa | xb;
        F_XOR:            t[i] = xa ^ xb;
        F_NOR:            t[i] = ~(xa | xb);
        F_XNOR:           t[i] = ~(xa ^ xb);
        F_ANDN:           t[i] = xa & ~xb;
        F_A_XOR_C:        t[i] = xa ^ xc;
        F_A_AND_C:        t[i] = xa & xc;
        F_NA_XOR_B_XOR_C: t[i] = ~xa ^ xb ^ xc;
        F_MAJ_NA:         t[i] = (~xa & xb) | (~xa & xc) | (xb & xc);
        default:          t[i] = 1'b0;
      endcase
    end
    return t;
  endfunction

  function automatic logic [31:0] expect_op(int kind, logic [31:0] x, logic [31:0] z);
    case (kind)
      0:  return x + z;
      1:  return x - z;
      2:  return x & z;
      3:  return x | z;
      4:  return x ^ z;
      5:  return ~(x | z);
      10: return ~(x ^ z);     // xnor
      11: return x & ~z;       // and-not
      12: return x + 1;        // increment a
      13: return z - x;        // reverse subtract
      14: return x + z + 1;    // add with carry in
      default: return '0;
    endcase
  endfunction

  // apply `n` operand pairs to page p and compare with expect_op(kind)
  task automatic run_page(int unsigned p, int kind, int n);
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5555_AAAA};
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      page = 3'(p);
      a = (k % 4 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (k % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      #1;
      checks++;
      if (y !== expect_op(kind, a, b)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: page %0d kind %0d a=%h b=%h y=%h exp=%h", p, kind, a, b, y, expect_op(kind, a, b));
      end
    end
  endtask

  task automatic write_page(int unsigned p, logic cin, logic [7:0] co, logic [7:0] r);
    @(negedge clk);
    pg_we = 1'b1; pg_sel = 3'(p); pg_data = '{cin: cin, cout_tt: co, res_tt: r};
    @(negedge clk);
    pg_we = 1'b0;
  endtask

  task automatic check_standard(int n);
    for (int p = 0; p < 6; p++) run_page(p, p, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check_standard(400);

    // xnor in place of xor; the other pages stay as they were
    write_page(4, 1'b0, tt(F_ZERO), tt(F_XNOR));
    run_page(4, 10, 300);
    run_page(0, 0, 100);
    run_page(5, 5, 100);
    // and-not in place of and
    write_page(2, 1'b0, tt(F_ZERO), tt(F_ANDN));
    run_page(2, 11, 300);
    // increment of a in place of or: result a ^ c, carry a & c, carry in 1
    write_page(3, 1'b1, tt(F_A_AND_C), tt(F_A_XOR_C));
    run_page(3, 12, 300);
    // reverse subtract b - a = b + ~a + 1 in place of subtract
    write_page(1, 1'b1, tt(F_MAJ_NA), tt(F_NA_XOR_B_XOR_C));
    run_page(1, 13, 300);
    // add with carry in 1 in place of add
    write_page(0, 1'b1, tt(F_MAJ), tt(F_XOR3));
    run_page(0, 14, 300);
    run_page(5, 5, 100);

    // the rewrite takes effect on the edge that writes it
    @(negedge clk);
    page = 3'd5; a = 32'h0F0F_0000; b = 32'h00FF_0000;
    pg_we = 1'b1; pg_sel = 3'd5; pg_data = '{cin: 1'b0, cout_tt: tt(F_ZERO), res_tt: tt(F_XOR)};
    #1;
    checks++;
    if (y !== ~(a | b)) begin failures++; $display("FAIL: page changed before the write edge"); end
    @(posedge clk); #1;
    checks++;
    if (y !== (a ^ b)) begin failures++; $display("FAIL: page not changed after the write edge"); end
    @(negedge clk) pg_we = 1'b0;

    // reset restores the standard set
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check_standard(200);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
