// tb_btb: checks the branch-target buffer against a model that keeps, per
// line (word address mod ENTRIES), the recorded branch address, target and
// a clamped 0..3 counter started at 1 on allocation. Random updates and
// lookups over a small set of branch addresses that alias on lines.
// Also replays the two-pass example: first pass not found (not taken),
// resolved taken, second lookup predicts taken with counter "10".
`timescale 1ns/1ps
module tb_btb;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc = '0, up_pc = '0, up_target = '0, lk_target;
  logic lk_hit, lk_taken, up_en = 0, up_taken = 0;
  logic [1:0] lk_cnt;
  int checks = 0, failures = 0;

  btb #(.ENTRIES(E)) dut (.clk, .rst_n, .lk_pc, .lk_hit, .lk_taken, .lk_target, .lk_cnt,
                          .up_en, .up_pc, .up_target, .up_taken);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          m_v [E];
  logic [31:0] m_pc [E], m_tg [E];
  int          m_c [E];

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic look(logic [31:0] pc);
    int i; bit h;
    lk_pc = pc; #1;
    i = (pc >> 2) % E;
    h = m_v[i] && m_pc[i] == pc;
    chk(lk_hit == h, $sformatf("hit %h", pc));
    chk(lk_taken == (h && m_c[i] >= 2), $sformatf("taken %h", pc));
    if (h) begin
      chk(lk_target == m_tg[i], $sformatf("target %h", pc));
      chk(lk_cnt == 2'(m_c[i]), $sformatf("cnt %h", pc));
    end
  endtask

  initial begin
    foreach (m_v[i]) m_v[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // two-pass example
    look(32'h4004);
    @(negedge clk) begin up_en = 1; up_pc = 32'h4004; up_target = 32'h4000; up_taken = 1; end
    @(posedge clk); #1;
    @(negedge clk) up_en = 0;
    m_v[1] = 1; m_pc[1] = 32'h4004; m_tg[1] = 32'h4000; m_c[1] = 2;
    look(32'h4004);
    chk(lk_taken && lk_cnt == 2'b10 && lk_target == 32'h4000, "second pass predicted taken, counter 10");
    // random
    for (int k = 0; k < 3000; k++) begin
      logic [31:0] pc; int i;
      @(negedge clk);
      look(32'h4000 + 4 * $urandom_range(0, 23));
      pc = 32'h4000 + 4 * $urandom_range(0, 23);
      up_en = $urandom_range(0, 1); up_pc = pc;
      up_target = 32'h5000 + 4 * $urandom_range(0, 255); up_taken = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (up_en) begin
        i = (pc >> 2) % E;
        if (m_v[i] && m_pc[i] == pc) begin
          m_c[i] = up_taken ? (m_c[i] < 3 ? m_c[i] + 1 : 3) : (m_c[i] > 0 ? m_c[i] - 1 : 0);
        end else begin
          m_v[i] = 1; m_pc[i] = pc; m_c[i] = up_taken ? 2 : 0;
        end
        m_tg[i] = up_target;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
