// tb_sat_counter: checks the saturating counter against an independent
// model (clamped integer arithmetic) for N = 2 (default, initial "01")
// and N = 3, under random allocate/update/taken sequences, including the
// prediction threshold 2^(N-1) and the reset value. Also replays a branch
// taken nine times then not taken once: a 1-bit counter mispredicts twice
// per period, a 2-bit counter once.
`timescale 1ns/1ps
module tb_sat_counter;
  logic clk = 0, rst_n = 0, alloc = 0, update = 0, taken = 0;
  logic [1:0] cnt2; logic pred2;
  logic [2:0] cnt3; logic pred3;
  int checks = 0, failures = 0;
  int m2, m3;

  sat_counter dut2 (.clk, .rst_n, .alloc, .update, .taken, .cnt(cnt2), .pred(pred2));
  logic [0:0] cnt1; logic pred1;
  sat_counter #(.N(1), .INIT(0)) dut1 (.clk, .rst_n, .alloc, .update, .taken, .cnt(cnt1), .pred(pred1));
  sat_counter #(.N(3), .INIT(3)) dut3 (.clk, .rst_n, .alloc, .update, .taken, .cnt(cnt3), .pred(pred3));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampstep(int v, bit t, int maxv);
    if (t) return (v < maxv) ? v + 1 : v;
    return (v > 0) ? v - 1 : v;
  endfunction

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    m2 = 1; m3 = 3;
    chk(cnt2 == 2'b01 && !pred2, "reset value 01, predicts not taken");
    chk(cnt3 == 3'd3 && !pred3, "N=3 reset value");
    // taken twice from 01: 10 then 11, saturate
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) begin update = 1; taken = 1; end
      @(posedge clk); #1;
      m2 = clampstep(m2, 1, 3); m3 = clampstep(m3, 1, 7);
      chk(cnt2 == 2'(m2) && pred2 == (m2 >= 2), $sformatf("up %0d: %0d vs %0d", k, cnt2, m2));
    end
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      alloc  = ($urandom_range(0, 9) == 0);
      update = $urandom_range(0, 1);
      taken  = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (alloc) begin m2 = clampstep(1, taken, 3); m3 = clampstep(3, taken, 7); end
      else if (update) begin m2 = clampstep(m2, taken, 3); m3 = clampstep(m3, taken, 7); end
      chk(cnt2 == 2'(m2), $sformatf("N=2 cnt %0d vs %0d", cnt2, m2));
      chk(pred2 == (m2 >= 2), "N=2 prediction threshold");
      chk(cnt3 == 3'(m3), $sformatf("N=3 cnt %0d vs %0d", cnt3, m3));
      chk(pred3 == (m3 >= 4), "N=3 prediction threshold");
    end
    // A branch taken nine times then not taken once, repeated: in steady
    // state a 1-bit counter mispredicts twice per period, a 2-bit one once.
    begin
      int miss1, miss2;
      @(negedge clk) begin alloc = 0; update = 0; end
      for (int p = 0; p < 4; p++) begin
        miss1 = 0; miss2 = 0;
        for (int k = 0; k < 10; k++) begin
          @(negedge clk);
          taken = (k != 9); update = 1;
          #1;
          if (pred1 != taken) miss1++;
          if (pred2 != taken) miss2++;
          @(posedge clk);
        end
        if (p > 0) begin
          chk(miss1 == 2, $sformatf("1-bit counter: %0d misses per period, expected 2", miss1));
          chk(miss2 == 1, $sformatf("2-bit counter: %0d misses per period, expected 1", miss2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
