// pc4_gen_tb: checks the multi-level 4-phase power-clock. In every step PC1
// must show the level of its counter state (00 idle '0', 01 evaluation 'X',
// 10 hold '1', 11 recovery 'X') and PCk must repeat PC1 k-1 steps later.
module pc4_gen_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(3)) u_tb (.clk, .rst, .commit);
  pc4_gen dut (.clk, .rst, .commit, .phase, .pc);

  alevel_t exp_seq [4] = '{A0, AX, A1, AX};
  alevel_t hist [$];

  task automatic chk(string what, alevel_t got, alevel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int s = 0; s < 40; s++) begin
      @(negedge clk iff commit);
      checks++;
      if (phase != 2'(s)) begin
        failures++;
        $display("FAIL step %0d phase %0d", s, phase);
      end
      chk($sformatf("step %0d PC1", s), pc[0], exp_seq[s % 4]);
      hist.push_front(pc[0]);
      for (int k = 1; k < 4; k++)
        if (s >= k) chk($sformatf("step %0d PC%0d", s, k + 1), pc[k], hist[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
