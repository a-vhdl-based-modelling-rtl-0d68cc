// a_to_bin_tb: drives random rail pairs (valid 1, valid 0, both 0, both 1, a
// ramp, Z) on four signals and a power-clock stepping through its periods.
// value, err and sampled must change only at the end of a hold step, and
// then hold the decoded bits and the invalid flags worked out here.
module a_to_bin_tb;
  import adiabatic_pkg::*;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, commit = 1'b0;
  alevel_t pc = A0;
  alevel_t sig_p [W];
  alevel_t sig_n [W];
  logic [W-1:0] value, err;
  logic sampled;
  always #5 clk = ~clk;

  a_to_bin #(.W(W)) dut (.clk, .rst, .commit, .pc, .sig_p, .sig_n, .value, .err, .sampled);

  alevel_t lv [4] = '{A0, A1, AX, AZ};
  alevel_t wave [4] = '{A0, AX, A1, AX};
  logic [W-1:0] ev, ee;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin sig_p[i] = A0; sig_n[i] = A0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    ev = '0; ee = '0;
    for (int s = 0; s < 80; s++) begin
      @(negedge clk);
      pc = wave[s % 4];
      for (int i = 0; i < W; i++) begin
        sig_p[i] = lv[$urandom_range(0, 3)];
        sig_n[i] = lv[$urandom_range(0, 3)];
      end
      commit = 1'b0;
      @(negedge clk);                 // a settle cycle: nothing may change
      chk("no sample outside commit", sampled, 0);
      commit = 1'b1;
      if (pc == A1)
        for (int i = 0; i < W; i++) begin
          ev[i] = (sig_p[i] == A1);
          ee[i] = !((sig_p[i] == A1 && sig_n[i] == A0) || (sig_p[i] == A0 && sig_n[i] == A1));
        end
      @(negedge clk);
      commit = 1'b0;
      chk($sformatf("step %0d sampled", s), sampled, (pc == A1) ? 1 : 0);
      chk($sformatf("step %0d value", s), value, ev);
      chk($sformatf("step %0d err", s), err, ee);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
