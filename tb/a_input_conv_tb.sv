// a_input_conv_tb: drives random pulse pairs (valid and invalid) into the
// converter, referenced to PC4 of a 4-phase clock, and checks in every step of
// the following period that each rail equals PC4 when its pulse bit was 1 and
// stays 0 otherwise. Pulses change in the middle of a period to check that
// they are only taken while PC4 is idle.
module a_input_conv_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  logic inp = 1'b0, inpb = 1'b0;
  alevel_t in_p, in_n;
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(4)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);
  a_input_conv dut (.clk, .rst, .commit, .pc_ref(pc[3]), .inp, .inpb, .in_p, .in_n);

  task automatic chk(string what, alevel_t got, alevel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  logic sp, sn;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int it = 0; it < 40; it++) begin
      @(negedge clk);
      inp = 1'($urandom()); inpb = 1'($urandom());
      // PC4 is idle in PC1 state 11: the pulses are taken at the end of it
      @(posedge clk iff (commit && pc[3] == A0));
      sp = inp; sn = inpb;
      for (int s = 0; s < 4; s++) begin
        @(negedge clk iff commit);
        if (s == 1) begin inp = ~inp; inpb = ~inpb; end  // mid-period change, ignored
        chk($sformatf("it %0d step %0d IN", it, s), in_p, sp ? pc[3] : A0);
        chk($sformatf("it %0d step %0d INb", it, s), in_n, sn ? pc[3] : A0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
