// a_or_tb: self-checking testbench of a_or.
// Ten-step time base, 4-phase power-clock and pulse converters (reference PC4)
// feed a 4-input OR/NOR gate on PC1. Random valid dual-rail inputs are applied once per power-clock
// period; the output pair is checked on its evaluation ramp and in its hold
// period against the OR of the bits, worked out here from the input bits. This fixes
// the latency at one quarter period after the inputs' hold. Invalid inputs
// (both rails of one input at 1) are applied in cases where they must reach
// the output, and Z is then expected on both rails.
module a_or_tb;
  import adiabatic_pkg::*;

  localparam int N = 4;
  localparam int ITER = 60;
  int checks = 0, failures = 0;
  int invalid_seen = 0;

  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(5)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);

  logic [N-1:0] inp, inpb;
  alevel_t a_p [N];
  alevel_t a_n [N];
  alevel_t q, qb;
  for (genvar i = 0; i < N; i++) begin : g_conv
    a_input_conv u_conv (.clk, .rst, .commit, .pc_ref(pc[3]), .inp(inp[i]), .inpb(inpb[i]),
                         .in_p(a_p[i]), .in_n(a_n[i]));
  end

  a_or #(.N(N)) dut (.clk, .rst, .commit, .pc(pc[0]), .a_p, .a_n, .q, .qb);

  function automatic logic expect_bit(logic [N-1:0] v);
    return |v;
  endfunction

  task automatic chk(string what, alevel_t got, alevel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  logic [N-1:0] s_inp, s_inpb;
  logic e, bad;

  initial begin
    inp = '0; inpb = '1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int it = 0; it < ITER; it++) begin
      @(negedge clk);
      inp = N'($urandom());
      inpb = ~inp;
      bad = 1'b0;
      if (it % 7 == 3) begin
        inp = '0; inpb = '1; inp[0] = 1'b1; bad = 1'b1;    // all 0, input 0 both rails
      end
      @(posedge clk iff (commit && phase == 2'b11));
      s_inp = inp; s_inpb = inpb;
      e = expect_bit(s_inp);
      @(negedge clk iff (commit && phase == 2'b01));
      if (bad) begin
        chk($sformatf("iter %0d eval q (invalid)", it), q, AZ);
        chk($sformatf("iter %0d eval qb (invalid)", it), qb, AZ);
      end else begin
        chk($sformatf("iter %0d eval q", it), q, e ? AX : A0);
        chk($sformatf("iter %0d eval qb", it), qb, e ? A0 : AX);
      end
      @(negedge clk iff (commit && phase == 2'b10));
      if (bad) begin
        chk($sformatf("iter %0d hold q (invalid)", it), q, AZ);
        invalid_seen++;
      end else begin
        chk($sformatf("iter %0d hold q", it), q, e ? A1 : A0);
        chk($sformatf("iter %0d hold qb", it), qb, e ? A0 : A1);
      end
    end
    checks++;
    if (invalid_seen == 0) begin
      failures++;
      $display("FAIL no invalid input was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ITER * 20 * 5 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
