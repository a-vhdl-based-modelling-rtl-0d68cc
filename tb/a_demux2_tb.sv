// a_demux2_tb: random select and data bits through pulse converters on a
// 4-phase clock; both outputs of the DeMUX are checked on their evaluation
// ramp and in their hold period against the routing worked out here
// (y0 = !s & d, y1 = s & d), one quarter period after the inputs' hold. A
// select with both rails at 1 and data 1 must give Z on both outputs.
module a_demux2_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0, invalid_seen = 0;
  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(5)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);

  logic s = 1'b0, sb = 1'b1, d = 1'b0;
  alevel_t s_p, s_n, d_p, d_n, y0, y0b, y1, y1b;
  a_input_conv u_sc (.clk, .rst, .commit, .pc_ref(pc[3]), .inp(s), .inpb(sb), .in_p(s_p), .in_n(s_n));
  a_input_conv u_dc (.clk, .rst, .commit, .pc_ref(pc[3]), .inp(d), .inpb(~d), .in_p(d_p), .in_n(d_n));
  a_demux2 dut (.clk, .rst, .commit, .pc(pc[0]), .s_p, .s_n, .d_p, .d_n, .y0, .y0b, .y1, .y1b);

  task automatic chk(string what, alevel_t got, alevel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  logic e0, e1, bad;
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int it = 0; it < 60; it++) begin
      @(negedge clk);
      s = 1'($urandom()); sb = ~s; d = 1'($urandom());
      bad = (it % 7 == 3);
      if (bad) begin s = 1'b1; sb = 1'b1; d = 1'b1; end
      @(posedge clk iff (commit && phase == 2'b11));
      e0 = !s && d; e1 = s && d;
      @(negedge clk iff (commit && phase == 2'b01));
      if (!bad) begin
        chk("eval y0", y0, e0 ? AX : A0);  chk("eval y0b", y0b, e0 ? A0 : AX);
        chk("eval y1", y1, e1 ? AX : A0);  chk("eval y1b", y1b, e1 ? A0 : AX);
      end
      @(negedge clk iff (commit && phase == 2'b10));
      if (!bad) begin
        chk("hold y0", y0, e0 ? A1 : A0);  chk("hold y0b", y0b, e0 ? A0 : A1);
        chk("hold y1", y1, e1 ? A1 : A0);  chk("hold y1b", y1b, e1 ? A0 : A1);
      end else begin
        chk("invalid y0", y0, AZ); chk("invalid y1", y1, AZ);
        invalid_seen++;
      end
    end
    checks++;
    if (invalid_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 20 * 5 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
