// crc_counter_tb: RES is held for a few power-clock periods, then released
// for messages of 16 bits. The counter must read 0 right after RES, count one
// per period, and raise done for exactly one period, the one that starts one
// sampling point after the sixteenth message bit was taken; it then stays idle
// until the next RES.
module crc_counter_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  logic res = 1'b0;
  logic [3:0] count;
  logic busy, done;
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(3)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);
  crc_counter #(.NBITS(16)) dut (.clk, .rst, .commit, .phase, .res, .count, .busy, .done);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic period();
    @(posedge clk iff (commit && phase == 2'b11));
    @(negedge clk);
  endtask

  int done_cycles;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 3; k++) begin
      res = 1'b1;
      period(); period();
      chk("count after RES", count, 0);
      chk("busy after RES", busy, 1);
      res = 1'b0;
      for (int b = 1; b <= 17; b++) begin
        period();
        chk($sformatf("msg %0d period %0d done", k, b), done, (b == 17) ? 1 : 0);
        if (b < 16) chk($sformatf("msg %0d count", k), count, b);
        if (b == 16) chk("busy ends after 16 bits", busy, 0);
      end
      done_cycles = int'(done);
      repeat (4 * 3 - 1) begin
        @(negedge clk);
        done_cycles += done;
      end
      chk("done lasts one period (12 clk)", done_cycles, 12);
      period();
      chk("idle after done", done, 0);
      chk("not busy after done", busy, 0);
      period();
      chk("still idle", done, 0);
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
