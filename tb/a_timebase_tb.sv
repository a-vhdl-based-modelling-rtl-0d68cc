// a_timebase_tb: checks that commit is high for exactly one clk cycle in every
// DELTAS cycles, for a time base of 7 settle cycles.
module a_timebase_tb;
  localparam int DELTAS = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, commit;
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(DELTAS)) dut (.clk, .rst, .commit);

  int n = 0, last = -1, seen = 0;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      n++;
      if (commit) begin
        checks++;
        seen++;
        if (last >= 0 && n - last != DELTAS) begin
          failures++;
          $display("FAIL commit spacing %0d", n - last);
        end
        if (last < 0 && n != DELTAS - 1) begin  // the release cycle is settle cycle 0
          failures++;
          $display("FAIL first commit after %0d cycles", n);
        end
        last = n;
      end
    end
    checks++;
    if (seen != 200 / DELTAS) begin
      failures++;
      $display("FAIL %0d commits in 200 cycles", seen);
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
