// bennett_clk_gen_tb: checks the BCD counter (0..9) and the nested Bennett
// waveforms of the input reference and PC1..PC3 against a table written out
// by hand (one row per count, columns IN PC1 PC2 PC3, levels 0 1 x).
module bennett_clk_gen_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1, commit;
  logic [3:0] count;
  alevel_t in_ref;
  alevel_t pc [3];
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(3)) u_tb (.clk, .rst, .commit);
  bennett_clk_gen #(.NPC(3)) dut (.clk, .rst, .commit, .count, .in_ref, .pc);

  string tab [10] = '{"x000", "1x00", "11x0", "111x", "1111",
                      "111x", "11x0", "1x00", "x000", "0000"};

  function automatic alevel_t from_char(byte c);
    return (c == "0") ? A0 : (c == "1") ? A1 : AX;
  endfunction

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
    for (int s = 0; s < 35; s++) begin
      @(negedge clk iff commit);
      checks++;
      if (count != 4'(s % 10)) begin
        failures++;
        $display("FAIL step %0d count %0d", s, count);
      end
      chk($sformatf("step %0d IN", s), in_ref, from_char(tab[s % 10][0]));
      for (int j = 0; j < 3; j++)
        chk($sformatf("step %0d PC%0d", s, j + 1), pc[j], from_char(tab[s % 10][j + 1]));
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
