// a_notbuf_tb: drives the NOT/BUF cell step by step with a 4-phase power-clock
// and several kinds of dual-rail input (valid 1, valid 0, both rails 0, both
// rails 1, both rails Z, input one step late, input one step early), and
// checks the outputs at the end of every step against hand-worked waveforms.
// A second cell with BENNETT = 1 is driven with a Bennett-style clock whose
// hold lasts three steps while the input stays at 1.
module a_notbuf_tb;
  import adiabatic_pkg::*;

  localparam int DELTAS = 4;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b1, commit;
  int dcnt = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) dcnt <= (dcnt == DELTAS - 1) ? 0 : dcnt + 1;
  assign commit = (dcnt == DELTAS - 1);

  alevel_t pc, in_p, in_n, q, qb;
  alevel_t bpc, bin_p, bin_n, bq, bqb, fq, fqb;

  a_notbuf #(.BENNETT(1'b0)) dut  (.clk, .rst, .commit, .pc, .in_p, .in_n, .q, .qb);
  a_notbuf #(.BENNETT(1'b1)) dutb (.clk, .rst, .commit, .pc(bpc), .in_p(bin_p), .in_n(bin_n),
                                   .q(bq), .qb(bqb));
  // a 4-phase cell on the Bennett stimulus, to show it is not Bennett-capable
  a_notbuf #(.BENNETT(1'b0)) dutf (.clk, .rst, .commit, .pc(bpc), .in_p(bin_p), .in_n(bin_n),
                                   .q(fq), .qb(fqb));

  alevel_t wave [4] = '{A0, AX, A1, AX};   // I, E, H, R

  task automatic chk(string what, alevel_t got, alevel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  // wait for the end of the current step (outputs settled), sample after it
  task automatic end_step();
    @(posedge clk iff commit);
    #1;
  endtask

  // kind: 0 valid1, 1 valid0, 2 both0, 3 both1, 4 ZZ, 5 late, 6 early
  task automatic run_kind(int kind, string name);
    alevel_t eq, eqb;
    for (int per = 0; per < 2; per++)
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        pc = wave[s];
        case (kind)
          0: begin in_p = wave[(s+1)%4]; in_n = A0; end
          1: begin in_p = A0; in_n = wave[(s+1)%4]; end
          2: begin in_p = A0; in_n = A0; end
          3: begin in_p = wave[(s+1)%4]; in_n = wave[(s+1)%4]; end
          4: begin in_p = AZ; in_n = AZ; end
          5: begin in_p = wave[s]; in_n = A0; end
          default: begin in_p = wave[(s+2)%4]; in_n = A0; end
        endcase
        end_step();
        if (per == 1) begin
          case (kind)
            0: begin eq = wave[s]; eqb = A0; end
            1: begin eq = A0; eqb = wave[s]; end
            2: begin eq = A0; eqb = A0; end
            default: begin eq = (s == 0) ? A0 : AZ; eqb = eq; end
          endcase
          chk($sformatf("%s step %0d q", name, s), q, eq);
          chk($sformatf("%s step %0d qb", name, s), qb, eqb);
        end
      end
  endtask

  // Bennett: in ramps and holds, pc ramps, holds 3 steps, recovers, idles
  alevel_t bpc_seq [10] = '{A0, A0, AX, A1, A1, A1, AX, A0, A0, A0};
  alevel_t bin_seq [10] = '{AX, A1, A1, A1, A1, A1, A1, A1, AX, A0};

  initial begin
    pc = A0; in_p = A0; in_n = A0; bpc = A0; bin_p = A0; bin_n = A0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_kind(0, "valid1");
    run_kind(1, "valid0");
    run_kind(2, "both0");
    run_kind(0, "valid1b");
    run_kind(3, "both1");
    run_kind(4, "zz");
    run_kind(5, "late");
    run_kind(6, "early");
    run_kind(1, "valid0b");
    // Bennett sequence, two rounds, checked on the second
    for (int rnd = 0; rnd < 2; rnd++)
      for (int s = 0; s < 10; s++) begin
        @(negedge clk);
        bpc = bpc_seq[s]; bin_p = bin_seq[s]; bin_n = A0;
        end_step();
        if (rnd == 1) begin
          chk($sformatf("bennett step %0d q", s), bq, bpc_seq[s]);
          chk($sformatf("bennett step %0d qb", s), bqb, A0);
          if (s == 4) chk("4-phase cell under Bennett clock never evaluates", fq, A0);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
