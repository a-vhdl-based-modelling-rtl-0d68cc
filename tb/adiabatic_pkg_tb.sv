// adiabatic_pkg_tb: checks the shared level functions.
// The Aand/Aor results are compared with the adiabatic truth tables written
// out here as strings (rows and columns in the order 0, 1, x, z); the edge
// functions and a few NOT/BUF decisions are compared with hand-worked values.
module adiabatic_pkg_tb;
  import adiabatic_pkg::*;

  int checks = 0, failures = 0;

  // rows: first operand, columns: second operand, order 0 1 x z
  localparam string AND_TAB = {"000z", "01zz", "0zxz", "zzzz"};
  localparam string OR_TAB  = {"01xz", "11zz", "xzxz", "zzzz"};

  function automatic alevel_t from_char(byte c);
    case (c)
      "0": return A0;
      "1": return A1;
      "x": return AX;
      default: return AZ;
    endcase
  endfunction

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  alevel_t lv [4] = '{A0, A1, AX, AZ};
  nb_result_t r;

  // watchdog: the checks take no simulated time, so this only fires if the
  // main block stops early
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        check($sformatf("aand %0d %0d", a, b), aand(lv[a], lv[b]), from_char(AND_TAB[a*4+b]));
        check($sformatf("aor %0d %0d", a, b),  aor(lv[a], lv[b]),  from_char(OR_TAB[a*4+b]));
      end
    // edges
    check("eval 0->X", evaluate_edge(A0, AX), 1);
    check("eval 0->Z", evaluate_edge(A0, AZ), 1);
    check("eval X->X", evaluate_edge(AX, AX), 0);
    check("hold X->1", hold_edge(AX, A1), 1);
    check("hold 0->1", hold_edge(A0, A1), 0);
    check("rec 1->X", recovery_edge(A1, AX), 1);
    check("rec X->0", recovery_edge(AX, A0), 0);
    check("idle X->0", idle_edge(AX, A0), 1);
    check("idle 1->0", idle_edge(A1, A0), 0);
    // NOT/BUF process decisions
    r = notbuf_eval(AX, AX, A1, A0, A0, 1'b0);  // evaluation, valid 1
    check("nb eval1 hit", r.hit, 1); check("nb eval1 q", r.q, AX); check("nb eval1 qb", r.qb, A0);
    r = notbuf_eval(AX, A0, A0, AX, A1, 1'b0);  // evaluation, valid 0
    check("nb eval0 q", r.q, A0); check("nb eval0 qb", r.qb, AX);
    r = notbuf_eval(AX, AX, A1, AX, A1, 1'b0);  // both rails evaluate
    check("nb both q", r.q, AZ); check("nb both qb", r.qb, AZ);
    r = notbuf_eval(A1, A1, AX, A0, A0, 1'b0);  // hold, valid 1
    check("nb hold q", r.q, A1); check("nb hold qb", r.qb, A0);
    r = notbuf_eval(AX, AX, A0, A0, A0, 1'b0);  // recovery, valid 1
    check("nb rec q", r.q, AX);
    r = notbuf_eval(A0, A1, AX, A0, A0, 1'b0);  // idle forces 0
    check("nb idle q", r.q, A0); check("nb idle hit", r.hit, 1);
    r = notbuf_eval(AX, A0, AX, A0, A0, 1'b0);  // input evaluates with pc: too late
    check("nb late q", r.q, AZ);
    r = notbuf_eval(A1, A1, A1, A0, A0, 1'b0);  // steady input, 4-phase: no branch
    check("nb steady hit", r.hit, 0);
    r = notbuf_eval(A1, A1, A1, A0, A0, 1'b1);  // steady input, Bennett
    check("nb bennett hit", r.hit, 1); check("nb bennett q", r.q, A1);
    r = notbuf_eval(A1, AZ, AZ, AZ, AZ, 1'b0);  // invalid state cascades
    check("nb zz q", r.q, AZ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
