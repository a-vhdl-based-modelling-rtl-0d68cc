// a_buf_chain_tb: the 4-stage chain on PC1..PC4 and a 3-stage Bennett chain.
//
// 4-phase chain: each power-clock period gets a mode and a data bit. Mode 0
// feeds a valid input through the pulse converter; mode 1 feeds both rails at
// 1 (invalid); modes 2 and 3 feed the input one step late (in phase with PC1)
// or one step early (in phase with PC3). At the end of every step each stage
// in its hold period is checked: valid data must appear on stage k in its
// hold, k quarter periods after stage 0, so the chain delays by one quarter
// per stage; invalid or mistimed inputs must leave Z (invalid) on stage 0, and
// both-rails-1 inputs must carry Z down the whole chain. Checks are made
// only when the modes of the periods involved agree.
// Bennett chain: one data bit per BCD-counter period; at count 4, when all
// three power-clocks hold, every stage must show the data on its true rail
// and the complement on the other.
module a_buf_chain_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0;
  int n_valid = 0, n_invalid = 0, n_skew = 0, n_bennett = 0;

  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(6)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);

  // ---- 4-phase chain ----
  logic inp = 1'b0, inpb = 1'b1;
  int mode = 0;
  logic dat = 1'b0;
  alevel_t c_p, c_n, in_p, in_n;
  alevel_t q_p [4];
  alevel_t q_n [4];
  a_input_conv u_conv (.clk, .rst, .commit, .pc_ref(pc[3]), .inp, .inpb, .in_p(c_p), .in_n(c_n));
  // mode register follows the converter's sampling point
  int mode_q = 0;
  logic dat_q = 1'b0;
  always_ff @(posedge clk) if (commit && pc[3] == A0) begin mode_q <= mode; dat_q <= dat; end
  always_comb begin
    case (mode_q)
      2: begin in_p = dat_q ? pc[0] : A0; in_n = dat_q ? A0 : pc[0]; end
      3: begin in_p = dat_q ? pc[2] : A0; in_n = dat_q ? A0 : pc[2]; end
      default: begin in_p = c_p; in_n = c_n; end
    endcase
  end
  a_buf_chain #(.STAGES(4)) dut (.clk, .rst, .commit, .pc, .in_p, .in_n, .q_p, .q_n);

  // ---- Bennett chain ----
  logic [3:0] bcount;
  alevel_t bref, b_in_p, b_in_n;
  alevel_t bpc [3];
  alevel_t bq_p [3];
  alevel_t bq_n [3];
  logic binp = 1'b0;
  bennett_clk_gen #(.NPC(3)) u_bgen (.clk, .rst, .commit, .count(bcount), .in_ref(bref), .pc(bpc));
  a_input_conv u_bconv (.clk, .rst, .commit, .pc_ref(bref), .inp(binp), .inpb(~binp),
                        .in_p(b_in_p), .in_n(b_in_n));
  a_buf_chain #(.STAGES(3), .BENNETT(1'b1)) dutb (.clk, .rst, .commit, .pc(bpc),
                                                 .in_p(b_in_p), .in_n(b_in_n), .q_p(bq_p), .q_n(bq_n));

  task automatic chk(string what, alevel_t got, alevel_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  // per-period history: index 0 = period whose data is now at stage 0
  int hmode [4] = '{0, 0, 0, 0};
  logic hdat [4] = '{1'b0, 1'b0, 1'b0, 1'b0};
  int periods = 0;

  // driver: one mode/data pair per period, changed right after sampling
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int p = 0; p < 160; p++) begin
      @(posedge clk iff (commit && pc[3] == A0));
      for (int i = 3; i > 0; i--) begin hmode[i] = hmode[i-1]; hdat[i] = hdat[i-1]; end
      hmode[0] = mode; hdat[0] = dat;
      periods++;
      @(negedge clk);
      // blocks of four periods in one mode; valid most of the time
      if (p % 4 == 0) mode = ((p / 4) % 5 == 2) ? 1 : ((p / 4) % 5 == 3) ? 2 + (p / 20) % 2 : 0;
      dat = (mode >= 2) ? 1'b1 : 1'($urandom());
      inp = (mode == 1) ? 1'b1 : dat;
      inpb = (mode == 1) ? 1'b1 : ~dat;
    end
    checks++;
    if (n_valid == 0 || n_invalid == 0 || n_skew == 0 || n_bennett == 0) begin
      failures++;
      $display("FAIL a case was never checked: %0d %0d %0d %0d", n_valid, n_invalid, n_skew, n_bennett);
    end
    $display("checked: valid %0d, both-rails %0d, late/early %0d, bennett %0d",
             n_valid, n_invalid, n_skew, n_bennett);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker at the end of every step
  always @(negedge clk) if (!rst && commit && periods > 4) begin
    for (int k = 0; k < 4; k++) begin
      if (pc[k] == A1) begin
        // stages 0,1 hold in the period just sampled, stages 2,3 one later
        int h;
        h = (k <= 1) ? 0 : 1;
        if (hmode[h] == 0 && hmode[h+1] == 0 && hmode[h+2] == 0) begin
          chk($sformatf("valid stage %0d q", k), q_p[k], hdat[h] ? A1 : A0);
          chk($sformatf("valid stage %0d qb", k), q_n[k], hdat[h] ? A0 : A1);
          n_valid++;
        end else if (hmode[h] == 1 && hmode[h+1] == 1 && hmode[h+2] == 1) begin
          chk($sformatf("both-rails stage %0d q", k), q_p[k], AZ);
          chk($sformatf("both-rails stage %0d qb", k), q_n[k], AZ);
          n_invalid++;
        end else if (k == 0 && hmode[0] >= 2 && hmode[1] == hmode[0] && hdat[0] && hdat[1]) begin
          chk($sformatf("mistimed (mode %0d) stage 0 q", hmode[0]), q_p[0], AZ);
          n_skew++;
        end
      end
    end
  end

  // Bennett driver and checker
  initial begin
    @(negedge rst);
    forever begin
      @(posedge clk iff (commit && bcount == 4'd9));
      @(negedge clk);
      binp = 1'($urandom());
    end
  end
  logic bexp = 1'b0;
  always @(posedge clk) if (commit && bcount == 4'd9) bexp <= binp;
  always @(negedge clk) if (!rst && commit && bcount == 4'd4 && periods > 4) begin
    for (int k = 0; k < 3; k++) begin
      chk($sformatf("bennett stage %0d q", k), bq_p[k], bexp ? A1 : A0);
      chk($sformatf("bennett stage %0d qb", k), bq_n[k], bexp ? A0 : A1);
    end
    n_bennett++;
  end

  initial begin
    repeat (160 * 4 * 6 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
