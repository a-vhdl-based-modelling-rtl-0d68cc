// adiabatic_top_tb: end-to-end test of the whole demonstrator at its default
// parameters (it is also the full-size test).
//
// All pulse inputs change right after the 4-phase sampling point (the end of
// the step in which PC4 is idle); the Bennett input changes after its own
// sampling point (BCD count 9). Per period the test records what was
// sampled and checks, one sampling point later or two:
//   * the 4-stage chain: valid data reaches chain_out two sampling points
//     later; both rails at 1 give Z (flagged invalid) on the last stage; both
//     rails at 0 give 0 on both rails (flagged invalid);
//   * the gate row: XOR of 10, AND of 4, OR of 4, the MUX and the DeMUX one sampling
//     point later; an input with both rails at 1 is flagged invalid on XOR;
//   * the Bennett chain: the data reaches bennett_out in the same BCD period;
//   * the CRC unit: the preset 0x6363 while RES is applied, the register state
//     against a software CRC_A model, and the final CRC at crc_valid, which
//     must be 0xCF26 for the benchmark message 0100100000101100.
// Each of these mechanisms is counted and must have happened at least once.
module adiabatic_top_tb;
  import adiabatic_pkg::*;

  int checks = 0, failures = 0;
  int n_chain_valid = 0, n_chain_both1 = 0, n_chain_both0 = 0;
  int n_xor = 0, n_and = 0, n_or = 0, n_mux = 0, n_demux = 0, n_gate_invalid = 0;
  int n_bennett = 0, n_crc_preset = 0, n_crc_state = 0, n_crc_final = 0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic commit;
  logic [1:0] phase;
  alevel_t pc [4];
  logic chain_inp = 1'b0, chain_inpb = 1'b1;
  alevel_t chain_q_p [4];
  alevel_t chain_q_n [4];
  logic chain_out, chain_err;
  logic [9:0] gate_inp = '0, gate_inpb = '1;
  alevel_t gate_q_p [6];
  alevel_t gate_q_n [6];
  logic [5:0] gate_out, gate_err;
  logic bennett_inp = 1'b0;
  alevel_t bennett_in_ref;
  alevel_t bennett_pc [3];
  alevel_t bennett_q_p [3];
  alevel_t bennett_q_n [3];
  logic bennett_out, bennett_err;
  logic crc_res = 1'b1, crc_m = 1'b0;
  alevel_t crc_cr_p [16];
  alevel_t crc_cr_n [16];
  logic [15:0] crc_value, crc_err;
  logic crc_sampled, crc_valid;
  logic [3:0] crc_count;

  adiabatic_top dut (
    .clk, .rst, .commit, .phase, .pc,
    .chain_inp, .chain_inpb, .chain_q_p, .chain_q_n, .chain_out, .chain_err,
    .gate_inp, .gate_inpb, .gate_q_p, .gate_q_n, .gate_out, .gate_err,
    .bennett_inp, .bennett_inpb(~bennett_inp), .bennett_in_ref, .bennett_pc,
    .bennett_q_p, .bennett_q_n, .bennett_out, .bennett_err,
    .crc_res, .crc_m, .crc_cr_p, .crc_cr_n, .crc_value, .crc_err, .crc_sampled,
    .crc_valid, .crc_count
  );

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] crc_step(logic [15:0] c, logic b);
    logic fb;
    fb = c[0] ^ b;
    c = c >> 1;
    if (fb) c = c ^ 16'h8408;
    return c;
  endfunction

  // ---- records of what was sampled: index 0 = latest sampling point ----
  int        r_cmode [4] = '{0, 0, 0, 0};       // chain: 0 valid, 1 both 1, 2 both 0
  logic      r_cdat  [4] = '{1'b0, 1'b0, 1'b0, 1'b0};
  logic [9:0] r_g    [2] = '{10'h0, 10'h0};
  logic      r_ginv  [2] = '{1'b0, 1'b0};
  logic [15:0] r_crc [2] = '{16'h0, 16'h0};
  logic      r_res   [2] = '{1'b0, 1'b0};
  int nsamp = 0;

  // next inputs, chosen by the stimulus process
  int   cmode = 0;
  logic cdat = 1'b0;
  logic ginv = 1'b0;

  always @(posedge clk) if (!rst && commit && phase == 2'b11) begin
    for (int i = 3; i > 0; i--) begin r_cmode[i] <= r_cmode[i-1]; r_cdat[i] <= r_cdat[i-1]; end
    r_cmode[0] <= cmode; r_cdat[0] <= cdat;
    r_g[1] <= r_g[0];   r_g[0] <= gate_inp;
    r_ginv[1] <= r_ginv[0]; r_ginv[0] <= ginv;
    r_crc[1] <= r_crc[0];
    r_crc[0] <= crc_res ? 16'h6363 : crc_step(r_crc[0], crc_m);
    r_res[1] <= r_res[0]; r_res[0] <= crc_res;
    nsamp <= nsamp + 1;
  end

  // ---- checks at the end of the step before each sampling point ----
  always @(negedge clk) if (!rst && commit && phase == 2'b11 && nsamp >= 4) begin
    // chain: last stage held data sampled two points back
    if (r_cmode[1] == r_cmode[2] && r_cmode[2] == r_cmode[3]) begin
      case (r_cmode[1])
        0: begin
          chk("chain out", 16'(chain_out), 16'(r_cdat[1]));
          chk("chain err", 16'(chain_err), 16'd0);
          n_chain_valid++;
        end
        1: begin
          chk("chain both-1 err", 16'(chain_err), 16'd1);
          n_chain_both1++;
        end
        default: begin
          chk("chain both-0 out", 16'(chain_out), 16'd0);
          chk("chain both-0 err", 16'(chain_err), 16'd1);
          n_chain_both0++;
        end
      endcase
    end
    // gate row: inputs sampled one point back
    if (!r_ginv[0]) begin
      chk("xor", 16'(gate_out[0]), 16'(^r_g[0]));
      chk("and", 16'(gate_out[1]), 16'(&r_g[0][3:0]));
      chk("or",  16'(gate_out[2]), 16'(|r_g[0][7:4]));
      chk("mux", 16'(gate_out[3]), 16'(r_g[0][8] ? r_g[0][0] : r_g[0][9]));
      chk("demux y0", 16'(gate_out[4]), 16'(!r_g[0][8] && r_g[0][9]));
      chk("demux y1", 16'(gate_out[5]), 16'(r_g[0][8] && r_g[0][9]));
      chk("gate err", 16'(gate_err), 16'd0);
      n_xor++; n_and++; n_or++; n_mux++; n_demux++;
    end else begin
      chk("xor invalid flagged", 16'(gate_err[0]), 16'd1);
      n_gate_invalid++;
    end
    // CRC register state
    if (nsamp >= 6) begin
      chk("crc register", crc_value, r_crc[1]);
      chk("crc rails", crc_err, 16'h0);
      n_crc_state++;
      if (r_res[1]) begin
        chk("crc preset", crc_value, 16'h6363);
        n_crc_preset++;
      end
    end
  end

  // ---- final CRC ----
  logic [15:0] final_exp [$];
  always @(negedge clk) if (!rst && crc_valid) begin
    if (final_exp.size() == 0) begin
      checks++; failures++;
      $display("FAIL unexpected crc_valid");
    end else begin
      chk("final crc", crc_value, final_exp.pop_front());
      n_crc_final++;
    end
  end

  // ---- Bennett chain ----
  logic bexp = 1'b0;
  logic [3:0] bcnt = '0;
  int bper = 0;
  always @(posedge clk) if (!rst && commit) begin
    bcnt <= (bcnt == 4'd9) ? 4'd0 : bcnt + 1'b1;
    if (bcnt == 4'd9) begin bexp <= bennett_inp; bper <= bper + 1; end
  end
  // bennett_out is sampled at the end of the PC3 hold step (count 4)
  always @(negedge clk) if (!rst && commit && bcnt == 4'd5 && bper >= 1) begin
    chk("bennett out", 16'(bennett_out), 16'(bexp));
    chk("bennett err", 16'(bennett_err), 16'd0);
    n_bennett++;
  end
  initial begin
    @(negedge rst);
    forever begin
      @(posedge clk iff (commit && bcnt == 4'd9));
      @(negedge clk);
      bennett_inp = 1'($urandom());
    end
  end

  // ---- stimulus for the 4-phase circuits, one set per period ----
  task automatic next_period();
    @(posedge clk iff (commit && phase == 2'b11));
    @(negedge clk);
  endtask

  logic [15:0] msg, c;
  int p = 0;
  task automatic drive_other();
    // chain: blocks of 6 periods, mostly valid
    if (p % 6 == 0) cmode = ((p / 6) % 4 == 1) ? 1 : ((p / 6) % 4 == 3) ? 2 : 0;
    cdat = 1'($urandom());
    chain_inp  = (cmode == 1) ? 1'b1 : (cmode == 2) ? 1'b0 : cdat;
    chain_inpb = (cmode == 1) ? 1'b1 : (cmode == 2) ? 1'b0 : ~cdat;
    // gate row: random bits, every ninth period one input with both rails 1
    gate_inp  = 10'($urandom());
    gate_inpb = ~gate_inp;
    ginv = (p % 9 == 4);
    if (ginv) begin gate_inp[3] = 1'b1; gate_inpb[3] = 1'b1; end
    p++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4; k++) begin
      msg = (k == 0) ? 16'b0100100000101100 : 16'($urandom());
      c = 16'h6363;
      for (int i = 15; i >= 0; i--) c = crc_step(c, msg[i]);
      if (k == 0) chk("benchmark reference", c, 16'hCF26);
      final_exp.push_back(c);
      repeat (3) begin next_period(); crc_res = 1'b1; crc_m = 1'b0; drive_other(); end
      for (int i = 15; i >= 0; i--) begin
        next_period(); crc_res = 1'b0; crc_m = msg[i]; drive_other();
      end
      repeat (3) begin next_period(); crc_m = 1'b0; drive_other(); end
    end
    repeat (3) next_period();
    checks++;
    if (final_exp.size() != 0) begin failures++; $display("FAIL %0d final CRCs never seen", final_exp.size()); end
    $display("mechanisms: chain valid %0d, both-1 %0d, both-0 %0d; xor %0d and %0d or %0d mux %0d, gate invalid %0d;",
             n_chain_valid, n_chain_both1, n_chain_both0, n_xor, n_and, n_or, n_mux, n_gate_invalid);
    $display("            bennett %0d; crc preset %0d, state %0d, final %0d",
             n_bennett, n_crc_preset, n_crc_state, n_crc_final);
    if (n_chain_valid == 0) begin failures++; $display("FAIL chain valid never happened"); end
    if (n_chain_both1 == 0) begin failures++; $display("FAIL chain both-1 never happened"); end
    if (n_chain_both0 == 0) begin failures++; $display("FAIL chain both-0 never happened"); end
    if (n_xor == 0 || n_and == 0 || n_or == 0 || n_mux == 0 || n_demux == 0) begin failures++; $display("FAIL a gate was never checked"); end
    if (n_gate_invalid == 0) begin failures++; $display("FAIL gate invalid never happened"); end
    if (n_bennett == 0) begin failures++; $display("FAIL Bennett chain never checked"); end
    if (n_crc_preset == 0) begin failures++; $display("FAIL CRC preset never seen"); end
    if (n_crc_state == 0) begin failures++; $display("FAIL CRC state never checked"); end
    if (n_crc_final != 4) begin failures++; $display("FAIL %0d final CRCs", n_crc_final); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 22 * 4 * 6 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
