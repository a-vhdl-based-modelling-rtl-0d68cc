// benchmark_workloads_tb: the evaluated scenarios of the modelling approach,
// replayed on adiabatic_top at its default parameters.
//   1. NOT/BUF invalid-input sequence: the chain input is a valid 1 for two
//      periods, then both rails 0, then both rails 1, then a valid 0, four
//      periods each. Expected on the last stage, two sampling points later:
//      1 / 0 flagged invalid (outputs kept at 0) / Z flagged invalid / 0.
//   2. 10-input XOR: inputs 1..10 are switched to 1 one per period and stay
//      there, so the number of ones grows 1, 2, ..., 10 and the XOR output
//      alternates 1, 0, 1, ...; the XNOR rail is its complement.
//   3. Bennett chain with the input held at 1: every stage holds 1 in every
//      BCD period and its complement rail stays 0.
//   4. CRC-16 benchmark: RES for four periods (register shows 0x6363), then the
//      16-bit message 0100100000101100; crc_valid must come with 0xCF26
//      exactly 16 sampling points after the first message bit was taken
//      (one after the last bit).
module benchmark_workloads_tb;
  import adiabatic_pkg::*;

  int checks = 0, failures = 0;
  int n_inv0 = 0, n_inv1 = 0, n_xor = 0, n_bennett = 0, n_preset = 0, n_final = 0;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic commit;
  logic [1:0] phase;
  alevel_t pc [4];
  logic chain_inp = 1'b1, chain_inpb = 1'b0;
  alevel_t chain_q_p [4];
  alevel_t chain_q_n [4];
  logic chain_out, chain_err;
  logic [9:0] gate_inp = '0, gate_inpb = '1;
  alevel_t gate_q_p [6];
  alevel_t gate_q_n [6];
  logic [5:0] gate_out, gate_err;
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
    .bennett_inp(1'b1), .bennett_inpb(1'b0), .bennett_in_ref, .bennett_pc,
    .bennett_q_p, .bennett_q_n, .bennett_out, .bennett_err,
    .crc_res, .crc_m, .crc_cr_p, .crc_cr_n, .crc_value, .crc_err, .crc_sampled,
    .crc_valid, .crc_count
  );

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // sampling-point counter: incremented when the 4-phase inputs are taken
  int sp = 0;
  always @(posedge clk) if (!rst && commit && phase == 2'b11) sp <= sp + 1;

  // chain schedule per sampling point: 0 valid 1, 1 both 0, 2 both 1, 3 valid 0
  function automatic int chain_mode(int n);
    return (n < 4) ? 0 : (n < 8) ? 1 : (n < 12) ? 2 : 3;
  endfunction
  function automatic int ones_at(int n);   // XOR inputs at 1 when taken at n
    return (n < 1) ? 0 : (n > 10) ? 10 : n;
  endfunction

  // drive right after each sampling point for the next one
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 1; n <= 40; n++) begin
      @(posedge clk iff (commit && phase == 2'b11));
      @(negedge clk);
      // values for sampling point n+1 (sp now equals n)
      case (chain_mode(n + 1))
        0: begin chain_inp = 1'b1; chain_inpb = 1'b0; end
        1: begin chain_inp = 1'b0; chain_inpb = 1'b0; end
        2: begin chain_inp = 1'b1; chain_inpb = 1'b1; end
        default: begin chain_inp = 1'b0; chain_inpb = 1'b1; end
      endcase
      for (int i = 0; i < 10; i++) gate_inp[i] = (i < ones_at(n + 1));
      gate_inpb = ~gate_inp;
      // CRC: RES up to point 4, message bits at points 5..20
      crc_res = (n + 1 <= 4);
      crc_m = (n + 1 >= 5 && n + 1 <= 20) ? msg_bit(n + 1 - 5) : 1'b0;
    end
    checks += 6;
    if (n_inv0 == 0) begin failures++; $display("FAIL both-0 case never checked"); end
    if (n_inv1 == 0) begin failures++; $display("FAIL both-1 case never checked"); end
    if (n_xor < 10) begin failures++; $display("FAIL XOR checked %0d times", n_xor); end
    if (n_bennett == 0) begin failures++; $display("FAIL Bennett never checked"); end
    if (n_preset == 0) begin failures++; $display("FAIL preset never seen"); end
    if (n_final != 1) begin failures++; $display("FAIL final CRC seen %0d times", n_final); end
    $display("cases: both-0 %0d, both-1 %0d, xor %0d, bennett %0d, preset %0d, final %0d",
             n_inv0, n_inv1, n_xor, n_bennett, n_preset, n_final);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] MSG = 16'b0100100000101100;
  function automatic logic msg_bit(int i);
    return MSG[15 - i];
  endfunction

  // checks at the end of the step before sampling point sp+1
  always @(negedge clk) if (!rst && commit && phase == 2'b11 && sp >= 2) begin
    // chain: data taken at point sp-1, stable for the two points before it
    if (chain_mode(sp - 1) == chain_mode(sp - 3)) begin
      case (chain_mode(sp - 1))
        0: begin chk("chain valid 1", chain_out, 1); chk("chain valid 1 err", chain_err, 0); end
        1: begin chk("chain both-0 out", chain_out, 0); chk("chain both-0 err", chain_err, 1);
                 chk("chain both-0 rails", int'(chain_q_p[3] == A0 && chain_q_n[3] == A0), 1); n_inv0++; end
        2: begin chk("chain both-1 err", chain_err, 1); n_inv1++; end
        default: begin chk("chain valid 0", chain_out, 0); chk("chain valid 0 err", chain_err, 0); end
      endcase
    end
    // XOR: inputs taken at point sp
    if (sp >= 1 && sp <= 12) begin
      chk($sformatf("xor of %0d ones", ones_at(sp)), gate_out[0], ones_at(sp) % 2);
      chk("xor rails", gate_err[0], 0);
      n_xor++;
    end
    // CRC preset while RES (taken at sp-1)
    if (sp - 1 >= 2 && sp - 1 <= 4) begin
      chk("crc preset", crc_value, 16'h6363);
      n_preset++;
    end
  end

  // final CRC: bits taken at points 5..20, valid after point 21
  always @(negedge clk) if (!rst && crc_valid) begin
    chk("final crc", crc_value, 16'hCF26);
    chk("final crc sampling point", sp, 5 + 16);
    n_final++;
  end

  // Bennett: Q03 sampled in its hold; input is always 1
  int bsteps = 0;
  always @(negedge clk) if (!rst && commit) begin
    bsteps++;
    if (bsteps > 20 && bennett_pc[2] == A1) begin
      for (int k = 0; k < 3; k++) begin
        chk($sformatf("bennett Q0%0d", k + 1), int'(bennett_q_p[k]), int'(A1));
        chk($sformatf("bennett Q0%0db", k + 1), int'(bennett_q_n[k]), int'(A0));
      end
      n_bennett++;
    end
  end

  initial begin
    repeat (45 * 4 * 6 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
