// a_crc16_tb: the adiabatic CRC register against a software CRC_A model.
//
// RES and the message bit go through pulse converters referenced to PC4. The
// reference model is the reflected form of the ISO/IEC 14443 CRC_A on a
// 16-bit integer c (c = 0x6363 on RES; per bit: fb = c[0] ^ m, c >>= 1,
// c ^= fb ? 0x8408 : 0), whose value equals the register read with CR0 as the
// most significant bit. The register bits are read in every PC4 hold period
// and must equal the model state after the bit taken at the second-last
// sampling point: each bit crosses one PC1..PC4 stage, one power-clock period.
// The first message is the benchmark's 16-bit word 0100100000101100 (first
// bit sent first), whose CRC must be 0xCF26; random messages follow.
module a_crc16_tb;
  import adiabatic_pkg::*;
  int checks = 0, failures = 0;
  int finals = 0;

  logic clk = 1'b0, rst = 1'b1, commit;
  logic [1:0] phase;
  alevel_t pc [4];
  always #5 clk = ~clk;

  a_timebase #(.DELTAS(6)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);

  logic res = 1'b1, m = 1'b0;
  alevel_t res_p, res_n, m_p, m_n;
  alevel_t cr_p [16];
  alevel_t cr_n [16];
  a_input_conv u_rc (.clk, .rst, .commit, .pc_ref(pc[3]), .inp(res), .inpb(~res), .in_p(res_p), .in_n(res_n));
  a_input_conv u_mc (.clk, .rst, .commit, .pc_ref(pc[3]), .inp(m), .inpb(~m), .in_p(m_p), .in_n(m_n));
  a_crc16 dut (.clk, .rst, .commit, .pc, .res_p, .res_n, .m_p, .m_n, .cr_p, .cr_n);

  function automatic logic [15:0] crc_step(logic [15:0] c, logic b);
    logic fb;
    fb = c[0] ^ b;
    c = c >> 1;
    if (fb) c = c ^ 16'h8408;
    return c;
  endfunction

  // model state after each sampling point: hist[0] latest
  logic [15:0] hist [3] = '{16'h0, 16'h0, 16'h0};
  int nsamp = 0;
  int bits_left = -1;        // bits of the current message still to go
  logic expect_final = 1'b0; // the state in hist[0] is a final CRC
  logic fin_q [2] = '{1'b0, 1'b0};
  logic [15:0] final_exp = 16'h0;

  always @(posedge clk) if (!rst && commit && pc[3] == A0) begin
    hist[2] <= hist[1];
    hist[1] <= hist[0];
    hist[0] <= res ? 16'h6363 : crc_step(hist[0], m);
    fin_q[1] <= fin_q[0];
    fin_q[0] <= (bits_left == 1);
    nsamp <= nsamp + 1;
  end

  logic [15:0] got;
  logic rails_ok;
  always @(negedge clk) if (!rst && commit && pc[3] == A1 && nsamp >= 3) begin
    rails_ok = 1'b1;
    for (int i = 0; i < 16; i++) begin
      got[15-i] = (cr_p[i] == A1);
      rails_ok &= (cr_p[i] == A1 && cr_n[i] == A0) || (cr_p[i] == A0 && cr_n[i] == A1);
    end
    checks += 2;
    if (!rails_ok) begin failures++; $display("FAIL invalid rails in register"); end
    if (got != hist[1]) begin
      failures++;
      $display("FAIL register %h expected %h", got, hist[1]);
    end
    if (fin_q[1]) begin
      finals++;
      checks++;
      if (finals == 1 && got != 16'hCF26) begin
        failures++;
        $display("FAIL benchmark CRC %h expected cf26", got);
      end
      $display("final CRC %h", got);
    end
  end

  task automatic send(logic r, logic b);
    @(posedge clk iff (commit && pc[3] == A0));
    @(negedge clk);
    res = r; m = b;
  endtask

  logic [15:0] msg;
  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 6; k++) begin
      msg = (k == 0) ? 16'b0100100000101100 : 16'($urandom());
      send(1'b1, 1'b0); send(1'b1, 1'b0);
      for (int i = 15; i >= 0; i--) begin
        send(1'b0, msg[i]);
        bits_left = i + 1;
      end
      send(1'b0, 1'b0); bits_left = 0;
      send(1'b0, 1'b0); bits_left = -1;
      send(1'b0, 1'b0);
    end
    send(1'b0, 1'b0); send(1'b0, 1'b0);
    checks++;
    if (finals != 6) begin failures++; $display("FAIL %0d final values seen", finals); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * 22 * 4 * 6 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
