// a_crc16: bit-serial ISO/IEC 14443 CRC (CRC_A) in 4-phase adiabatic logic.
//
// The CRC register CR0..CR15 is a shift register with feedback
// fb = M xor CR15, generator x^16 + x^12 + x^5 + 1 and preset 0x6363:
//   CR0 <= fb,  CRi <= CR(i-1) xor (POLY[i] ? fb : 0)   for i = 1..15.
// The hex value of the register is read with CR0 as its most significant bit.
// Each register bit is a chain of four adiabatic cells clocked by PC1..PC4, so
// the register shifts once per power-clock period. The PC1 cell of a stage
// carries the stage logic as its functional part: the feedback XOR (a
// 2-input XOR for CR0, a 3-input XOR of CR(i-1), CR15 and M for a tap) and
// the load of the preset bit while RES is 1. A preset 1 is the RES rail
// itself, a preset 0 the RESb rail, so no constant power-clock signal is
// needed. The PC2..PC4 cells are plain buffers.
//
// Interface: res_p/res_n and m_p/m_n are dual-rail inputs in the PC4 phase
// (one quarter ahead of PC1); cr_p/cr_n are the register bits, also in the
// PC4 phase, valid in the PC4 hold period. One message bit enters per
// power-clock period. The CRC polynomial, preset and serial operation follow
// the ISO/IEC 14443 benchmark; the cell-level arrangement is this model's own.
module a_crc16
  import adiabatic_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter logic [W-1:0] POLY   = 16'h1021,  // bit i set: fb enters CRi
  parameter logic [W-1:0] PRESET = 16'h6363   // loaded with CR0 as MSB
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,
  input  alevel_t pc    [4],   // PC1..PC4
  input  alevel_t res_p,
  input  alevel_t res_n,
  input  alevel_t m_p,
  input  alevel_t m_n,
  output alevel_t cr_p  [W],
  output alevel_t cr_n  [W]
);

  // dual-rail XOR functional part
  function automatic alevel_t xr_p(alevel_t ap, alevel_t an, alevel_t bp, alevel_t bn);
    return aor(aand(ap, bn), aand(an, bp));
  endfunction
  function automatic alevel_t xr_n(alevel_t ap, alevel_t an, alevel_t bp, alevel_t bn);
    return aor(aand(ap, bp), aand(an, bn));
  endfunction

  alevel_t fb_p, fb_n;
  assign fb_p = xr_p(m_p, m_n, cr_p[W-1], cr_n[W-1]);
  assign fb_n = xr_n(m_p, m_n, cr_p[W-1], cr_n[W-1]);

  for (genvar i = 0; i < W; i++) begin : g_bit
    alevel_t d_p, d_n, f_p, f_n;
    alevel_t s_p [4];
    alevel_t s_n [4];

    // next-state logic of this stage
    if (i == 0) begin : g_fb
      assign d_p = fb_p;
      assign d_n = fb_n;
    end else if (POLY[i]) begin : g_tap
      assign d_p = xr_p(cr_p[i-1], cr_n[i-1], fb_p, fb_n);
      assign d_n = xr_n(cr_p[i-1], cr_n[i-1], fb_p, fb_n);
    end else begin : g_shift
      assign d_p = cr_p[i-1];
      assign d_n = cr_n[i-1];
    end

    // preset load under RES
    if (PRESET[W-1-i]) begin : g_one
      assign f_p = aor(res_p, aand(res_n, d_p));
      assign f_n = aand(res_n, d_n);
    end else begin : g_zero
      assign f_p = aand(res_n, d_p);
      assign f_n = aor(res_p, aand(res_n, d_n));
    end

    a_notbuf u_ph1 (.clk, .rst, .commit, .pc(pc[0]), .in_p(f_p), .in_n(f_n),
                    .q(s_p[0]), .qb(s_n[0]));
    a_notbuf u_ph2 (.clk, .rst, .commit, .pc(pc[1]), .in_p(s_p[0]), .in_n(s_n[0]),
                    .q(s_p[1]), .qb(s_n[1]));
    a_notbuf u_ph3 (.clk, .rst, .commit, .pc(pc[2]), .in_p(s_p[1]), .in_n(s_n[1]),
                    .q(s_p[2]), .qb(s_n[2]));
    a_notbuf u_ph4 (.clk, .rst, .commit, .pc(pc[3]), .in_p(s_p[2]), .in_n(s_n[2]),
                    .q(s_p[3]), .qb(s_n[3]));

    assign cr_p[i] = s_p[3];
    assign cr_n[i] = s_n[3];
  end

endmodule
