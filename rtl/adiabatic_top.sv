// adiabatic_top: demonstrator of the adiabatic cell-library model.
//
// One time base and one 4-phase power-clock generator drive four circuits that
// stand side by side, each with its own ports:
//   * a 4-stage cascade buffer chain on PC1..PC4 fed by a pulse-to-adiabatic
//     converter (chain_*);
//   * a gate row on PC1: a 10-input XOR/XNOR, a 4-input AND/NAND, a 4-input
//     OR/NOR, a 2:1 MUX and a 1:2 DeMUX, sharing ten converted inputs (gate_*);
//   * a 3-stage buffer chain under Bennett clocking, with its own BCD-counter
//     clock generator (bennett_*);
//   * the ISO/IEC 14443 CRC-16 unit: RES and message converters, the adiabatic
//     CRC register and the message-bit counter (crc_*).
// Every adiabatic result is also sampled into ordinary logic in its hold
// period, with a per-bit flag for invalid dual-rail states.
//
// Timing: a step (one quarter of the 4-phase power-clock period) is DELTAS clk
// cycles; commit marks its last cycle. Pulse inputs are sampled at the end of
// the step in which their reference clock is idle (phase 11 for the 4-phase
// circuits), so they may change at any time and are taken once per period.
// gate inputs: AND uses gate 0..3, OR uses 4..7, MUX selects with gate 8
// between gate 9 (select 0) and gate 0 (select 1), and the DeMUX routes gate 9
// to its output 0 (gate 8 = 0) or output 1 (gate 8 = 1). This assignment, the
// samplers and the counter are this model's own; the circuits follow the
// modelling approach and its benchmark.
module adiabatic_top
  import adiabatic_pkg::*;
#(
  parameter int unsigned DELTAS = DEF_DELTAS,
  parameter int unsigned XOR_N  = 10
) (
  input  logic        clk,
  input  logic        rst,
  // time base
  output logic        commit,
  output logic [1:0]  phase,
  output alevel_t     pc        [4],
  // 4-stage buffer chain
  input  logic        chain_inp,
  input  logic        chain_inpb,
  output alevel_t     chain_q_p [4],
  output alevel_t     chain_q_n [4],
  output logic        chain_out,
  output logic        chain_err,
  // gate row
  input  logic [XOR_N-1:0] gate_inp,
  input  logic [XOR_N-1:0] gate_inpb,
  output alevel_t     gate_q_p  [6],   // 0 XOR, 1 AND, 2 OR, 3 MUX, 4/5 DeMUX y0/y1
  output alevel_t     gate_q_n  [6],
  output logic [5:0]  gate_out,
  output logic [5:0]  gate_err,
  // Bennett-clocked chain
  input  logic        bennett_inp,
  input  logic        bennett_inpb,
  output alevel_t     bennett_in_ref,
  output alevel_t     bennett_pc  [3],
  output alevel_t     bennett_q_p [3],
  output alevel_t     bennett_q_n [3],
  output logic        bennett_out,
  output logic        bennett_err,
  // CRC-16 unit
  input  logic        crc_res,
  input  logic        crc_m,
  output alevel_t     crc_cr_p  [16],
  output alevel_t     crc_cr_n  [16],
  output logic [15:0] crc_value,       // CR0 is bit 15
  output logic [15:0] crc_err,
  output logic        crc_sampled,
  output logic        crc_valid,       // crc_value is the final CRC
  output logic [3:0]  crc_count
);

  // ---------------- time base and 4-phase power-clock ----------------
  a_timebase #(.DELTAS(DELTAS)) u_tb (.clk, .rst, .commit);
  pc4_gen u_pc (.clk, .rst, .commit, .phase, .pc);

  // ---------------- 4-stage cascade buffer chain ----------------
  alevel_t ch_in_p, ch_in_n;
  logic [0:0] ch_val, ch_err;
  a_input_conv u_ch_conv (.clk, .rst, .commit, .pc_ref(pc[3]),
                          .inp(chain_inp), .inpb(chain_inpb),
                          .in_p(ch_in_p), .in_n(ch_in_n));
  a_buf_chain #(.STAGES(4)) u_chain (.clk, .rst, .commit, .pc,
                                     .in_p(ch_in_p), .in_n(ch_in_n),
                                     .q_p(chain_q_p), .q_n(chain_q_n));
  a_to_bin #(.W(1)) u_ch_bin (.clk, .rst, .commit, .pc(pc[3]),
                              .sig_p(chain_q_p[3:3]), .sig_n(chain_q_n[3:3]),
                              .value(ch_val), .err(ch_err), .sampled());
  assign chain_out = ch_val[0];
  assign chain_err = ch_err[0];

  // ---------------- gate row on PC1 ----------------
  alevel_t g_p [XOR_N];
  alevel_t g_n [XOR_N];
  for (genvar i = 0; i < XOR_N; i++) begin : g_conv
    a_input_conv u_conv (.clk, .rst, .commit, .pc_ref(pc[3]),
                         .inp(gate_inp[i]), .inpb(gate_inpb[i]),
                         .in_p(g_p[i]), .in_n(g_n[i]));
  end

  a_xor #(.N(XOR_N)) u_xor (.clk, .rst, .commit, .pc(pc[0]), .a_p(g_p), .a_n(g_n),
                            .q(gate_q_p[0]), .qb(gate_q_n[0]));
  a_and #(.N(4)) u_and (.clk, .rst, .commit, .pc(pc[0]),
                        .a_p(g_p[0:3]), .a_n(g_n[0:3]),
                        .q(gate_q_p[1]), .qb(gate_q_n[1]));
  a_or #(.N(4)) u_or (.clk, .rst, .commit, .pc(pc[0]),
                      .a_p(g_p[4:7]), .a_n(g_n[4:7]),
                      .q(gate_q_p[2]), .qb(gate_q_n[2]));
  a_mux2 u_mux (.clk, .rst, .commit, .pc(pc[0]),
                .s_p(g_p[8]), .s_n(g_n[8]), .d0_p(g_p[9]), .d0_n(g_n[9]),
                .d1_p(g_p[0]), .d1_n(g_n[0]),
                .q(gate_q_p[3]), .qb(gate_q_n[3]));
  a_demux2 u_demux (.clk, .rst, .commit, .pc(pc[0]),
                    .s_p(g_p[8]), .s_n(g_n[8]), .d_p(g_p[9]), .d_n(g_n[9]),
                    .y0(gate_q_p[4]), .y0b(gate_q_n[4]), .y1(gate_q_p[5]), .y1b(gate_q_n[5]));
  a_to_bin #(.W(6)) u_g_bin (.clk, .rst, .commit, .pc(pc[0]),
                             .sig_p(gate_q_p), .sig_n(gate_q_n),
                             .value(gate_out), .err(gate_err), .sampled());

  // ---------------- Bennett-clocked 3-stage chain ----------------
  alevel_t bn_in_p, bn_in_n;
  logic [0:0] bn_val, bn_err;
  bennett_clk_gen #(.NPC(3)) u_bgen (.clk, .rst, .commit, .count(),
                                     .in_ref(bennett_in_ref), .pc(bennett_pc));
  a_input_conv u_bn_conv (.clk, .rst, .commit, .pc_ref(bennett_in_ref),
                          .inp(bennett_inp), .inpb(bennett_inpb),
                          .in_p(bn_in_p), .in_n(bn_in_n));
  a_buf_chain #(.STAGES(3), .BENNETT(1'b1)) u_bchain (
    .clk, .rst, .commit, .pc(bennett_pc), .in_p(bn_in_p), .in_n(bn_in_n),
    .q_p(bennett_q_p), .q_n(bennett_q_n));
  a_to_bin #(.W(1)) u_bn_bin (.clk, .rst, .commit, .pc(bennett_pc[2]),
                              .sig_p(bennett_q_p[2:2]), .sig_n(bennett_q_n[2:2]),
                              .value(bn_val), .err(bn_err), .sampled());
  assign bennett_out = bn_val[0];
  assign bennett_err = bn_err[0];

  // ---------------- CRC-16 unit ----------------
  alevel_t res_p, res_n, m_p, m_n;
  alevel_t crr_p [16];
  alevel_t crr_n [16];
  logic crc_done;
  a_input_conv u_res_conv (.clk, .rst, .commit, .pc_ref(pc[3]),
                           .inp(crc_res), .inpb(~crc_res),
                           .in_p(res_p), .in_n(res_n));
  a_input_conv u_m_conv (.clk, .rst, .commit, .pc_ref(pc[3]),
                         .inp(crc_m), .inpb(~crc_m),
                         .in_p(m_p), .in_n(m_n));
  a_crc16 u_crc (.clk, .rst, .commit, .pc, .res_p, .res_n, .m_p, .m_n,
                 .cr_p(crc_cr_p), .cr_n(crc_cr_n));
  // CR0 becomes the most significant bit of the sampled value
  for (genvar i = 0; i < 16; i++) begin : g_rev
    assign crr_p[i] = crc_cr_p[15-i];
    assign crr_n[i] = crc_cr_n[15-i];
  end
  a_to_bin #(.W(16)) u_crc_bin (.clk, .rst, .commit, .pc(pc[3]),
                                .sig_p(crr_p), .sig_n(crr_n),
                                .value(crc_value), .err(crc_err),
                                .sampled(crc_sampled));
  crc_counter #(.NBITS(16)) u_cnt (.clk, .rst, .commit, .phase, .res(crc_res),
                                   .count(crc_count), .busy(), .done(crc_done));
  assign crc_valid = crc_sampled && crc_done;

endmodule
