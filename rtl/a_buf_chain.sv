// a_buf_chain: cascade of dual-rail NOT/BUF cells.
//
// Stage k is clocked by pc[k] and takes the true/complement outputs of stage
// k-1 (stage 0 takes in_p/in_n). With the four phases PC1..PC4 of a 4-phase
// power-clock, each stage adds one quarter period of latency and the chain
// behaves as one full-period delay line, the building block of registers in
// 4-phase adiabatic logic. With Bennett clocking (BENNETT = 1) the chain is
// driven by the nested power-clocks of bennett_clk_gen. Invalid inputs (both
// rails active, or an input arriving early or late against the power-clock)
// show up as Z or 0 on the outputs and travel down the chain.
module a_buf_chain
  import adiabatic_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter bit BENNETT = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,
  input  alevel_t pc   [STAGES],
  input  alevel_t in_p,
  input  alevel_t in_n,
  output alevel_t q_p  [STAGES],
  output alevel_t q_n  [STAGES]
);

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    if (k == 0) begin : g_first
      a_notbuf #(.BENNETT(BENNETT)) u_cell (
        .clk, .rst, .commit, .pc(pc[0]), .in_p, .in_n,
        .q(q_p[0]), .qb(q_n[0])
      );
    end else begin : g_next
      a_notbuf #(.BENNETT(BENNETT)) u_cell (
        .clk, .rst, .commit, .pc(pc[k]), .in_p(q_p[k-1]), .in_n(q_n[k-1]),
        .q(q_p[k]), .qb(q_n[k])
      );
    end
  end

endmodule
