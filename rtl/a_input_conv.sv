// a_input_conv: pulse to adiabatic dual-rail input conversion.
//
// Two ordinary logic inputs, inp and inpb, are turned into the multi-level
// adiabatic signals in_p and in_n. Each rail copies the level of the
// reference power-clock pc_ref while its pulse input is 1 and stays at 0
// otherwise. The pulse inputs are sampled at the end of every step in which
// pc_ref is idle, so a rail always makes whole Evaluation-Hold-Recovery-Idle
// cycles. For the first stage of a 4-phase pipeline clocked by PC1, pc_ref is
// PC4 (one quarter ahead). Driving inpb = ~inp gives a valid dual-rail input;
// the other two combinations give the invalid inputs used to check the
// gates. Sampling in the idle period is this model's choice.
module a_input_conv
  import adiabatic_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,
  input  alevel_t pc_ref,
  input  logic    inp,
  input  logic    inpb,
  output alevel_t in_p,
  output alevel_t in_n
);

  logic d, db;

  always_ff @(posedge clk) begin
    if (rst) begin
      d  <= 1'b0;
      db <= 1'b0;
    end else if (commit && pc_ref == A0) begin
      d  <= inp;
      db <= inpb;
    end
  end

  assign in_p = d  ? pc_ref : A0;
  assign in_n = db ? pc_ref : A0;

endmodule
