// a_timebase: step strobe for the adiabatic model.
//
// The model advances in simulation steps; in 4-phase operation a step is one
// quarter of the power-clock period (one of the Evaluation, Hold, Recovery
// and Idle periods). Each step is DELTAS clk cycles long so that a chain of
// cells can settle within it, one cell per clk cycle. commit is high in the
// last clk cycle of every step; power-clock generators advance and cells
// take their edge history on that cycle. DELTAS must be larger than the
// longest chain of cells that change in one step (4 for a 4-phase pipeline,
// the number of stages for a Bennett chain). The settle scheme is this
// model's own; it stands in for the delta cycles of an event simulator.
module a_timebase #(
  parameter int unsigned DELTAS = adiabatic_pkg::DEF_DELTAS
) (
  input  logic clk,
  input  logic rst,
  output logic commit
);

  localparam int unsigned CW = (DELTAS > 1) ? $clog2(DELTAS) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)          cnt <= '0;
    else if (commit)  cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end

  assign commit = (cnt == CW'(DELTAS - 1));

endmodule
