// bennett_clk_gen: Bennett-clocking waveform generator.
//
// Under Bennett clocking a gate ramps up only after its input has reached a
// steady level and ramps down only after the gates it feeds have ramped down,
// so hold and idle periods differ from stage to stage. Here a counter of
// PERIOD = 2*NPC + 4 steps (a BCD counter, 0..9, for NPC = 3) advances once per
// step. Signal j (j = 0 is the input reference in_ref, j = 1..NPC are the
// power-clocks) ramps up (X) at count j, holds (1) from j+1 to PERIOD-3-j,
// ramps down (X) at PERIOD-2-j and is idle (0) otherwise. So each stage
// evaluates one step after the previous one and recovers one step before it.
// Using a BCD counter follows the modelling approach; the schedule above is
// this model's own choice.
module bennett_clk_gen
  import adiabatic_pkg::*;
#(
  parameter int unsigned NPC = 3
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,
  output logic [$clog2(2*NPC+4)-1:0] count,
  output alevel_t in_ref,
  output alevel_t pc [NPC]
);

  localparam int unsigned PERIOD = 2 * NPC + 4;
  localparam int unsigned CW = $clog2(PERIOD);

  function automatic alevel_t level(int unsigned j, logic [CW-1:0] c);
    int unsigned ci;
    ci = int'(c);
    if (ci == j || ci == PERIOD - 2 - j)          return AX;
    if (ci > j && ci < PERIOD - 2 - j)            return A1;
    return A0;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else if (commit) count <= (count == CW'(PERIOD - 1)) ? '0 : count + 1'b1;
  end

  always_comb begin
    in_ref = level(0, count);
    for (int j = 0; j < NPC; j++) pc[j] = level(j + 1, count);
  end

endmodule
