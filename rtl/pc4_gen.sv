// pc4_gen: four-phase multi-level power-clock generator.
//
// A two-bit counter advances once per simulation step (on commit) and is
// decoded into the multi-level trapezoid: state 00 is Idle ('0'), 01 the
// Evaluation ramp ('X'), 10 Hold ('1') and 11 the Recovery ramp ('X'). The
// four phases PC1..PC4 use the same decoder on the count minus 0..3 steps,
// so PCk+1 lags PCk by one quarter period and PC4 leads PC1 by one quarter.
// phase is the counter itself (the state of PC1). The counter and the level
// of each state follow the modelling approach; the lag between phases is the
// usual 4-phase arrangement. Reset (synchronous) puts the counter at 00.
module pc4_gen
  import adiabatic_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       commit,
  output logic [1:0] phase,
  output alevel_t    pc [4]    // pc[0] = PC1 ... pc[3] = PC4
);

  function automatic alevel_t decode(logic [1:0] s);
    case (s)
      2'b00:   return A0;
      2'b01:   return AX;
      2'b10:   return A1;
      default: return AX;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst)         phase <= 2'b00;
    else if (commit) phase <= phase + 2'b01;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) pc[k] = decode(phase - 2'(k));
  end

endmodule
