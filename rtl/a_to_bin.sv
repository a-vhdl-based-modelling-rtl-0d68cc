// a_to_bin: adiabatic to ordinary logic interface.
//
// Samples W dual-rail adiabatic signals at the end of every step in which
// their power-clock pc is in the Hold period. A rail pair (1,0) gives a 1 and
// (0,1) a 0; any other pair (both 0, both 1, a ramp or Z) is invalid and sets
// the matching bit of err. value and err are registered and change only at
// the sampling point, where sampled pulses for one clk cycle. This interface
// is this model's own way of connecting the adiabatic netlist to ordinary
// synchronous logic and of flagging invalid dual-rail states.
module a_to_bin
  import adiabatic_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          commit,
  input  alevel_t       pc,
  input  alevel_t       sig_p [W],
  input  alevel_t       sig_n [W],
  output logic [W-1:0]  value,
  output logic [W-1:0]  err,
  output logic          sampled
);

  always_ff @(posedge clk) begin
    if (rst) begin
      value   <= '0;
      err     <= '0;
      sampled <= 1'b0;
    end else begin
      sampled <= 1'b0;
      if (commit && pc == A1) begin
        sampled <= 1'b1;
        for (int i = 0; i < W; i++) begin
          value[i] <= (sig_p[i] == A1);
          err[i]   <= !((sig_p[i] == A1 && sig_n[i] == A0) ||
                        (sig_p[i] == A0 && sig_n[i] == A1));
        end
      end
    end
  end

endmodule
