// a_and: N-input adiabatic AND/NAND gate.
//
// The functional part forms the true rail as the Aand of all true input
// rails and the complement rail as the Aor of all complement input rails
// (NAND = OR of the complements). The pair then drives a NOT/BUF timing cell
// clocked by pc, so q = AND and qb = NAND appear one quarter period after
// the inputs, like any other cell. All inputs must be in the phase that
// leads pc. Building gates as functional part plus NOT/BUF cell follows the
// modelling approach; N = 2 is the default, 3 and 4 are the other library
// sizes.
module a_and
  import adiabatic_pkg::*;
#(
  parameter int unsigned N = 2,
  parameter bit BENNETT = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,
  input  alevel_t pc,
  input  alevel_t a_p [N],
  input  alevel_t a_n [N],
  output alevel_t q,
  output alevel_t qb
);

  alevel_t f_p, f_n;

  always_comb begin
    f_p = a_p[0];
    f_n = a_n[0];
    for (int i = 1; i < N; i++) begin
      f_p = aand(f_p, a_p[i]);
      f_n = aor(f_n, a_n[i]);
    end
  end

  a_notbuf #(.BENNETT(BENNETT)) u_cell (
    .clk, .rst, .commit, .pc, .in_p(f_p), .in_n(f_n), .q, .qb
  );

endmodule
