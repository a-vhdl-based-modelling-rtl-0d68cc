// a_xor: N-input adiabatic XOR/XNOR gate (10 inputs by default).
//
// The functional part folds the inputs pairwise in dual-rail form:
//   x  = Aor(Aand(x, b_n), Aand(x_n, b))     (XOR)
//   xn = Aor(Aand(x, b),   Aand(x_n, b_n))   (XNOR)
// and feeds the result to one NOT/BUF timing cell on pc, so the whole
// N-input gate has the latency of a single cell (one quarter period). All
// inputs must be in the phase leading pc. The pairwise dual-rail fold is
// this model's choice of functional part; the single-cell latency of the
// large fan-in gate follows the modelling approach.
module a_xor
  import adiabatic_pkg::*;
#(
  parameter int unsigned N = 10,
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

  alevel_t f_p, f_n, t_p, t_n;

  always_comb begin
    f_p = a_p[0];
    f_n = a_n[0];
    for (int i = 1; i < N; i++) begin
      t_p = aor(aand(f_p, a_n[i]), aand(f_n, a_p[i]));
      t_n = aor(aand(f_p, a_p[i]), aand(f_n, a_n[i]));
      f_p = t_p;
      f_n = t_n;
    end
  end

  a_notbuf #(.BENNETT(BENNETT)) u_cell (
    .clk, .rst, .commit, .pc, .in_p(f_p), .in_n(f_n), .q, .qb
  );

endmodule
