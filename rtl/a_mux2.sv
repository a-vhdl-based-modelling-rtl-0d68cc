// a_mux2: adiabatic 2:1 multiplexer.
//
// q = s ? d1 : d0 in dual-rail form:
//   q  = Aor(Aand(s, d1),   Aand(s_n, d0))
//   qb = Aor(Aand(s, d1_n), Aand(s_n, d0_n))
// followed by one NOT/BUF timing cell on pc (one quarter period of latency).
// Select and data inputs must all be in the phase leading pc. The library
// lists a MUX gate built as functional part plus NOT/BUF cell; the
// sum-of-products form here is this model's own.
module a_mux2
  import adiabatic_pkg::*;
#(
  parameter bit BENNETT = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,
  input  alevel_t pc,
  input  alevel_t s_p,
  input  alevel_t s_n,
  input  alevel_t d0_p,
  input  alevel_t d0_n,
  input  alevel_t d1_p,
  input  alevel_t d1_n,
  output alevel_t q,
  output alevel_t qb
);

  alevel_t f_p, f_n;

  assign f_p = aor(aand(s_p, d1_p), aand(s_n, d0_p));
  assign f_n = aor(aand(s_p, d1_n), aand(s_n, d0_n));

  a_notbuf #(.BENNETT(BENNETT)) u_cell (
    .clk, .rst, .commit, .pc, .in_p(f_p), .in_n(f_n), .q, .qb
  );

endmodule
