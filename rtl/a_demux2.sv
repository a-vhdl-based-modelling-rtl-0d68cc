// a_demux2: adiabatic 1:2 demultiplexer.
//
// Routes the dual-rail data input d to output y1 when the select s is 1 and to
// y0 when it is 0; the unselected output carries logic 0 (complement rail
// active). In dual-rail form, with one NOT/BUF timing cell per output on pc:
//   y0 = Aand(s_n, d),   y0_n = Aor(s, d_n)
//   y1 = Aand(s, d),     y1_n = Aor(s_n, d_n)
// Both outputs appear one quarter period after the inputs, which must be in
// the phase leading pc. The library names a DeMUX gate built as functional
// part plus NOT/BUF cell; the equations here are this model's own.
module a_demux2
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
  input  alevel_t d_p,
  input  alevel_t d_n,
  output alevel_t y0,
  output alevel_t y0b,
  output alevel_t y1,
  output alevel_t y1b
);

  alevel_t f0_p, f0_n, f1_p, f1_n;

  assign f0_p = aand(s_n, d_p);
  assign f0_n = aor(s_p, d_n);
  assign f1_p = aand(s_p, d_p);
  assign f1_n = aor(s_n, d_n);

  a_notbuf #(.BENNETT(BENNETT)) u_cell0 (
    .clk, .rst, .commit, .pc, .in_p(f0_p), .in_n(f0_n), .q(y0), .qb(y0b)
  );
  a_notbuf #(.BENNETT(BENNETT)) u_cell1 (
    .clk, .rst, .commit, .pc, .in_p(f1_p), .in_n(f1_n), .q(y1), .qb(y1b)
  );

endmodule
