// adiabatic_pkg: shared types and functions for the multi-level model of
// dual-rail, 4-phase adiabatic logic.
//
// Each adiabatic node is represented by a two-bit level code:
//   A0  idle period of a power-clock (or a node held at logic 0)
//   A1  hold period (logic 1)
//   AX  one of the two ramps (evaluation or recovery), shown as 'X'
//   AZ  invalid node, produced when the dual-rail rules are broken
// The four power-clock periods are recognised by the level change of a
// signal between two simulation steps (the edge functions below). The Aand
// and Aor tables are the adiabatic versions of AND and OR over these levels.
// The two-bit encoding, the step-based edge detection and the 'settle'
// (delta) scheme are this model's own choice; the levels, the edge
// definitions and both tables follow the modelling approach.
package adiabatic_pkg;

  typedef enum logic [1:0] {
    A0 = 2'b00,
    A1 = 2'b01,
    AX = 2'b10,
    AZ = 2'b11
  } alevel_t;

  // Result of one evaluation of the NOT/BUF process.
  typedef struct packed {
    logic    hit;   // a branch of the process fired
    alevel_t q;     // new true-rail output
    alevel_t qb;    // new complement-rail output
  } nb_result_t;

  // Settle cycles per simulation step used by default everywhere.
  localparam int unsigned DEF_DELTAS = 6;

  // Strength-stripping map: a Z is treated like an X when edges are judged.
  function automatic alevel_t to_x01(alevel_t s);
    return (s == AZ) ? AX : s;
  endfunction

  function automatic logic evaluate_edge(alevel_t prev, alevel_t cur);
    return (prev != cur) && (to_x01(cur) == AX) && (to_x01(prev) == A0);
  endfunction

  function automatic logic hold_edge(alevel_t prev, alevel_t cur);
    return (prev != cur) && (to_x01(cur) == A1) && (to_x01(prev) == AX);
  endfunction

  function automatic logic recovery_edge(alevel_t prev, alevel_t cur);
    return (prev != cur) && (to_x01(cur) == AX) && (to_x01(prev) == A1);
  endfunction

  function automatic logic idle_edge(alevel_t prev, alevel_t cur);
    return (prev != cur) && (to_x01(cur) == A0) && (to_x01(prev) == AX);
  endfunction

  // Adiabatic AND: 0 wins over 0/1/X, anything mixing 1 with a ramp or
  // touching Z is invalid.
  function automatic alevel_t aand(alevel_t a, alevel_t b);
    if (a == AZ || b == AZ) return AZ;
    if (a == A0 || b == A0) return A0;
    if (a == A1 && b == A1) return A1;
    if (a == AX && b == AX) return AX;
    return AZ;  // 1 with X
  endfunction

  // Adiabatic OR: 0 is the identity, 1 with 1 stays 1, 1 with X is invalid.
  function automatic alevel_t aor(alevel_t a, alevel_t b);
    if (a == AZ || b == AZ) return AZ;
    if (a == A0) return b;
    if (b == A0) return a;
    if (a == b) return a;
    return AZ;  // 1 with X
  endfunction

  // One run of the NOT/BUF process for power-clock level pc and the current
  // and previous levels of the dual-rail input. With bennett set, a steady
  // input at '1' is accepted where a hold, recovery or idle edge is asked
  // for in the evaluation, hold and recovery periods.
  function automatic nb_result_t notbuf_eval(alevel_t pc,
                                             alevel_t in_prev, alevel_t in_cur,
                                             alevel_t inb_prev, alevel_t inb_cur,
                                             logic bennett);
    nb_result_t r;
    logic h_i, h_b, r_i, r_b, i_i, i_b, e_i, e_b;
    logic lv_i, lv_b;
    h_i = hold_edge(in_prev, in_cur);
    h_b = hold_edge(inb_prev, inb_cur);
    r_i = recovery_edge(in_prev, in_cur);
    r_b = recovery_edge(inb_prev, inb_cur);
    i_i = idle_edge(in_prev, in_cur);
    i_b = idle_edge(inb_prev, inb_cur);
    e_i = evaluate_edge(in_prev, in_cur);
    e_b = evaluate_edge(inb_prev, inb_cur);
    lv_i = bennett && (in_cur == A1);
    lv_b = bennett && (inb_cur == A1);
    r = '{hit: 1'b1, q: AZ, qb: AZ};
    // idle period
    if (pc == A0)                         r = '{1'b1, A0, A0};
    // evaluation period
    else if (pc == AX && h_i && h_b)      r = '{1'b1, AZ, AZ};
    else if (pc == AX && (h_i || lv_i))   r = '{1'b1, pc, A0};
    else if (pc == AX && (h_b || lv_b))   r = '{1'b1, A0, pc};
    else if (pc == AX && (r_i || r_b))    r = '{1'b1, AZ, AZ};
    // hold period
    else if (pc == A1 && r_i && r_b)      r = '{1'b1, AZ, AZ};
    else if (pc == A1 && (r_i || lv_i))   r = '{1'b1, pc, A0};
    else if (pc == A1 && (r_b || lv_b))   r = '{1'b1, A0, pc};
    else if (pc == A1 && (i_i || i_b))    r = '{1'b1, AZ, AZ};
    // recovery period
    else if (pc == AX && i_i && i_b)      r = '{1'b1, AZ, AZ};
    else if (pc == AX && i_i)             r = '{1'b1, pc, A0};
    else if (pc == AX && i_b)             r = '{1'b1, A0, pc};
    else if (pc == AX && (e_i || e_b))    r = '{1'b1, AZ, AZ};
    // invalid state arriving from a cascaded gate
    else if (in_cur == AZ && inb_cur == AZ) r = '{1'b1, AZ, AZ};
    else                                  r = '{1'b0, A0, A0};
    return r;
  endfunction

endpackage
