// a_notbuf: dual-rail adiabatic NOT/BUF timing cell.
//
// This is the basic cell of the library. Every other gate is a functional
// network of Aand/Aor in front of one of these cells. The true output q
// follows the power-clock pc when the input is a valid logic 1, and the
// complement output qb follows it for a valid logic 0 (so q is BUF and qb is
// NOT). Both outputs go to Z when the input rails break the dual-rail rule in
// the current period (both rails evaluate together, a rail recovers during
// evaluation, ...). Both outputs are forced to 0 in the idle period. When
// neither pc nor an input changes, the outputs keep their last value, as the
// latch in a real gate does.
//
// Timing: time advances in steps (one power-clock quarter in 4-phase
// operation). A step lasts several clk cycles ("settle" cycles) and ends with
// the cycle in which commit is high. In every clk cycle the cell re-runs the
// NOT/BUF process on the present pc and input levels against the levels that
// were present at the end of the previous step, so q/qb settle within the step
// as upstream cells settle. Outputs are registered, which keeps feedback loops
// (such as the CRC) free of combinational cycles. On commit the present
// levels become the "previous" levels for the next step.
//
// The decision table follows the modelling approach; BENNETT adds the
// steady-level conditions used with Bennett clocking. Reset (synchronous,
// active high) puts all levels at 0, the model's choice.
module a_notbuf
  import adiabatic_pkg::*;
#(
  parameter bit BENNETT = 1'b0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    commit,   // last settle cycle of the current step
  input  alevel_t pc,       // power-clock of this cell
  input  alevel_t in_p,     // input, true rail
  input  alevel_t in_n,     // input, complement rail
  output alevel_t q,        // BUF output
  output alevel_t qb        // NOT output
);

  alevel_t pc_prev, in_prev, inb_prev;
  nb_result_t res;
  logic any_event;

  assign any_event = (pc != pc_prev) || (in_p != in_prev) || (in_n != inb_prev);
  assign res = notbuf_eval(pc, in_prev, in_p, inb_prev, in_n, BENNETT);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_prev  <= A0;
      in_prev  <= A0;
      inb_prev <= A0;
      q        <= A0;
      qb       <= A0;
    end else begin
      // The process only runs when one of its inputs changed in this step.
      if (any_event && res.hit) begin
        q  <= res.q;
        qb <= res.qb;
      end
      if (commit) begin
        pc_prev  <= pc;
        in_prev  <= in_p;
        inb_prev <= in_n;
      end
    end
  end

endmodule
