// crc_counter: message-bit counter of the CRC unit (ordinary synchronous logic).
//
// A 4-bit counter that is held at 0000 while RES is 1 and counts the message
// bits that enter the adiabatic CRC datapath afterwards. A bit enters at every
// input sampling point, the end of the step in which PC4 is idle (phase 11).
// After the sixteenth bit the counter stops. The last bit needs one more
// power-clock period to cross the four phases of the register, so done is
// raised for one period starting one sampling point after the last bit was
// taken: the period in which the CRC register holds the final CRC in its PC4
// hold phase. A new RES starts the next message. Resetting the
// counter with RES follows the benchmark; counting, stopping and the done
// flag are this model's own.
module crc_counter #(
  parameter int unsigned NBITS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       commit,
  input  logic [1:0] phase,    // PC1 state from pc4_gen
  input  logic       res,      // RES pulse input (ordinary logic)
  output logic [$clog2(NBITS)-1:0] count,
  output logic       busy,     // message bits are being taken
  output logic       done      // final CRC is on the register this period
);

  localparam int unsigned CW = $clog2(NBITS);
  logic sample_pt;
  logic pend;      // last bit taken, final CRC one period away
  assign sample_pt = commit && (phase == 2'b11);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      busy  <= 1'b0;
      pend  <= 1'b0;
      done  <= 1'b0;
    end else if (sample_pt) begin
      done <= pend && !res;
      pend <= 1'b0;
      if (res) begin
        count <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        count <= count + 1'b1;
        if (count == CW'(NBITS - 1)) begin
          busy <= 1'b0;
          pend <= 1'b1;
        end
      end
    end
  end

endmodule
