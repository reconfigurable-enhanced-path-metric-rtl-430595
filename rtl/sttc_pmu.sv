// sttc_pmu: improved path metric updater (PMU) of the STTC Viterbi decoder.
//
// Instead of writing every ACS result into a chain of traceback registers and
// decoding the oldest entry through a look-up table, this PMU decodes the
// current ACS result directly and keeps only the output register. The ACS
// result is a one-hot flag of the best trellis state; since the state of this
// code is the last input symbol, the index of that state is the decoded
// symbol:
//   acs = 0001 -> co = 00, 0010 -> 01, 0100 -> 10, 1000 -> 11,
//   any other pattern (0000 after reset, or several bits set) -> 00.
// The hardware is two OR gates (co[0] = acs[1] | acs[3], co[1] = acs[2] |
// acs[3]), one multiplexer that passes the OR result only for a one-hot input
// and 00 otherwise, and one 2-bit register. This mapping and structure follow
// the source design; the enable/valid pair is this design's addition so the
// PMU can sit in a pipeline that does not carry data on every cycle.
//
// Interface: clk, rst (asynchronous, active high, clears co to 00),
// en (acs is valid this cycle), acs (one-hot best state), co (decoded
// symbol), co_valid.
// Timing: co and co_valid change on the first rising clock edge after acs is
// presented with en high: one cycle of latency, one symbol per cycle.
module sttc_pmu (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [3:0] acs,
  output logic [1:0] co,
  output logic       co_valid
);

  logic [1:0] or_code;
  logic       one_hot;
  logic [1:0] co_next;

  assign or_code = {acs[2] | acs[3], acs[1] | acs[3]};
  assign one_hot = (acs != 4'b0000) && ((acs & (acs - 4'd1)) == 4'b0000);
  assign co_next = one_hot ? or_code : 2'b00;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      co       <= 2'b00;
      co_valid <= 1'b0;
    end else begin
      co_valid <= en;
      if (en) co <= co_next;
    end
  end

endmodule
