// sttc_acs: add-compare-select (ACS) unit of the 4-state STTC Viterbi decoder.
//
// The trellis is fully connected (the next state is the input symbol), so
// every next state n takes the best of all four predecessors:
//   s_n(t) = min over p of ( s_p(t-1) + bm[p][n] )
// which is the update the source design gives for its four states. The
// unit then flags the state with the smallest new metric in the one-hot
// vector acs_out (bit n set for state n, lowest index on a tie); that vector
// is what the path metric updater decodes. This flag and everything below
// are this design's reading and choices:
//  - the stored metrics are normalised by subtracting the smallest new
//    metric, so the best state always holds 0 and every metric stays below
//    the largest branch metric: PM_W = BM_W bits never overflow;
//  - reset clears all metrics to 0 (no start state is favoured) and
//    acs_out to 0000.
//
// Interface: clk, rst (asynchronous, active high), bm_valid, bm[4][4]
// (first index previous state); pm[4] stored metrics, acs_out (one-hot best
// state), acs_valid, pm_min (the amount subtracted in the last update, the
// unnormalised best metric).
// Timing: one update per valid cycle; pm, acs_out and acs_valid are
// registered and appear one cycle after bm.
module sttc_acs
  import sttc_pkg::*;
#(
  parameter int unsigned BM_W = bm_width(W_DEF, NT_DEF, NR_DEF),
  parameter int unsigned PM_W = BM_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            bm_valid,
  input  logic [BM_W-1:0] bm      [NUM_STATES][NUM_STATES],
  output logic [PM_W-1:0] pm      [NUM_STATES],
  output logic [3:0]      acs_out,
  output logic            acs_valid,
  output logic [PM_W:0]   pm_min
);

  localparam int unsigned CW = PM_W + 1;   // width of a candidate sum

  logic [CW-1:0]   surv     [NUM_STATES];  // survivor metric per next state
  logic [CW-1:0]   best_val;
  logic [1:0]      best_idx;
  logic [PM_W-1:0] pm_next  [NUM_STATES];

  // Add and compare-select per next state.
  always_comb begin
    for (int n = 0; n < NUM_STATES; n++) begin
      surv[n] = CW'(pm[0]) + CW'(bm[0][n]);
      for (int p = 1; p < NUM_STATES; p++) begin
        logic [CW-1:0] cand;
        cand = CW'(pm[p]) + CW'(bm[p][n]);
        if (cand < surv[n]) surv[n] = cand;
      end
    end
  end

  // Best state and normalisation.
  always_comb begin
    best_val = surv[0];
    best_idx = 2'd0;
    for (int n = 1; n < NUM_STATES; n++) begin
      if (surv[n] < best_val) begin
        best_val = surv[n];
        best_idx = 2'(n);
      end
    end
    for (int n = 0; n < NUM_STATES; n++) pm_next[n] = PM_W'(surv[n] - best_val);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int n = 0; n < NUM_STATES; n++) pm[n] <= '0;
      acs_out   <= 4'b0000;
      acs_valid <= 1'b0;
      pm_min    <= '0;
    end else begin
      acs_valid <= bm_valid;
      if (bm_valid) begin
        pm      <= pm_next;
        acs_out <= 4'b0001 << best_idx;
        pm_min  <= best_val;
      end
    end
  end

endmodule
