// sttc_viterbi_decoder: Viterbi decoder for the 4-PSK, 4-state space-time
// trellis code, built without a traceback memory.
//
// The three stages of the source design's decoder are chained:
//   sttc_bmc  branch metrics of all 16 branches from the received samples
//             and the channel estimates;
//   sttc_acs  add-compare-select, normalised path metrics, one-hot flag of
//             the best state;
//   sttc_pmu  improved path metric updater: turns the one-hot flag into the
//             decoded 2-bit symbol {C1, C2} and registers it.
// Because the state of this code is the last input symbol, the best state
// after each ACS step is taken as that step's decision; no survivor paths
// are stored or traced back.
//
// Interface: clk, rst (asynchronous, active high); in_valid, r_re/r_im[NR],
// h_re/h_im[NR][NT] (signed W-bit); out_valid and co, the decoded symbol.
// acs_out, pm and pm_min are brought out for observation.
// Timing: three register stages, co follows its received vector by three
// cycles; one symbol per cycle.
module sttc_viterbi_decoder
  import sttc_pkg::*;
#(
  parameter int unsigned   NT   = NT_DEF,
  parameter int unsigned   NR   = NR_DEF,
  parameter int unsigned   W    = W_DEF,
  parameter gen_t [NT-1:0] GEN  = GEN_DEF,
  parameter int unsigned   BM_W = bm_width(W, NT, NR)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] r_re [NR],
  input  logic signed [W-1:0] r_im [NR],
  input  logic signed [W-1:0] h_re [NR][NT],
  input  logic signed [W-1:0] h_im [NR][NT],
  output logic                out_valid,
  output sym_t                co,
  output logic [3:0]          acs_out,
  output logic [BM_W-1:0]     pm     [NUM_STATES],
  output logic [BM_W:0]       pm_min
);

  logic            bm_valid;
  logic [BM_W-1:0] bm [NUM_STATES][NUM_STATES];
  logic            acs_valid;

  sttc_bmc #(.NT(NT), .NR(NR), .W(W), .GEN(GEN), .BM_W(BM_W)) u_bmc (
    .clk, .rst, .in_valid,
    .r_re, .r_im, .h_re, .h_im,
    .bm_valid, .bm
  );

  sttc_acs #(.BM_W(BM_W), .PM_W(BM_W)) u_acs (
    .clk, .rst, .bm_valid, .bm,
    .pm, .acs_out, .acs_valid, .pm_min
  );

  sttc_pmu u_pmu (
    .clk, .rst,
    .en       (acs_valid),
    .acs      (acs_out),
    .co       (co),
    .co_valid (out_valid)
  );

endmodule
