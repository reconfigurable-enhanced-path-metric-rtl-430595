// sttc_system: digital ends of a space-time trellis coded MIMO link.
//
// The transmitter side is the STTC encoder: two data bits per cycle in, one
// 2-bit 4-PSK symbol index per transmit antenna out. The receiver side is
// the traceback-free STTC Viterbi decoder: the baseband samples of the NR
// receive antennas and the NR x NT channel estimates in, the decoded two
// bits out. Modulation, antennas, the fading channel and channel estimation
// lie between the two and are outside this design, so both ends bring their
// signals out as ports; the two share only the clock and reset.
//
// Interface: clk, rst (asynchronous, active high).
//   Transmit: tx_in_valid, tx_c = {C1, C2}; tx_valid, tx_x[NT] (send j^x).
//   Receive:  rx_valid, rx_re/rx_im[NR], h_re/h_im[NR][NT]; dec_valid,
//             dec_c = decoded {C1, C2}; dec_acs_out, the one-hot best state.
// Timing: encoder one cycle, decoder three cycles, one symbol per cycle each.
module sttc_system
  import sttc_pkg::*;
#(
  parameter int unsigned   NT  = NT_DEF,
  parameter int unsigned   NR  = NR_DEF,
  parameter int unsigned   W   = W_DEF,
  parameter gen_t [NT-1:0] GEN = GEN_DEF
) (
  input  logic                clk,
  input  logic                rst,
  // transmitter
  input  logic                tx_in_valid,
  input  sym_t                tx_c,
  output logic                tx_valid,
  output sym_t                tx_x  [NT],
  // receiver
  input  logic                rx_valid,
  input  logic signed [W-1:0] rx_re [NR],
  input  logic signed [W-1:0] rx_im [NR],
  input  logic signed [W-1:0] h_re  [NR][NT],
  input  logic signed [W-1:0] h_im  [NR][NT],
  output logic                dec_valid,
  output sym_t                dec_c,
  output logic [3:0]          dec_acs_out
);

  localparam int unsigned BM_W = bm_width(W, NT, NR);

  sym_t            enc_state;
  logic [BM_W-1:0] dec_pm [NUM_STATES];
  logic [BM_W:0]   dec_pm_min;

  sttc_encoder #(.NT(NT), .GEN(GEN)) u_enc (
    .clk, .rst,
    .in_valid  (tx_in_valid),
    .c         (tx_c),
    .out_valid (tx_valid),
    .x         (tx_x),
    .state     (enc_state)
  );

  sttc_viterbi_decoder #(.NT(NT), .NR(NR), .W(W), .GEN(GEN), .BM_W(BM_W)) u_dec (
    .clk, .rst,
    .in_valid  (rx_valid),
    .r_re      (rx_re),
    .r_im      (rx_im),
    .h_re, .h_im,
    .out_valid (dec_valid),
    .co        (dec_c),
    .acs_out   (dec_acs_out),
    .pm        (dec_pm),
    .pm_min    (dec_pm_min)
  );

endmodule
