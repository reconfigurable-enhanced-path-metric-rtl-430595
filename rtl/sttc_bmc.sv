// sttc_bmc: branch metric computation (BMC) of the STTC Viterbi decoder.
//
// For every trellis branch (previous state p -> next state n, input symbol n)
// it forms the candidate symbols x_i(p, n) of all NT transmit antennas, fades
// them with the channel estimate and takes the squared Euclidean distance to
// the received samples, summed over the NR receive antennas:
//   bm[p][n] = sum_r | r_r - sum_i h_{r,i} * j^{x_i(p,n)} |^2
// The metric itself follows the source design; the fixed-point formats are
// this design's choice. Multiplying by a 4-PSK point j^x is a swap and/or
// negation of I and Q, so the only multipliers are the squarers.
//
// Interface: clk, rst (asynchronous, active high), in_valid; r_re/r_im[NR]
// received samples and h_re/h_im[NR][NT] channel estimates, signed W-bit
// integers; bm_valid and bm[4][4] (first index previous state, second next
// state), unsigned BM_W-bit. Every width is exact: nothing saturates.
// Timing: one register stage, bm is valid one cycle after the samples; one
// received vector per cycle.
module sttc_bmc
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
  output logic                bm_valid,
  output logic [BM_W-1:0]     bm   [NUM_STATES][NUM_STATES]
);

  localparam int unsigned DW = diff_width(W, NT);
  localparam int unsigned SW = 2*DW;        // one squared component

  logic [BM_W-1:0] bm_next [NUM_STATES][NUM_STATES];

  always_comb begin
    for (int p = 0; p < NUM_STATES; p++) begin
      for (int n = 0; n < NUM_STATES; n++) begin
        logic [BM_W-1:0] acc;
        acc = '0;
        for (int r = 0; r < NR; r++) begin
          logic signed [DW-1:0] y_re, y_im, d_re, d_im;
          logic        [SW-1:0] sq_re, sq_im;
          y_re = '0;
          y_im = '0;
          for (int i = 0; i < NT; i++) begin
            logic signed [DW-1:0] hr, hi;
            hr = DW'(h_re[r][i]);
            hi = DW'(h_im[r][i]);
            unique case (sttc_symbol(GEN[i], sym_t'(n), sym_t'(p)))
              2'd0: begin y_re = y_re + hr; y_im = y_im + hi; end
              2'd1: begin y_re = y_re - hi; y_im = y_im + hr; end
              2'd2: begin y_re = y_re - hr; y_im = y_im - hi; end
              2'd3: begin y_re = y_re + hi; y_im = y_im - hr; end
            endcase
          end
          d_re  = DW'(r_re[r]) - y_re;
          d_im  = DW'(r_im[r]) - y_im;
          sq_re = SW'(d_re * d_re);
          sq_im = SW'(d_im * d_im);
          acc   = acc + BM_W'(sq_re) + BM_W'(sq_im);
        end
        bm_next[p][n] = acc;
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      bm_valid <= 1'b0;
      for (int p = 0; p < NUM_STATES; p++)
        for (int n = 0; n < NUM_STATES; n++) bm[p][n] <= '0;
    end else begin
      bm_valid <= in_valid;
      if (in_valid) bm <= bm_next;
    end
  end

endmodule
