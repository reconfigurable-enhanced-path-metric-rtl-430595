// sttc_pkg: constants, types and helper functions shared by the 4-PSK,
// 4-state space-time trellis code (STTC) encoder and Viterbi decoder.
//
// Trellis: the encoder state is the previous 2-bit input symbol
// S = {C1(t-1), C2(t-1)}, with S0 = 00, S1 = 01, S2 = 10, S3 = 11. The input
// symbol u = {C1(t), C2(t)} becomes the next state, so every state reaches
// every state and each of the four next states has four predecessors.
//
// Generator coefficients follow the generator form of the code: the symbol
// sent on antenna i is x_i = sum over k in {1,2}, j in {0,1} of
// g^k_{j,i} * C^k(t-j), modulo 4. One antenna's coefficients are packed in a
// gen_t byte: bits [(2*k + j)*2 +: 2] hold g^{k+1}_{j,i}, with k = 0 for C1
// (the symbol's MSB) and k = 1 for C2 (its LSB).
//
// The default code for three transmit antennas is this design's choice:
//   antenna 1: g^1 = (0,2), g^2 = (0,1)  -> x1 = S        (previous symbol)
//   antenna 2: g^1 = (2,0), g^2 = (1,0)  -> x2 = u        (current symbol)
//   antenna 3: g^1 = (2,2), g^2 = (1,1)  -> x3 = u + S mod 4
// 4-PSK mapping (also this design's choice): symbol s is sent as j^s, that is
// 0 -> +1, 1 -> +j, 2 -> -1, 3 -> -j.
package sttc_pkg;

  localparam int unsigned NUM_STATES = 4;  // 4-PSK, memory order 2 bits
  localparam int unsigned NT_DEF     = 3;  // transmit antennas
  localparam int unsigned NR_DEF     = 2;  // receive antennas
  localparam int unsigned W_DEF      = 8;  // sample width (signed, per I/Q)

  typedef logic [1:0] sym_t;    // 2-bit 4-PSK symbol or trellis state
  typedef logic [7:0] gen_t;    // one antenna's generator coefficients

  localparam gen_t GEN_ANT1 = 8'h48;
  localparam gen_t GEN_ANT2 = 8'h12;
  localparam gen_t GEN_ANT3 = 8'h5A;
  // Index 0 is antenna 1.
  localparam gen_t [NT_DEF-1:0] GEN_DEF = {GEN_ANT3, GEN_ANT2, GEN_ANT1};

  // Coefficient g^{k+1}_{j} of one antenna.
  function automatic logic [1:0] gen_coef(gen_t g, int unsigned k, int unsigned j);
    return g[(2*k + j)*2 +: 2];
  endfunction

  // Symbol sent on one antenna for previous symbol (state) s_prev and current
  // input symbol u_now.
  function automatic sym_t sttc_symbol(gen_t g, sym_t u_now, sym_t s_prev);
    sym_t acc;
    acc = '0;
    for (int unsigned k = 0; k < 2; k++) begin
      // C1 is bit 1 of a symbol, C2 is bit 0
      if (u_now[1-k])  acc = acc + gen_coef(g, k, 0);
      if (s_prev[1-k]) acc = acc + gen_coef(g, k, 1);
    end
    return acc;  // modulo 4 by the 2-bit width
  endfunction

  // Width of one difference (received minus faded candidate) component.
  function automatic int unsigned diff_width(int unsigned w, int unsigned nt);
    return w + 2 + $clog2(nt);
  endfunction

  // Width of one branch metric: sum over nr antennas of |d|^2.
  function automatic int unsigned bm_width(int unsigned w, int unsigned nt, int unsigned nr);
    return 2*diff_width(w, nt) + 1 + $clog2(nr);
  endfunction

endpackage
