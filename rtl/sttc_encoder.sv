// sttc_encoder: 4-PSK, 4-state space-time trellis encoder for NT transmit
// antennas.
//
// Each valid cycle it takes two data bits c = {C1, C2}, forms for every
// antenna i the symbol x_i = sum_k sum_j g^k_{j,i} * C^k(t-j) mod 4 (generator
// form, memory of one symbol per input bit) and stores c as the new state.
// The generator form and the 4-state, two-bit-per-symbol trellis follow the
// source design; the default coefficients GEN (see sttc_pkg) are this
// design's choice.
//
// Interface: clk, rst (asynchronous, active high, state S0), in_valid, c;
// out_valid and x[NT] (x[0] is antenna 1), the 2-bit symbol indices to map
// onto 4-PSK points as j^x.
// Timing: x and out_valid are registered, one cycle after c; one symbol
// vector per cycle. The state advances only on in_valid.
module sttc_encoder
  import sttc_pkg::*;
#(
  parameter int unsigned        NT  = NT_DEF,
  parameter gen_t [NT-1:0]      GEN = GEN_DEF
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  sym_t  c,
  output logic  out_valid,
  output sym_t  x [NT],
  output sym_t  state
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state     <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < NT; i++) x[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < NT; i++) x[i] <= sttc_symbol(GEN[i], c, state);
        state <= c;
      end
    end
  end

endmodule
