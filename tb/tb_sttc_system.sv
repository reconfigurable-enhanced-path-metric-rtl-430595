// tb_sttc_system: end-to-end test of the STTC link at its default size
// (3 transmit antennas, 2 receive antennas, 8-bit samples).
//
// Random data bits go into the encoder; the testbench plays the part of the
// modulators, the fading channel and the receivers: each antenna symbol x is
// sent as j^x, faded by a random complex gain per antenna pair, summed per
// receive antenna, disturbed by uniform noise and clipped to the 8-bit range.
// The decoder's output is compared, symbol by symbol, with a model in this
// testbench that runs the same decoding rule in plain integers (squared
// Euclidean branch metrics, add-compare-select, best state as decision).
// Noise-free phases must also return exactly the data that was sent.
//
// The test runs several phases (noise amplitudes 0, 6, 20, 60, then a deep
// fade with every channel gain zero, with a new channel and a reset between
// phases) and counts how often each mechanism
// occurred: every decoded value 00..11 (each one-hot ACS pattern), metric
// normalisation by a non-zero amount, ties in the best-state selection,
// bubbles in the valid stream, resets that clear the output, and decisions
// that differ from the data sent (noise). A mechanism that never occurred
// counts as a failure.
module tb_sttc_system;
  import sttc_pkg::*;
  localparam int NT = NT_DEF, NR = NR_DEF, W = W_DEF;
  localparam int PHASES = 5;
  localparam int SYMBOLS = 3000;     // per phase

  logic clk = 1'b0, rst;
  logic tx_in_valid, tx_valid, rx_valid, dec_valid;
  sym_t tx_c, dec_c;
  sym_t tx_x [NT];
  logic signed [W-1:0] rx_re [NR], rx_im [NR];
  logic signed [W-1:0] h_re [NR][NT], h_im [NR][NT];
  logic [3:0] dec_acs_out;
  logic [3:0] acs_prev;   // ACS flag the path metric updater took at this edge

  int checks = 0, failures = 0;
  int cs [4] = '{1, 0, -1, 0};
  int sn [4] = '{0, 1, 0, -1};
  int noise_amp [PHASES] = '{0, 6, 20, 60, 0};
  int deep_fade [PHASES] = '{0, 0, 0, 0, 1};   // channel gains all zero
  int fade = 0;
  int noise = 0;

  // model state
  longint mpm [4];
  int data_q [$];       // data symbols sent, in order
  int dec_q [$];        // model decisions, in order
  // mechanism counters
  int n_val [4] = '{0, 0, 0, 0};
  int n_norm = 0, n_tie = 0, n_bubble = 0, n_reset_clear = 0, n_sym_err = 0, n_out = 0;

  sttc_system dut (
    .clk, .rst,
    .tx_in_valid, .tx_c, .tx_valid, .tx_x,
    .rx_valid, .rx_re, .rx_im, .h_re, .h_im,
    .dec_valid, .dec_c, .dec_acs_out
  );

  always #10 clk = ~clk;   // period of 20 time units

  function automatic int clip(int v);
    if (v > 2**(W-1) - 1) return 2**(W-1) - 1;
    if (v < -(2**(W-1))) return -(2**(W-1));
    return v;
  endfunction

  function automatic int unoise();
    if (noise == 0) return 0;
    return $urandom_range(0, 2*noise) - noise;
  endfunction

  // Reference decoder step on the received vector currently driven.
  task automatic model_step();
    longint bm [4][4];
    longint s [4];
    int best;
    for (int p = 0; p < 4; p++)
      for (int n = 0; n < 4; n++) begin
        longint acc = 0;
        for (int r = 0; r < NR; r++) begin
          longint yr = 0, yi = 0, dr, di;
          for (int i = 0; i < NT; i++) begin
            // code: x1 = previous symbol, x2 = current, x3 = their sum mod 4
            int x = (i == 0) ? p : (i == 1) ? n : (p + n) % 4;
            yr += h_re[r][i]*cs[x] - h_im[r][i]*sn[x];
            yi += h_re[r][i]*sn[x] + h_im[r][i]*cs[x];
          end
          dr = longint'(rx_re[r]) - yr; di = longint'(rx_im[r]) - yi;
          acc += dr*dr + di*di;
        end
        bm[p][n] = acc;
      end
    for (int n = 0; n < 4; n++) begin
      s[n] = mpm[0] + bm[0][n];
      for (int p = 1; p < 4; p++) if (mpm[p] + bm[p][n] < s[n]) s[n] = mpm[p] + bm[p][n];
    end
    best = 0;
    for (int n = 1; n < 4; n++) if (s[n] < s[best]) best = n;
    for (int n = 0; n < 4; n++) if (n != best && s[n] == s[best]) n_tie++;
    if (s[best] != 0) n_norm++;
    for (int n = 0; n < 4; n++) mpm[n] = s[n] - s[best];
    dec_q.push_back(best);
  endtask

  // Channel: one cycle after the encoder, at the falling edge.
  always @(negedge clk) begin
    if (rst) begin
      rx_valid <= 1'b0;
    end else begin
      rx_valid = tx_valid;
      if (tx_valid) begin
        for (int r = 0; r < NR; r++) begin
          automatic int yr = 0, yi = 0;
          for (int i = 0; i < NT; i++) begin
            yr += h_re[r][i]*cs[tx_x[i]] - h_im[r][i]*sn[tx_x[i]];
            yi += h_re[r][i]*sn[tx_x[i]] + h_im[r][i]*cs[tx_x[i]];
          end
          rx_re[r] = W'(clip(yr + unoise()));
          rx_im[r] = W'(clip(yi + unoise()));
        end
        model_step();
      end else begin
        n_bubble++;
      end
    end
  end

  always @(posedge clk) acs_prev <= dec_acs_out;

  // Output comparison.
  always @(posedge clk) begin
    #1;
    if (!rst && dec_valid) begin
      int e, d;
      n_out++;
      checks++;
      if (dec_q.size() == 0 || data_q.size() == 0) begin
        failures++; $display("FAIL output with nothing expected");
      end else begin
        e = dec_q.pop_front(); d = data_q.pop_front();
        n_val[dec_c]++;
        if (int'(dec_c) != e) begin
          failures++; $display("FAIL output %0d: dec_c=%0d model %0d", n_out, dec_c, e);
        end
        checks++;
        if (acs_prev !== 4'(1 << e)) begin
          failures++; $display("FAIL output %0d: acs_out=%b model state %0d", n_out, acs_prev, e);
        end
        if (e != d) n_sym_err++;
        if (noise == 0 && fade == 0) begin
          checks++;
          if (int'(dec_c) != d) begin
            failures++; $display("FAIL noise-free output %0d: dec_c=%0d sent %0d", n_out, dec_c, d);
          end
        end
      end
    end
  end

  initial begin
    repeat (PHASES * (SYMBOLS * 3 / 2 + 100) + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(string name, int count);
    $display("  %-28s %0d", name, count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never occurred: %s", name); end
  endtask

  initial begin
    rst = 1'b1; tx_in_valid = 1'b0; tx_c = '0; rx_valid = 1'b0;
    for (int r = 0; r < NR; r++) begin rx_re[r] = '0; rx_im[r] = '0; end
    for (int ph = 0; ph < PHASES; ph++) begin
      // reset between phases, new channel
      @(negedge clk);
      rst = 1'b1;
      noise = noise_amp[ph];
      fade = deep_fade[ph];
      for (int n = 0; n < 4; n++) mpm[n] = 0;
      data_q.delete(); dec_q.delete();
      for (int r = 0; r < NR; r++)
        for (int i = 0; i < NT; i++) begin
          h_re[r][i] = (fade != 0) ? '0 : W'($urandom_range(0, 60) - 30);
          h_im[r][i] = (fade != 0) ? '0 : W'($urandom_range(0, 60) - 30);
        end
      @(posedge clk); #1;
      checks++;
      if (dec_c !== 2'b00 || dec_valid !== 1'b0 || dec_acs_out !== 4'b0000) begin
        failures++; $display("FAIL reset did not clear the decoder output");
      end else if (ph > 0) n_reset_clear++;
      @(negedge clk); rst = 1'b0;
      for (int t = 0; t < SYMBOLS; t++) begin
        @(negedge clk);
        tx_in_valid = ($urandom_range(0, 7) != 0);
        tx_c = sym_t'($urandom_range(0, 3));
        if (tx_in_valid) data_q.push_back(int'(tx_c));
      end
      @(negedge clk); tx_in_valid = 1'b0;
      repeat (6) @(posedge clk);
      checks++;
      if (dec_q.size() != 0) begin failures++; $display("FAIL phase %0d: %0d symbols not decoded", ph, dec_q.size()); end
      $display("phase %0d (noise +-%0d): %0d symbols decoded", ph, noise, n_out);
    end
    $display("mechanisms:");
    mech("decoded 00 (acs 0001)", n_val[0]);
    mech("decoded 01 (acs 0010)", n_val[1]);
    mech("decoded 10 (acs 0100)", n_val[2]);
    mech("decoded 11 (acs 1000)", n_val[3]);
    mech("non-zero normalisation", n_norm);
    mech("best-state tie", n_tie);
    mech("valid bubble", n_bubble);
    mech("reset clears output", n_reset_clear);
    mech("decision differs from data", n_sym_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
