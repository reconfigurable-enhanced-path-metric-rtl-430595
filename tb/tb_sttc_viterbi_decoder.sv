// tb_sttc_viterbi_decoder: self-checking test of the decoder chain on a
// noise-free channel. The testbench encodes random symbols with its own
// copy of the code's generator table, fades them with random 3x2 channel
// coefficients, and expects every symbol back three cycles after its
// received vector, with bubbles in in_valid along the way.
module tb_sttc_viterbi_decoder;
  import sttc_pkg::*;
  localparam int NT = 3, NR = 2, W = 8;
  localparam int BM_W = bm_width(W, NT, NR);
  logic clk = 1'b0, rst, in_valid, out_valid;
  logic signed [W-1:0] r_re [NR], r_im [NR];
  logic signed [W-1:0] h_re [NR][NT], h_im [NR][NT];
  sym_t co;
  logic [3:0] acs_out;
  logic [BM_W-1:0] pm [NUM_STATES];
  logic [BM_W:0] pm_min;
  int checks = 0, failures = 0, cycle = 0;
  int g [NT][2][2] = '{'{'{0, 2}, '{0, 1}}, '{'{2, 0}, '{1, 0}}, '{'{2, 2}, '{1, 1}}};
  int cs [4] = '{1, 0, -1, 0};
  int sn [4] = '{0, 1, 0, -1};
  int exp_q [$];
  int sent_cycle [$];
  int decoded = 0;

  sttc_viterbi_decoder dut (.clk, .rst, .in_valid, .r_re, .r_im, .h_re, .h_im,
                            .out_valid, .co, .acs_out, .pm, .pm_min);

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int sym(int i, int u, int s);
    return (g[i][0][0]*(u/2) + g[i][0][1]*(s/2) + g[i][1][0]*(u%2) + g[i][1][1]*(s%2)) % 4;
  endfunction

  // output side: compare in order, check latency
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      int e, c0;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL output with nothing sent");
      end else begin
        e = exp_q.pop_front(); c0 = sent_cycle.pop_front();
        decoded++;
        if (int'(co) != e) begin failures++; $display("FAIL symbol %0d: co=%0d expected %0d", decoded, co, e); end
        checks++;
        if (cycle - c0 != 3) begin failures++; $display("FAIL latency %0d cycles", cycle - c0); end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int state = 0;
    rst = 1'b1; in_valid = 1'b0;
    for (int r = 0; r < NR; r++) begin
      r_re[r] = '0; r_im[r] = '0;
      for (int i = 0; i < NT; i++) begin
        h_re[r][i] = W'($urandom_range(0, 60) - 30);
        h_im[r][i] = W'($urandom_range(0, 60) - 30);
      end
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        automatic int u = $urandom_range(0, 3);
        for (int r = 0; r < NR; r++) begin
          automatic int yr = 0, yi = 0;
          for (int i = 0; i < NT; i++) begin
            automatic int s = sym(i, u, state);
            yr += h_re[r][i]*cs[s] - h_im[r][i]*sn[s];
            yi += h_re[r][i]*sn[s] + h_im[r][i]*cs[s];
          end
          r_re[r] = W'(yr); r_im[r] = W'(yi);
        end
        state = u;
        exp_q.push_back(u);
        sent_cycle.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d symbols never decoded", exp_q.size()); end
    $display("decoded %0d symbols", decoded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
