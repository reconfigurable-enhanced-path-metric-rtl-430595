// tb_sttc_bmc: self-checking test of the branch metric unit. Random channel
// estimates and received samples (full W-bit range, so the extreme values
// are exercised); the expected metrics come from complex multiplication by
// the 4-PSK point (cos, sin of s*90 degrees) and the code's generator table,
// both written out here. Checks the one-cycle latency and that bm holds when
// in_valid is low.
module tb_sttc_bmc;
  import sttc_pkg::*;
  localparam int NT = 3, NR = 2, W = 8;
  localparam int BM_W = bm_width(W, NT, NR);
  logic clk = 1'b0, rst, in_valid, bm_valid;
  logic signed [W-1:0] r_re [NR], r_im [NR];
  logic signed [W-1:0] h_re [NR][NT], h_im [NR][NT];
  logic [BM_W-1:0] bm [NUM_STATES][NUM_STATES];
  longint expv [NUM_STATES][NUM_STATES];
  int checks = 0, failures = 0;
  int g [NT][2][2] = '{'{'{0, 2}, '{0, 1}}, '{'{2, 0}, '{1, 0}}, '{'{2, 2}, '{1, 1}}};
  int cs [4] = '{1, 0, -1, 0};
  int sn [4] = '{0, 1, 0, -1};

  sttc_bmc dut (.clk, .rst, .in_valid, .r_re, .r_im, .h_re, .h_im, .bm_valid, .bm);

  always #10 clk = ~clk;

  function automatic int sym(int i, int u, int s);
    return (g[i][0][0]*(u/2) + g[i][0][1]*(s/2) + g[i][1][0]*(u%2) + g[i][1][1]*(s%2)) % 4;
  endfunction

  function automatic int rnd(int extreme);
    if (extreme != 0) return ($urandom_range(0, 1) != 0) ? -(2**(W-1)) : 2**(W-1) - 1;
    return int'($urandom_range(0, 2**W - 1)) - 2**(W-1);
  endfunction

  task automatic compute_expected();
    for (int p = 0; p < 4; p++)
      for (int n = 0; n < 4; n++) begin
        longint acc = 0;
        for (int r = 0; r < NR; r++) begin
          longint yr = 0, yi = 0, dr, di;
          for (int i = 0; i < NT; i++) begin
            int s = sym(i, n, p);
            yr += h_re[r][i]*cs[s] - h_im[r][i]*sn[s];
            yi += h_re[r][i]*sn[s] + h_im[r][i]*cs[s];
          end
          dr = longint'(r_re[r]) - yr; di = longint'(r_im[r]) - yi;
          acc += dr*dr + di*di;
        end
        expv[p][n] = acc;
      end
  endtask

  task automatic check_bm(string what);
    for (int p = 0; p < 4; p++)
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (longint'(bm[p][n]) != expv[p][n]) begin
          failures++;
          $display("FAIL %s bm[%0d][%0d]=%0d expected %0d", what, p, n, bm[p][n], expv[p][n]);
        end
      end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    for (int r = 0; r < NR; r++) begin
      r_re[r] = '0; r_im[r] = '0;
      for (int i = 0; i < NT; i++) begin h_re[r][i] = '0; h_im[r][i] = '0; end
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      automatic int ext = (t % 10 == 0) ? 1 : 0;
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        r_re[r] = W'(rnd(ext)); r_im[r] = W'(rnd(ext));
        for (int i = 0; i < NT; i++) begin h_re[r][i] = W'(rnd(ext)); h_im[r][i] = W'(rnd(ext)); end
      end
      in_valid = 1'b1;
      compute_expected();
      @(posedge clk); #1;
      checks++;
      if (bm_valid !== 1'b1) begin failures++; $display("FAIL bm_valid t=%0d", t); end
      check_bm($sformatf("t=%0d", t));
      // change inputs with in_valid low: bm must hold
      if (t % 7 == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        r_re[0] = r_re[0] + 8'sd1;
        @(posedge clk); #1;
        checks++;
        if (bm_valid !== 1'b0) begin failures++; $display("FAIL bm_valid low t=%0d", t); end
        check_bm("hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
