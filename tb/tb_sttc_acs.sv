// tb_sttc_acs: self-checking test of the add-compare-select unit. Drives
// random branch metrics (small ones, to force ties, and full-range ones, to
// test the widths) and compares metrics, one-hot best state and subtracted
// minimum against a model kept in this testbench:
//   s_n = min_p (s_p + bm[p][n]), best = lowest n with the smallest s_n,
//   stored s_n = s_n - s_best.
module tb_sttc_acs;
  import sttc_pkg::*;
  localparam int BM_W = bm_width(W_DEF, NT_DEF, NR_DEF);
  logic clk = 1'b0, rst, bm_valid, acs_valid;
  logic [BM_W-1:0] bm [NUM_STATES][NUM_STATES];
  logic [BM_W-1:0] pm [NUM_STATES];
  logic [3:0] acs_out;
  logic [BM_W:0] pm_min;
  longint mpm [4];
  longint mmin;
  int     mbest;
  int checks = 0, failures = 0, ties = 0;

  sttc_acs dut (.clk, .rst, .bm_valid, .bm, .pm, .acs_out, .acs_valid, .pm_min);

  always #10 clk = ~clk;

  task automatic model_step();
    longint s [4];
    for (int n = 0; n < 4; n++) begin
      s[n] = -1;
      for (int p = 0; p < 4; p++) begin
        longint c = mpm[p] + longint'(bm[p][n]);
        if (s[n] < 0 || c < s[n]) s[n] = c;
      end
    end
    mbest = 0;
    for (int n = 1; n < 4; n++) if (s[n] < s[mbest]) mbest = n;
    for (int n = 0; n < 4; n++) if (n != mbest && s[n] == s[mbest]) ties++;
    mmin = s[mbest];
    for (int n = 0; n < 4; n++) mpm[n] = s[n] - mmin;
  endtask

  task automatic check_out(string what, logic exp_valid);
    checks++;
    if (acs_valid !== exp_valid) begin failures++; $display("FAIL %s acs_valid", what); end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (longint'(pm[n]) != mpm[n]) begin
        failures++; $display("FAIL %s pm[%0d]=%0d expected %0d", what, n, pm[n], mpm[n]);
      end
    end
    checks++;
    if (acs_out !== 4'(1 << mbest)) begin
      failures++; $display("FAIL %s acs_out=%b expected state %0d", what, acs_out, mbest);
    end
    checks++;
    if (longint'(pm_min) != mmin) begin
      failures++; $display("FAIL %s pm_min=%0d expected %0d", what, pm_min, mmin);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; bm_valid = 1'b0;
    for (int p = 0; p < 4; p++) for (int n = 0; n < 4; n++) bm[p][n] = '0;
    for (int n = 0; n < 4; n++) mpm[n] = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acs_out !== 4'b0000 || acs_valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (pm[n] != '0) begin failures++; $display("FAIL reset pm"); end
    end
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      automatic int mode = $urandom_range(0, 2);
      @(negedge clk);
      for (int p = 0; p < 4; p++)
        for (int n = 0; n < 4; n++)
          case (mode)
            0: bm[p][n] = BM_W'($urandom_range(0, 3));
            1: bm[p][n] = BM_W'($urandom_range(0, 1000));
            default: bm[p][n] = BM_W'({$urandom, $urandom});
          endcase
      bm_valid = ($urandom_range(0, 4) != 0);
      if (bm_valid) model_step();
      @(posedge clk); #1;
      check_out($sformatf("t=%0d", t), bm_valid);
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie was exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
