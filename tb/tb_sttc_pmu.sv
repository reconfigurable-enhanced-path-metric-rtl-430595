// tb_sttc_pmu: self-checking test of the improved path metric updater.
// Plays the reference stimulus 0000, 0001, 0010, 0100, 1000, 0001 (one new
// value per clock) and checks that each decoded symbol appears exactly one
// clock later; then sweeps all 16 input patterns (non-one-hot must give 00),
// checks that co holds while en is low, and that reset clears it.
module tb_sttc_pmu;
  logic       clk = 1'b0;
  logic       rst;
  logic       en;
  logic [3:0] acs;
  logic [1:0] co;
  logic       co_valid;
  int checks = 0, failures = 0;

  sttc_pmu dut (.clk, .rst, .en, .acs, .co, .co_valid);

  always #10 clk = ~clk;  // period of 20 time units

  // Reference: index of the single set bit, 00 for anything else.
  function automatic logic [1:0] ref_co(logic [3:0] a);
    int ones = 0;
    logic [1:0] idx = 2'b00;
    for (int b = 0; b < 4; b++) if (a[b]) begin ones++; idx = 2'(b); end
    return (ones == 1) ? idx : 2'b00;
  endfunction

  task automatic check(logic [1:0] exp_co, logic exp_v, string what);
    checks++;
    if (co !== exp_co || co_valid !== exp_v) begin
      failures++;
      $display("FAIL %s: co=%b valid=%b expected co=%b valid=%b", what, co, co_valid, exp_co, exp_v);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [3:0] seq [6] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0001};
    automatic logic [1:0] exp_seq [6] = '{2'b00, 2'b00, 2'b01, 2'b10, 2'b11, 2'b00};
    rst = 1'b1; en = 1'b0; acs = 4'b1000;
    repeat (2) @(posedge clk);
    #1 check(2'b00, 1'b0, "reset");
    rst = 1'b0;
    // reference sequence, one-cycle latency
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); acs = seq[i]; en = 1'b1;
      @(posedge clk); #1 check(exp_seq[i], 1'b1, $sformatf("sequence step %0d", i));
    end
    // all patterns
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); acs = 4'(a); en = 1'b1;
      @(posedge clk); #1 check(ref_co(4'(a)), 1'b1, $sformatf("pattern %b", 4'(a)));
    end
    // hold while en is low
    @(negedge clk); acs = 4'b1000; en = 1'b1;
    @(posedge clk); #1 check(2'b11, 1'b1, "load 11");
    @(negedge clk); acs = 4'b0010; en = 1'b0;
    repeat (3) begin @(posedge clk); #1 check(2'b11, 1'b0, "hold"); end
    // asynchronous reset
    @(negedge clk); rst = 1'b1; #1 check(2'b00, 1'b0, "async reset");
    @(negedge clk); rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
