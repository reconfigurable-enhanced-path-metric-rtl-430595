// tb_sttc_encoder: self-checking test of the STTC encoder. Random input
// symbols with random gaps in in_valid; the expected antenna symbols are
// computed from the generator sum x_i = sum g^k_{j,i} C^k(t-j) mod 4 with
// the coefficients written out here as a table, independent of the
// package's packing.
module tb_sttc_encoder;
  import sttc_pkg::*;
  localparam int NT = 3;
  logic clk = 1'b0, rst, in_valid, out_valid;
  sym_t c, state;
  sym_t x [NT];
  int checks = 0, failures = 0;
  // g[i][k][j]: antenna i, input bit k (0 = C1), delay j
  int g [NT][2][2] = '{'{'{0, 2}, '{0, 1}}, '{'{2, 0}, '{1, 0}}, '{'{2, 2}, '{1, 1}}};

  sttc_encoder dut (.clk, .rst, .in_valid, .c, .out_valid, .x, .state);

  always #10 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int prev1 = 0, prev2 = 0;
    rst = 1'b1; in_valid = 1'b0; c = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      int c1, c2, e;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      c = sym_t'($urandom_range(0, 3));
      c1 = int'(c[1]); c2 = int'(c[0]);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid t=%0d", t); end
      if (in_valid) begin
        for (int i = 0; i < NT; i++) begin
          e = (g[i][0][0]*c1 + g[i][0][1]*prev1 + g[i][1][0]*c2 + g[i][1][1]*prev2) % 4;
          checks++;
          if (int'(x[i]) != e) begin
            failures++;
            $display("FAIL t=%0d ant %0d: x=%0d expected %0d", t, i+1, x[i], e);
          end
        end
        prev1 = c1; prev2 = c2;
      end
      checks++;
      if (int'(state) != prev1*2 + prev2) begin failures++; $display("FAIL state t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
