// tb_direct_coef_calc - random impulse responses y and coefficient sets C; the
// samples Y = C convolved with y are given to the block, which must return C
// within 0.04 (about 10 LSB) after its sequential multiply/divide schedule.
module tb_direct_coef_calc;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, start, smp_valid, done;
  sm_t y_s, Y_s;
  sm_t coef [5];
  int checks = 0, failures = 0;

  direct_coef_calc #(.TAPS(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int smv(sm_t v);
    return v[9] ? -int'(v[8:0]) : int'(v[8:0]);
  endfunction

  initial begin
    start = 0; smp_valid = 0; y_s = 0; Y_s = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int y [5], c [5], Y [5], waitc;
      y[0] = 150 + int'($urandom % 80);                     // main sample 0.59..0.9
      for (int i = 1; i < 5; i++) y[i] = int'($urandom % 81) - 40;
      c[0] = 200 + int'($urandom % 80);
      for (int i = 1; i < 5; i++) c[i] = int'($urandom % 101) - 50;
      for (int k = 0; k < 5; k++) begin
        Y[k] = 0;
        for (int j = 0; j <= k; j++) Y[k] += c[j] * y[k-j];
        Y[k] = Y[k] / 256;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < 5; k++) begin
        repeat ($urandom % 3) @(negedge clk);
        smp_valid = 1; y_s = q2sm(16'(y[k])); Y_s = q2sm(16'(Y[k]));
        @(negedge clk); smp_valid = 0;
      end
      waitc = 0;
      while (!done && waitc < 1000) begin @(negedge clk); waitc++; end
      checks++;
      if (!done) begin failures++; $display("trial %0d: no done", trial); end
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (smv(coef[k]) - c[k] > 10 || c[k] - smv(coef[k]) > 10) begin
          failures++; $display("trial %0d C%0d = %0d expected %0d", trial, k + 1, smv(coef[k]), c[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
