// tb_sm_acc - random load/enable/delta sequences against a two's-complement model
// with clamping at +-384 (1.5); also checks that the clamp is reached both ways.
module tb_sm_acc;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, en, load;
  sm_t init, delta, coef;
  int checks = 0, failures = 0, model_v = 0, n_hi = 0, n_lo = 0;

  sm_acc #(.SAT(384)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int smv(sm_t v);
    return v[9] ? -int'(v[8:0]) : int'(v[8:0]);
  endfunction

  initial begin
    en = 0; load = 0; init = 0; delta = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      load  = ($urandom % 200) == 0;
      en    = ($urandom % 5) != 0;
      init  = 10'($urandom);
      // long runs of one sign to hit the clamps
      delta = {1'(((i / 300) % 2) ? (($urandom % 4) != 0) : (($urandom % 4) == 0)), 9'($urandom % 64)};
      if (load) model_v = smv(init);
      else if (en) begin
        model_v += smv(delta);
        if (model_v > 384) model_v = 384;
        if (model_v < -384) model_v = -384;
      end
      @(posedge clk); #1;
      checks++;
      if (smv(coef) != model_v || (coef[8:0] == 0 && coef[9])) begin
        failures++; $display("step %0d coef %0d expected %0d", i, smv(coef), model_v);
      end
      if (model_v == 384) n_hi++;
      if (model_v == -384) n_lo++;
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("clamp never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
