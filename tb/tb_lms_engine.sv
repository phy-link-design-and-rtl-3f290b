// tb_lms_engine - random data codes, errors, step sizes and enables. A model of
// the engine (Rom_in, two multiplies, accumulator with 7-cycle latency) predicts
// every coefficient value; a directed run with a constant positive x*e must make
// the coefficient climb to the +1.5 clamp and the DAC code reach 255.
module tb_lms_engine;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, en, load;
  sm_t init, err, mu, coef;
  logic [7:0] x_code, dac_code;
  logic dac_sign;
  int checks = 0, failures = 0;
  int dq [$];                 // deltas in flight (0 when disabled)
  int model_v;

  lms_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int mult(int a, int b);   // signed Q8 values in sign-magnitude range
    int ma, mb, sh, p;
    ma = a < 0 ? -a : a; mb = b < 0 ? -b : b; sh = 0;
    if (ma > 511) ma = 511;
    if (mb > 511) mb = 511;
    if (ma >= 256) begin ma = ma / 2; sh++; end
    if (mb >= 256) begin mb = mb / 2; sh++; end
    p = (ma * mb * (1 << sh)) / 256;
    if (p > 511) p = 511;
    return ((a < 0) != (b < 0)) ? -p : p;
  endfunction

  function automatic int smv(sm_t v);
    return v[9] ? -int'(v[8:0]) : int'(v[8:0]);
  endfunction

  initial begin
    en = 0; load = 0; init = 0; err = 0; mu = 0; x_code = 128; model_v = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 6; i++) dq.push_back(0);
    for (int i = 0; i < 3000; i++) begin
      int d;
      @(negedge clk);
      if (i < 2500) begin
        // the step size is a static setting: change it only with adaptation off
        en = ($urandom % 4) != 0 && (i % 500) > 10 && i < 2490;
        x_code = 8'($urandom);
        err = 10'($urandom % 512) | {1'($urandom), 9'd0};
        if (i % 500 == 5) mu = 10'(1 + $urandom % 32);
      end else begin
        en = (i > 2510); x_code = 8'd255; err = 10'd200; mu = 10'd64;
      end
      load = (i == 100);
      init = 10'd77;
      d = en ? mult(mult((int'(x_code) - 128) * 2, smv(err)), smv(mu)) : 0;
      dq.push_back(d);
      @(posedge clk); #1;
      begin
        int dd;
        dd = dq.pop_front();
        if (load) model_v = 77;
        else begin
          model_v += dd;
          if (model_v > 384) model_v = 384;
          if (model_v < -384) model_v = -384;
        end
      end
      checks++;
      if (smv(coef) != model_v) begin
        failures++; $display("step %0d coef %0d expected %0d", i, smv(coef), model_v);
      end
    end
    checks++;
    if (smv(coef) != 384 || dac_code != 8'd255 || dac_sign) begin
      failures++; $display("no climb to the clamp: coef %0d dac %0d", smv(coef), dac_code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
