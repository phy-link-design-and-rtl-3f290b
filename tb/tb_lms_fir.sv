// tb_lms_fir - system identification: random data codes pass an unknown 4-tap
// FIR (0.25, -0.125, 0.5, 0.75); the error is desired minus the block's output.
// After training every coefficient must be within 0.06 of the target and the
// output error small.
module tb_lms_fir;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, en, load;
  logic [7:0] x_code;
  sm_t err, mu;
  sm_t coef [4];
  logic [7:0] dac_code [4];
  logic [3:0] dac_sign;
  logic [7:0] x_taps [4];
  logic signed [15:0] y;
  int checks = 0, failures = 0;
  int h [4] = '{64, -32, 128, 192};
  int xh [8];
  int d_prev, d_now;

  lms_fir #(.TAPS(4), .ERR_LAT(1), .MAIN_TAP(3), .MAIN_INIT(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int smv(sm_t v);
    return v[9] ? -int'(v[8:0]) : int'(v[8:0]);
  endfunction

  initial begin
    int big_err;
    en = 0; load = 0; x_code = 128; err = 0; mu = 10'd32;
    foreach (xh[i]) xh[i] = 0;
    d_prev = 0; d_now = 0; big_err = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; load = 1;
    @(negedge clk); load = 0;
    checks++;
    if (smv(coef[3]) != 256 || smv(coef[0]) != 0) begin failures++; $display("load preset wrong"); end
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // y now reflects the delay line after the previous sample: desired is d_prev
      err = q2sm(16'(d_prev - int'(y)));
      en = (i > 4);
      if (i > 5000 && (d_prev - int'(y) > 40 || int'(y) - d_prev > 40)) big_err++;
      x_code = 8'($urandom);
      for (int k = 7; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = (int'(x_code) - 128) * 2;
      d_prev = d_now;
      d_now = 0;
      for (int k = 0; k < 4; k++) d_now += h[k] * xh[k];
      d_now = d_now / 256;
      @(posedge clk);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (smv(coef[k]) - h[k] > 15 || h[k] - smv(coef[k]) > 15) begin
        failures++; $display("tap %0d coef %0d target %0d", k, smv(coef[k]), h[k]);
      end
    end
    checks++;
    if (big_err > 20) begin failures++; $display("%0d large errors after training", big_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
