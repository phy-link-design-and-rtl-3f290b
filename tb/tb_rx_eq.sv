// tb_rx_eq - trains the receiver equalizer on a PRBS-like random pattern sent
// through a channel with one pre-cursor and four post-cursors
// (0.15 | 0.60 | 0.30 0.15 0.08 0.04) plus small noise, whose unequalized eye is
// closed. After LMS training with mu = 8/256 (~0.032) the frozen equalizer, fed
// back with its own decisions, must decide every bit correctly, the first DFE tap
// must cancel the first post-cursor (negative), and the error must be small.
module tb_rx_eq;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, train, load, ideal, dec, ref_bit;
  logic [7:0] rx_code;
  sm_t mu, err;
  logic signed [15:0] y;
  sm_t ffe_coef [4], dfe_coef [4];
  logic [7:0] ffe_dac [4], dfe_dac [4];
  logic [3:0] ffe_sign, dfe_sign;
  int checks = 0, failures = 0;
  real h [6] = '{0.15, 0.60, 0.30, 0.15, 0.08, 0.04};   // h[0] pre-cursor, h[1] main
  logic b [0:20100];
  logic bq [$];

  rx_eq #(.FFE_TAPS(4), .DFE_TAPS(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real sym(logic v); return v ? 1.0 : -1.0; endfunction

  function automatic int smv(sm_t v);
    return v[9] ? -int'(v[8:0]) : int'(v[8:0]);
  endfunction

  initial begin
    int raw_err, eq_err, n_eval;
    real sse;
    foreach (b[i]) b[i] = 1'($urandom);
    train = 0; load = 0; ideal = 0; rx_code = 128; mu = 10'd8;
    raw_err = 0; eq_err = 0; n_eval = 0; sse = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; load = 1;
    @(negedge clk); load = 0;
    for (int n = 5; n < 20000; n++) begin
      real r;
      int c;
      // sample n carries the main cursor of bit n, the pre-cursor of bit n+1
      r = h[0] * sym(b[n+1]) + h[1] * sym(b[n]);
      for (int j = 1; j <= 4; j++) r += h[j+1] * sym(b[n-j]);
      r += (real'($urandom % 1000) - 500.0) / 50000.0;
      c = 128 + int'(r * 170.0);
      if (c > 255) c = 255;
      if (c < 0) c = 0;
      rx_code = 8'(c);
      ideal = b[n];
      if ((r >= 0.0) != b[n]) raw_err++;
      train = (n < 12000);
      bq.push_back(b[n]);
      @(posedge clk); #1;
      if (bq.size() > 4) begin   // dec is 4 clock edges behind the sample
        logic want;
        want = bq.pop_front();
        if (n > 12100) begin
          n_eval++;
          if (dec != want) eq_err++;
          sse += (real'(smv(err)) / 256.0) ** 2;
        end
      end
      @(negedge clk);
    end
    $display("raw decision errors %0d, equalized errors %0d of %0d, mse %0.4f", raw_err, eq_err, n_eval, sse / n_eval);
    $display("ffe %0d %0d %0d %0d dfe %0d %0d %0d %0d", smv(ffe_coef[0]), smv(ffe_coef[1]), smv(ffe_coef[2]),
             smv(ffe_coef[3]), smv(dfe_coef[0]), smv(dfe_coef[1]), smv(dfe_coef[2]), smv(dfe_coef[3]));
    checks++;
    if (raw_err < 100) begin failures++; $display("channel eye not closed, test too weak"); end
    checks++;
    if (eq_err != 0) begin failures++; $display("%0d decision errors after training", eq_err); end
    checks++;
    if (smv(dfe_coef[0]) > -25) begin failures++; $display("first DFE tap does not cancel the post-cursor"); end
    checks++;
    if (sse / n_eval > 0.08) begin failures++; $display("residual error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
