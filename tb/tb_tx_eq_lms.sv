// tb_tx_eq_lms - the 8-tap transmit equalizer drives a channel with a pre-cursor
// and two post-cursors (0.10 | 0.55 | 0.25 0.10). The error (target +-0.5 minus
// the channel output) is measured one cycle after the main cursor and returned
// through a 6-register delay line standing in for the return path, 8 cycles after
// the tap data (ERR_LAT = 8). After training, the peak residual ISI relative to
// the main cursor must drop well below the untrained 0.64 and the taps next to the
// main one must be negative (pre-emphasis).
module tb_tx_eq_lms;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, train, load, tx_bit;
  sm_t err, mu;
  logic signed [15:0] tx_y;
  sm_t coef [8];
  logic [7:0] dac_code [8];
  logic [7:0] dac_sign;
  int checks = 0, failures = 0;
  real hc [4] = '{0.10, 0.55, 0.25, 0.10};
  real ty [4];
  int epipe [7];
  logic bh [8];

  tx_eq_lms #(.TAPS(8), .MAIN_TAP(2), .ERR_LAT(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int smv(sm_t v);
    return v[9] ? -int'(v[8:0]) : int'(v[8:0]);
  endfunction

  initial begin
    real isi_before, isi_after, worst, r;
    train = 0; load = 0; tx_bit = 0; err = 0; mu = 10'd8;
    foreach (ty[i]) ty[i] = 0.0;
    foreach (epipe[i]) epipe[i] = 0;
    foreach (bh[i]) bh[i] = 0;
    isi_before = 0.0; isi_after = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; load = 1;
    @(negedge clk); load = 0;
    for (int n = 0; n < 30000; n++) begin
      real dsr;
      // channel: ty[0] = tx_y now (pre-cursor), ty[1] main, ty[2..3] post
      for (int j = 3; j > 0; j--) ty[j] = ty[j-1];
      ty[0] = real'(tx_y) / 256.0;
      r = 0.0;
      for (int j = 0; j < 4; j++) r += hc[j] * ty[j];
      // ty[1] carries, on its main tap, the bit set 5 iterations ago (bh[4])
      dsr = bh[4] ? 0.5 : -0.5;
      worst = (r - dsr) / 0.5;
      if (worst < 0.0) worst = -worst;
      if (n > 100 && n < 1100 && worst > isi_before) isi_before = worst;
      if (n > 28000 && worst > isi_after) isi_after = worst;
      for (int j = 6; j > 0; j--) epipe[j] = epipe[j-1];
      epipe[0] = int'((dsr - r) * 256.0);
      err = q2sm(16'(epipe[6]));
      train = (n > 1100);
      tx_bit = 1'($urandom);
      for (int j = 7; j > 0; j--) bh[j] = bh[j-1];
      bh[0] = tx_bit;
      @(posedge clk); #1;
      @(negedge clk);
    end
    $display("peak ISI/main before %0.3f after %0.3f; coef %0d %0d %0d %0d %0d", isi_before, isi_after,
             smv(coef[0]), smv(coef[1]), smv(coef[2]), smv(coef[3]), smv(coef[4]));
    checks++;
    if (isi_before < 0.5) begin failures++; $display("untrained ISI unexpectedly low"); end
    checks++;
    if (isi_after > 0.3) begin failures++; $display("training did not open the eye"); end
    checks++;
    if (smv(coef[1]) >= 0 || smv(coef[3]) >= 0) begin failures++; $display("no pre-emphasis around the main tap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
