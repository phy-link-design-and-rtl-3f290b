// tb_cdr_jitter - jitter and threshold runs of the PI2 CDR with 3TS stop.
//
// Two CDR controllers run side by side on the same random data: one with the
// default 2-step alignment zone, one with a 6-step zone (the zone meant for data
// with about 50 ps of jitter). One unit interval is 32 interpolator steps of
// 6.25 ps; the data edges sit at 32n + D steps plus a random jitter, uniform over
// a peak-to-peak range of J steps and drawn anew for every sample. The runs
// cover J = 0, 1, 3, 10 steps (0, 6.25, 18.75, 62.5 ps) with Pre_filt 2, and
// J = 1, 3, 10 with Pre_filt 8, plus J = 8 (50 ps) for the zone comparison.
// For each run the mean distance of the I sampler from the bit centre over the
// last 20000 UI is printed in degrees of the 400 ps clock (5.625 degrees per
// step). Checks: the 2-step CDR aligns in every run with J <= 3, the mean
// I-sampler error stays below 1 + Z/2 + J/2 steps (the loop stops anywhere
// inside a zone of Z steps, so a wider zone leaves up to Z/2 steps of static
// error), and with J >= 8 the 6-step zone is aligned at least as often as the
// 2-step zone.
// The sampler model samples Q1 at 32k + p, Q2 at 32k + p + Z and I half a UI
// after the zone centre, where p is the unwrapped Q1 code of each CDR.
module tb_cdr_jitter;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, train_en = 0;
  logic [3:0] pre_filt = 4'd2;
  logic [1:0] gain_sel = 2'd3;
  logic       i_bit [2], q1_bit [2], q2_bit [2];
  logic       la [2], lb [2], pi_sel [2], aligned [2];
  logic [5:0] ctrl_a [2], ctrl_b [2], code_q1 [2], code_q2 [2], code_i [2];
  pd_state_t  pd_state [2];
  int checks = 0, failures = 0;

  pi2_cdr #(.ZONE_LSB(2)) u_z2 (
    .clk, .rst_n, .train_en, .i_bit(i_bit[0]), .q1_bit(q1_bit[0]), .q2_bit(q2_bit[0]),
    .pre_filt, .gain_sel, .clk_a_lvl(la[0]), .clk_b_lvl(lb[0]), .ctrl_a(ctrl_a[0]),
    .ctrl_b(ctrl_b[0]), .pi_sel(pi_sel[0]), .code_q1(code_q1[0]), .code_q2(code_q2[0]),
    .code_i(code_i[0]), .aligned(aligned[0]), .pd_state(pd_state[0]));
  pi2_cdr #(.ZONE_LSB(6)) u_z6 (
    .clk, .rst_n, .train_en, .i_bit(i_bit[1]), .q1_bit(q1_bit[1]), .q2_bit(q2_bit[1]),
    .pre_filt, .gain_sel, .clk_a_lvl(la[1]), .clk_b_lvl(lb[1]), .ctrl_a(ctrl_a[1]),
    .ctrl_b(ctrl_b[1]), .pi_sel(pi_sel[1]), .code_q1(code_q1[1]), .code_q2(code_q2[1]),
    .code_i(code_i[1]), .aligned(aligned[1]), .pd_state(pd_state[1]));

  always #5 clk = ~clk;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic data [longint];
  // data value at time t (steps) for an edge position d
  function automatic logic bit_at(longint t, int d);
    longint n;
    n = (t - d) >= 0 ? (t - d) / 32 : -1 - ((d - t - 1) / 32);
    if (!data.exists(n)) data[n] = 1'($urandom);
    return data[n];
  endfunction

  function automatic int jit(int j);   // uniform in [-j/2, j - j/2]
    return (j == 0) ? 0 : int'($urandom % (j + 1)) - j / 2;
  endfunction

  localparam int NRUN = 8;
  localparam int RUN_J  [NRUN] = '{0, 1, 3, 10, 1, 3, 10, 8};
  localparam int RUN_PF [NRUN] = '{2, 2, 2, 2, 8, 8, 8, 2};
  localparam int ZONE   [2]    = '{2, 6};
  localparam int CYCLES = 60000;
  localparam int WIN    = 20000;

  initial begin
    for (int r = 0; r < NRUN; r++) begin
      int d, lock_at [2], n_al [2];
      longint p [2], k, err_sum [2];
      logic [5:0] last_code [2];
      data.delete();
      d = int'($urandom % 32);
      pre_filt = 4'(RUN_PF[r]);
      rst_n = 0; train_en = 0;
      repeat (3) @(posedge clk);
      @(negedge clk); rst_n = 1; train_en = 1;
      k = 100;
      for (int c = 0; c < 2; c++) begin
        p[c] = 0; last_code[c] = 0; lock_at[c] = -1; n_al[c] = 0; err_sum[c] = 0;
      end
      for (int cyc = 0; cyc < CYCLES; cyc++) begin
        for (int c = 0; c < 2; c++) begin
          int delta, e;
          delta = int'(code_q1[c]) - int'(last_code[c]);
          if (delta > 32) delta -= 64;
          if (delta < -32) delta += 64;
          p[c] += delta;
          last_code[c] = code_q1[c];
          i_bit[c]  = bit_at(32 * k + p[c] + ZONE[c] / 2 + 16 - 32, d + jit(RUN_J[r]));
          q1_bit[c] = bit_at(32 * k + p[c], d + jit(RUN_J[r]));
          q2_bit[c] = bit_at(32 * k + p[c] + ZONE[c], d + jit(RUN_J[r]));
          la[c] = 1'($urandom); lb[c] = 1'($urandom);
          if (cyc >= CYCLES - WIN) begin
            // I sampler distance from the bit centre, wrapped to [-16, 16)
            e = int'((p[c] + ZONE[c] / 2 - d) % 32);
            if (e < 0) e += 32;
            if (e >= 16) e -= 32;
            err_sum[c] += (e < 0) ? -e : e;
          end
        end
        k++;
        @(posedge clk); #1;
        for (int c = 0; c < 2; c++) begin
          if (aligned[c] && lock_at[c] < 0) lock_at[c] = cyc;
          if (cyc >= CYCLES - WIN && aligned[c]) n_al[c]++;
        end
        @(negedge clk);
      end
      for (int c = 0; c < 2; c++) begin
        real mean_steps;
        mean_steps = real'(err_sum[c]) / WIN;
        $display("J=%0d steps Pre_filt=%0d zone=%0d: first aligned at %0d UI, aligned %0d of %0d UI, mean |I error| %0.2f steps = %0.1f deg",
                 RUN_J[r], RUN_PF[r], ZONE[c], lock_at[c], n_al[c], WIN, mean_steps, mean_steps * 5.625);
        checks++;
        if (mean_steps > 1.0 + ZONE[c] / 2.0 + RUN_J[r] / 2.0) begin
          failures++; $display("  mean error above %0.1f steps", 1.0 + ZONE[c] / 2.0 + RUN_J[r] / 2.0);
        end
      end
      if (RUN_J[r] <= 3) begin
        checks++;
        if (lock_at[0] < 0) begin failures++; $display("  2-step zone never aligned"); end
      end
      if (RUN_J[r] >= 8) begin
        checks++;
        if (n_al[1] < n_al[0]) begin failures++; $display("  6-step zone aligned less often than 2-step zone"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
