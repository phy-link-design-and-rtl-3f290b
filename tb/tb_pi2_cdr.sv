// tb_pi2_cdr - closed-loop test of the PI2 CDR with a sampler model.
//
// One clock is one unit interval (UI) of 32 interpolator steps. Random data has
// its edges at 32n + D steps (D unknown to the CDR, optionally with +-1 step of
// jitter). The model samples Q1(k) at 32k + p, Q2(k) at 32k + p + ZONE and I(k)
// half a UI earlier, where p is the active interpolator code unwrapped (a code
// wrap moves the phase by less than one UI, as the interpolator is periodic).
// The loop must move the code until the data edge lies between Q1 and Q2, raise
// `aligned`, stay aligned most of the time, and the I sampler must then sit
// within 3 steps of the bit centre.
module tb_pi2_cdr;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, train_en;
  logic i_bit, q1_bit, q2_bit;
  logic [3:0] pre_filt;
  logic [1:0] gain_sel;
  logic clk_a_lvl, clk_b_lvl, pi_sel, aligned;
  logic [5:0] ctrl_a, ctrl_b, code_q1, code_q2, code_i;
  pd_state_t pd_state;
  int checks = 0, failures = 0, n_switch = 0;

  pi2_cdr #(.WIDTH(8), .PRE_FILT(2), .K_PD(32), .Q_OFFSET(16), .ZONE_LSB(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic data [longint];
  function automatic logic bit_at(longint t, int d);   // data value at time t (steps)
    longint n;
    n = (t - d) >= 0 ? (t - d) / 32 : -1 - ((d - t - 1) / 32);
    if (!data.exists(n)) data[n] = 1'($urandom);
    return data[n];
  endfunction

  initial begin
    train_en = 0; i_bit = 0; q1_bit = 0; q2_bit = 0;
    pre_filt = 0; gain_sel = 3; clk_a_lvl = 0; clk_b_lvl = 0;
    for (int trial = 0; trial < 4; trial++) begin
      int d, lock_at, n_al;
      longint p, k;
      logic [5:0] last_code;
      logic last_sel;
      data.delete();
      d = int'($urandom % 32);
      pre_filt = (trial == 2) ? 4'd8 : 4'd0;
      gain_sel = (trial == 1) ? 2'd2 : 2'd3;
      rst_n = 0; train_en = 0;
      repeat (3) @(posedge clk);
      @(negedge clk); rst_n = 1; train_en = 1;
      p = 0; last_code = 0; lock_at = -1; n_al = 0; k = 100; last_sel = 0;
      for (int cyc = 0; cyc < 60000; cyc++) begin
        int dj, delta;
        // unwrap the active code into the phase p
        delta = int'(code_q1) - int'(last_code);
        if (delta > 32) delta -= 64;
        if (delta < -32) delta += 64;
        p += delta;
        last_code = code_q1;
        dj = (trial == 3) ? d + int'($urandom % 2) : d;
        i_bit  = bit_at(32 * k + p + 1 + 16 - 32, dj);
        q1_bit = bit_at(32 * k + p, dj);
        q2_bit = bit_at(32 * k + p + 2, dj);
        clk_a_lvl = 1'($urandom); clk_b_lvl = 1'($urandom);
        k++;
        @(posedge clk); #1;
        if (pi_sel != last_sel) n_switch++;
        last_sel = pi_sel;
        if (aligned && lock_at < 0) lock_at = cyc;
        if (cyc >= 50000 && aligned) n_al++;
        @(negedge clk);
      end
      begin
        int ph, off;
        ph = int'(p % 32); if (ph < 0) ph += 32;
        // distance of the data edge from the Q1..Q2 zone and of I from the centre
        off = (ph + 17 - d) % 32; if (off < 0) off += 32;
        checks++;
        if (lock_at < 0) begin failures++; $display("trial %0d: never aligned (D=%0d code %0d)", trial, d, code_q1); end
        else $display("trial %0d: D=%0d aligned after %0d cycles, final phase %0d", trial, d, lock_at, ph);
        checks++;
        if (n_al < 7000) begin failures++; $display("trial %0d: aligned only %0d of 10000 cycles", trial, n_al); end
        checks++;
        if (off < 13 || off > 19) begin failures++; $display("trial %0d: I sampler %0d steps after edge", trial, off); end
      end
    end
    checks++;
    if (n_switch == 0) begin failures++; $display("interpolators never switched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
