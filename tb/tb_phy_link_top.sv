// tb_phy_link_top - end-to-end test of the PHY link controller at its default
// parameters (also the full-size test).
//
// The testbench is the rest of the link: a sampler model feeds the CDR (random
// data with a data edge position that changes on every read and write phase
// training), a read channel with one pre- and three post-cursors carries the
// pattern the controller sends back from the slave, a write channel (1.0, 0.4,
// 0.2) carries the transmit equalizer output to the slave's sampler, the pilot
// patterns return corrupted while the tap under training is below a hidden
// target, an impulse is returned for the direct Tx EQ, and a driver model answers
// the impedance calibration comparators.
// Sequence: impedance calibration with all three algorithms; FIFO fill and drain;
// link training with the LMS Tx EQ (the first read check is forced to fail);
// BER-triggered retraining with the pilot Tx EQ and the 8-step pre-filter;
// retraining with the direct Tx EQ; retraining with a broken read channel until
// the retry limit. Every mechanism is counted and one that never happened is a
// failure; functional checks (calibration match, pilot coefficients, link reaching
// normal operation, FIFO order) are counted too.
module tb_phy_link_top;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ber_high = 0;
  logic [1:0] txeq_algo = 0;
  sm_t mu = 10'd8;
  logic i_bit = 0, q1_bit = 0, q2_bit = 0;
  logic [3:0] pre_filt = 0;
  logic [1:0] gain_sel = 3;
  logic clk_a_lvl = 0, clk_b_lvl = 0;
  logic [3:0] ref_clk = 4'b1001;
  logic stage_in1 = 0, stage_in2 = 0, stage_in3 = 0;
  logic [5:0] ctrl_a, ctrl_b, code_i, code_q1, code_q2;
  logic pi_sel, cdr_aligned, ref_out1, ref_out2, stage_out1, stage_out2, iclk, q1clk, q2clk;
  logic [3:0] ref_sw;
  logic [7:0] rx_code = 128;
  logic [4:0] rx_align = 5'd9;
  logic rx_dec;
  logic signed [15:0] rx_y, tx_y;
  sm_t ffe_coef [4], dfe_coef [4];
  logic tx_bit;
  logic [7:0] wr_code = 128;
  logic [4:0] wr_align = 5'd3;
  logic pilot_ret = 0, pilot_ret_valid = 0, dir_smp_valid = 0;
  sm_t lms_coef [8], dir_coef [5];
  logic signed [5:0] pilot_coef [5];
  logic pilot_valid;
  logic [2:0] pilot_tap;
  logic fifo_wr = 0, fifo_rd = 0, fifo_empty, fifo_full;
  logic [7:0] fifo_wdata = 0, fifo_rdata;
  train_state_t train_state;
  logic train_fail;
  logic [7:0] n_retrain, n_loops;
  logic [15:0] chk_errors;
  logic zq_start = 0, zq_match, zq_above, zq_mode;
  cal_algo_t zq_algo = CAL_BINARY;
  logic [1:0] zq_sel_line;
  logic zq_ref_on, zq_done;
  logic [5:0] zq_cal_code, zq_pcode, zq_ncode, zq_tcode;
  logic [2:0] zq_lin_code, zq_ref_save;
  logic [2:0] zq_lin_save [3];
  logic [15:0] zq_cycles;

  phy_link_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- clocks ----------------
  always #100ps clk = ~clk;                     // one clock per unit interval
  initial begin                                 // four 2.5 GHz reference phases
    int ph;
    ph = 0;
    forever begin
      #100ps;
      ph = (ph + 1) % 4;
      ref_clk = {ph == 3 || ph == 2, ph == 2 || ph == 1, ph == 1 || ph == 0, ph == 0 || ph == 3};
    end
  end

  initial begin
    #400us;
    failures++;
    $display("watchdog: state %s", train_state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_ZQ_BIN, M_ZQ_LIN, M_ZQ_RB, M_ZQ_SKIP, M_FIFO_FULL, M_FIFO_EMPTY,
    M_CDR_ALIGN, M_AB_SWITCH, M_REF_PAIR, M_ICLK, M_READ_TRAIN, M_RXEQ_DONE, M_RD_PASS, M_RD_LOOP,
    M_WRITE_TRAIN, M_TX_LMS, M_TX_PILOT, M_PILOT_COMP1, M_PILOT_COMP2, M_TX_DIRECT,
    M_WR_PASS, M_NORMAL, M_RETRAIN, M_FAIL, M_NUM
  } mech_t;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"zq binary", "zq hybrid linear", "zq hybrid RB", "zq section already matched",
    "fifo full", "fifo empty", "cdr aligned", "interpolator A/B switch", "reference pair change",
    "interpolated clock", "read phase training", "rx eq training done", "read check pass",
    "read check fail loop", "write phase training", "tx eq LMS", "tx eq pilot", "pilot comp1",
    "pilot comp2", "tx eq direct", "write check pass", "normal operation", "BER retrain", "retry limit fail"};

  train_state_t prev_state = TS_IDLE;
  logic prev_aligned = 0, prev_sel = 0;
  logic [3:0] prev_sw = 0;
  logic signed [5:0] prev_pc [5];
  logic [2:0] prev_tap = 0;

  always @(posedge iclk) mech[M_ICLK]++;
  // edges of the Q2 zone clock
  int n_zone_clk = 0;
  always @(posedge q2clk) n_zone_clk++;

  always @(posedge clk) if (rst_n) begin
    if (cdr_aligned && !prev_aligned) mech[M_CDR_ALIGN]++;
    if (pi_sel != prev_sel) mech[M_AB_SWITCH]++;
    if (ref_sw != prev_sw) mech[M_REF_PAIR]++;
    if (fifo_full) mech[M_FIFO_FULL]++;
    if (fifo_empty) mech[M_FIFO_EMPTY]++;
    if (train_state == TS_TXEQ && txeq_algo == 2'd1) begin
      if (pilot_tap == prev_tap && pilot_coef[pilot_tap] == prev_pc[pilot_tap] + 1) mech[M_PILOT_COMP1]++;
      if (pilot_tap != prev_tap) mech[M_PILOT_COMP2]++;
    end
    if (train_state != prev_state) begin
      if (prev_state == TS_READ && train_state == TS_RXEQ) mech[M_READ_TRAIN]++;
      if (prev_state == TS_RXEQ) mech[M_RXEQ_DONE]++;
      if (prev_state == TS_RDCHK && train_state == TS_WRITE) mech[M_RD_PASS]++;
      if (prev_state == TS_RDCHK && train_state == TS_READ) mech[M_RD_LOOP]++;
      if (prev_state == TS_RDCHK && corrupt_once) begin corrupt_rd = 0; corrupt_once = 0; end
      if (prev_state == TS_WRITE && train_state == TS_TXEQ) mech[M_WRITE_TRAIN]++;
      if (prev_state == TS_TXEQ) begin
        if (txeq_algo == 2'd0) mech[M_TX_LMS]++;
        if (txeq_algo == 2'd1) mech[M_TX_PILOT]++;
        if (txeq_algo == 2'd2) mech[M_TX_DIRECT]++;
      end
      if (prev_state == TS_WRCHK && train_state == TS_NORMAL) mech[M_WR_PASS]++;
      if (train_state == TS_NORMAL) mech[M_NORMAL]++;
      if (prev_state == TS_NORMAL && train_state == TS_READ) mech[M_RETRAIN]++;
      if (train_state == TS_FAIL) mech[M_FAIL]++;
    end
    prev_state = train_state;
    prev_aligned = cdr_aligned;
    prev_sel = pi_sel;
    prev_sw = ref_sw;
    prev_pc = pilot_coef;
    prev_tap = pilot_tap;
  end

  // ---------------- impedance calibration driver model ----------------
  real zq_tgt [3] = '{60.0, 60.0, 60.0};
  always_comb begin
    real s, t;
    s = (zq_ref_on ? 60.0 : 0.0) + real'(zq_cal_code) + 2.0 * real'($countones(zq_lin_code));
    t = zq_tgt[zq_sel_line > 2 ? 2 : zq_sel_line];
    zq_match = (s - t <= 0.02 * t) && (t - s <= 0.02 * t);
    zq_mode  = (s - t <= 0.10 * t) && (t - s <= 0.10 * t);
    zq_above = (zq_sel_line == 0) ? (s > t) : (s < t);
  end

  // ---------------- link model ----------------
  logic hb [64];                  // bits sent by the controller, hb[0] newest
  real  ty [3];                   // transmit equalizer output history
  longint p = 0, kui = 100;
  logic [5:0] last_code = 0;
  int   data_edge = 5;
  logic corrupt_rd = 0, corrupt_once = 0;
  int   imp_cnt = 0;
  int   pilot_tgt [5] = '{16, -6, -1, 0, 0};
  logic data [longint];
  train_state_t ls_state = TS_IDLE;

  function automatic logic bit_at(longint t, int d);
    longint n;
    n = (t - d) >= 0 ? (t - d) / 32 : -1 - ((d - t - 1) / 32);
    if (!data.exists(n)) data[n] = 1'($urandom);
    return data[n];
  endfunction

  function automatic real sym(logic v); return v ? 1.0 : -1.0; endfunction

  always @(negedge clk) if (rst_n) begin
    int delta, c;
    real r, v;
    // new phase relation at every phase training step
    if (train_state != ls_state && (train_state == TS_READ || train_state == TS_WRITE)) begin
      data_edge = int'($urandom % 32);
      data.delete();
    end
    if (train_state != ls_state && train_state == TS_TXEQ) imp_cnt = 0;
    ls_state = train_state;
    // CDR samplers
    delta = int'(code_q1) - int'(last_code);
    if (delta > 32) delta -= 64;
    if (delta < -32) delta += 64;
    p += delta;
    last_code = code_q1;
    i_bit  = bit_at(32 * kui + p + 1 + 16 - 32, data_edge);
    q1_bit = bit_at(32 * kui + p, data_edge);
    q2_bit = bit_at(32 * kui + p + 2, data_edge);
    kui++;
    if (kui % 1000 == 0) data.delete();
    clk_a_lvl = 1'($urandom); clk_b_lvl = 1'($urandom);
    {stage_in3, stage_in2, stage_in1} = 3'($urandom);
    // history of the bits the controller sends
    for (int k = 63; k > 0; k--) hb[k] = hb[k-1];
    hb[0] = tx_bit;
    // read channel: main cursor of the bit sent 10 cycles ago
    r = 0.15 * sym(hb[9]) + 0.6 * sym(hb[10]) + 0.3 * sym(hb[11]) + 0.15 * sym(hb[12]) + 0.08 * sym(hb[13]);
    dir_smp_valid = 0;
    if (train_state == TS_TXEQ && txeq_algo == 2'd2) begin
      // single returned pulse on an idle line for the direct Tx EQ
      case (imp_cnt)
        8: r = 0.15;  9: r = 0.6;  10: r = 0.3;  11: r = 0.15;  12: r = 0.08;
        default: r = 0.0;
      endcase
      dir_smp_valid = (imp_cnt >= 14 && imp_cnt <= 18);
      imp_cnt++;
    end
    if (corrupt_rd && train_state == TS_RDCHK) r = real'($urandom % 200) / 100.0 - 1.0;
    c = 128 + int'(r * 170.0);
    rx_code = 8'((c > 255) ? 255 : (c < 0) ? 0 : c);
    // write channel into the slave's sampler
    ty[2] = ty[1]; ty[1] = ty[0]; ty[0] = real'(tx_y) / 256.0;
    v = 1.0 * ty[0] + 0.4 * ty[1] + 0.2 * ty[2];
    c = 128 + int'(v * 100.0);
    wr_code = 8'((c > 255) ? 255 : (c < 1) ? 1 : c);
    wr_align = (txeq_algo == 2'd0) ? 5'd3 : 5'd0;
  end

  // pilot return path: fixed latency of three clocks; the bit that shows the tap
  // under training is corrupted while that tap is below its target
  logic [2:0] pv_d = 0, pb_d = 0;
  int ppos = 0;
  always @(posedge clk) begin
    logic b;
    b = tx_bit;
    if (rst_n && pilot_valid) begin
      if (int'(pilot_coef[pilot_tap]) < pilot_tgt[pilot_tap] &&
          ((pilot_tap == 0 && ppos == 0) || (pilot_tap != 0 && ppos == int'(pilot_tap))))
        b = ~b;
      ppos = (ppos + 1) % 5;
    end
    pv_d <= {pv_d[1:0], rst_n && pilot_valid};
    pb_d <= {pb_d[1:0], b};
    pilot_ret_valid <= pv_d[2];
    pilot_ret <= pb_d[2];
  end

  task automatic wait_state(input train_state_t s1, input train_state_t s2, input int maxc);
    int n;
    n = 0;
    while (train_state != s1 && train_state != s2 && n < maxc) begin @(posedge clk); n++; end
  endtask

  // ---------------- sequence ----------------
  initial begin
    int zq_cyc [3];
    logic [7:0] fq [$];
    foreach (hb[i]) hb[i] = 0;
    foreach (ty[i]) ty[i] = 0.0;
    repeat (4) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // 1. impedance calibration, one corner near nominal, each algorithm
    for (int a = 0; a < 3; a++) begin
      int n;
      zq_tgt = '{57.3, 60.0, 64.2};         // NFET section already matched
      zq_algo = cal_algo_t'(a);
      @(negedge clk); zq_start = 1;
      @(negedge clk); zq_start = 0;
      n = 0;
      while (!zq_done && n < 500) begin @(negedge clk); n++; end
      zq_cyc[a] = int'(zq_cycles);
      for (int s = 0; s < 3; s++) begin
        real st;
        logic [5:0] code;
        code = (s == 0) ? zq_pcode : (s == 1) ? zq_ncode : zq_tcode;
        st = (zq_ref_save[s] ? 60.0 : 0.0) + real'(code) + 2.0 * real'($countones(zq_lin_save[s]));
        checks++;
        if (st - zq_tgt[s] > 0.02 * zq_tgt[s] || zq_tgt[s] - st > 0.02 * zq_tgt[s]) begin
          failures++; $display("zq algo %0d section %0d strength %0.1f target %0.1f", a, s, st, zq_tgt[s]);
        end
      end
      if (zq_ncode == 0 && zq_ref_save[1] && zq_lin_save[1] == 0) mech[M_ZQ_SKIP]++;
      if (a == 0) mech[M_ZQ_BIN]++;
      if (a == 1 && zq_cyc[1] < zq_cyc[0]) mech[M_ZQ_LIN]++;
      if (a == 2 && zq_cyc[2] < zq_cyc[0]) mech[M_ZQ_RB]++;
    end
    $display("calibration clocks: binary %0d, hybrid linear %0d, hybrid RB %0d", zq_cyc[0], zq_cyc[1], zq_cyc[2]);

    // 2. slave FIFO: fill past full, drain past empty
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      fifo_wr = 1; fifo_wdata = 8'($urandom);
      if (!fifo_full) fq.push_back(fifo_wdata);
    end
    @(negedge clk); fifo_wr = 0;
    for (int i = 0; i < 40; i++) begin
      if (!fifo_empty) begin
        checks++;
        if (fifo_rdata != fq.pop_front()) begin failures++; $display("fifo order"); end
      end
      fifo_rd = 1;
      @(negedge clk);
    end
    fifo_rd = 0;

    // 3. training with the LMS Tx EQ; the first read check fails
    txeq_algo = 2'd0; corrupt_rd = 1; corrupt_once = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait_state(TS_NORMAL, TS_FAIL, 100000);
    checks++;
    if (train_state != TS_NORMAL) begin failures++; $display("LMS round ended in %s", train_state.name()); end
    repeat (100) @(posedge clk);

    // 4. BER alarm: retrain with the pilot Tx EQ and the 8-step pre-filter
    txeq_algo = 2'd1; pre_filt = 4'd8;
    @(negedge clk); ber_high = 1;
    @(negedge clk); ber_high = 0;
    wait_state(TS_TXEQ, TS_FAIL, 100000);
    wait_state(TS_NORMAL, TS_FAIL, 200000);
    checks++;
    if (train_state != TS_NORMAL) begin failures++; $display("pilot round ended in %s", train_state.name()); end
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (int'(pilot_coef[t]) != pilot_tgt[t]) begin
        failures++; $display("pilot tap %0d = %0d, target %0d", t, pilot_coef[t], pilot_tgt[t]);
      end
    end
    repeat (100) @(posedge clk);

    // 5. retrain with the direct Tx EQ (the write check may pass or loop)
    txeq_algo = 2'd2; pre_filt = 4'd0;
    @(negedge clk); ber_high = 1;
    @(negedge clk); ber_high = 0;
    wait_state(TS_TXEQ, TS_FAIL, 100000);
    wait_state(TS_WRCHK, TS_FAIL, 100000);
    checks++;
    if (dir_coef[0][8:0] == 0) begin failures++; $display("direct C1 is zero"); end
    $display("direct coefficients %h %h %h %h %h", dir_coef[0], dir_coef[1], dir_coef[2], dir_coef[3], dir_coef[4]);
    wait_state(TS_NORMAL, TS_FAIL, 200000);

    // 6. broken read channel: retry until the limit
    txeq_algo = 2'd0; corrupt_rd = 1;
    if (train_state == TS_NORMAL) begin
      @(negedge clk); ber_high = 1;
      @(negedge clk); ber_high = 0;
    end else begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
    end
    wait_state(TS_FAIL, TS_FAIL, 300000);
    repeat (2) @(posedge clk);
    checks++;
    if (!train_fail) begin failures++; $display("retry limit not reached"); end

    // the Q2 zone clock runs at the reference rate like the I clock
    checks++;
    if (n_zone_clk * 10 < mech[M_ICLK] * 9 || n_zone_clk * 10 > mech[M_ICLK] * 11) begin
      failures++; $display("q2clk edges %0d against iclk edges %0d", n_zone_clk, mech[M_ICLK]);
    end

    // every mechanism must have happened
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("  %-28s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("mechanism never happened: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
