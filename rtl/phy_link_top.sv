// phy_link_top - controller-side PHY link with interface trainings.
//
// All adaptive parts of the link sit in the controller; the slave (memory) only
// keeps a training FIFO. The training sequencer walks through
//   read training  - PI2 CDR with 3TS stop finds the receive phase (aligned)
//   Rx EQ training - LMS FFE/DFE on PRBS data returned by the slave (RXEQ_LEN UI)
//   read check     - CHK_LEN decided bits compared with the pattern
//   write training - the same CDR/PD is reused for the transmit phase
//   Tx EQ training - by LMS (TXEQ_LEN UI), pilot signals, or direct calculation
//   write check    - returned write data compared with the pattern
//   normal         - until the BER alarm asks for a new training
// and the hybrid impedance calibration runs from its own start input.
// Analog parts are outside: samplers deliver i/q1/q2 bits, the ADC delivers
// rx_code (read direction) and wr_code (write direction returned by the slave),
// the slave's pilot sampler returns pilot bits, and comparator outputs drive the
// calibration. The reference-phase muxes and the behavioural phase interpolator
// show how the CDR codes reach the clock path (iclk, q1clk, q2clk).
// rx_align / wr_align give the round-trip latency (in UI) of the returned data.
// Timing: one clock per unit interval; the CDR controller works per 8-bit word.
// The training order, step lengths (1.6 us and 2.4 us at 5 Gb/s) and tap counts
// follow the document. The check length, the step handshakes, the pilot DAC
// scaling and the returned-data latency inputs are this design's choices.
// Lint notes: some sub-block outputs are left unconnected here, so unused-signal
// warnings for them are expected. These are the equalizer DAC codes, signs,
// reference bit and error; the pilot busy flag and counters; the PD state; and
// the calibration clock counters. They are meant for the analog parts or for
// observation. The mixed sync/async rst_n report comes from
// the assertion inside pi_switch_ctrl.
module phy_link_top
  import phy_pkg::*;
#(
  parameter int RXEQ_LEN = 8000,   // 1.6 us at 5 Gb/s
  parameter int TXEQ_LEN = 12000,  // 2.4 us at 5 Gb/s
  parameter int CHK_LEN  = 256,
  parameter int TX_TAPS  = 8,
  parameter int DIR_TAPS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  txeq_algo,      // 0 LMS, 1 pilot, 2 direct
  input  sm_t         mu,
  input  logic        ber_high,
  // CDR samplers and clock path
  input  logic        i_bit,
  input  logic        q1_bit,
  input  logic        q2_bit,
  input  logic [3:0]  pre_filt,
  input  logic [1:0]  gain_sel,
  input  logic        clk_a_lvl,
  input  logic        clk_b_lvl,
  input  logic [3:0]  ref_clk,
  input  logic        stage_in1,
  input  logic        stage_in2,
  input  logic        stage_in3,
  output logic [5:0]  ctrl_a,
  output logic [5:0]  ctrl_b,
  output logic        pi_sel,
  output logic [5:0]  code_i,
  output logic [5:0]  code_q1,
  output logic [5:0]  code_q2,
  output logic        cdr_aligned,
  output logic [3:0]  ref_sw,
  output logic        ref_out1,
  output logic        ref_out2,
  output logic        stage_out1,
  output logic        stage_out2,
  output logic        iclk,
  output logic        q1clk,
  output logic        q2clk,
  // read direction
  input  logic [7:0]  rx_code,
  input  logic [4:0]  rx_align,
  output logic        rx_dec,
  output logic signed [15:0] rx_y,
  output sm_t         ffe_coef [4],
  output sm_t         dfe_coef [4],
  // write direction
  output logic        tx_bit,
  output logic signed [15:0] tx_y,
  input  logic [7:0]  wr_code,
  input  logic [4:0]  wr_align,
  input  logic        pilot_ret,
  input  logic        pilot_ret_valid,
  input  logic        dir_smp_valid,
  output sm_t         lms_coef [TX_TAPS],
  output sm_t         dir_coef [DIR_TAPS],
  output logic signed [5:0] pilot_coef [5],
  output logic        pilot_valid,
  output logic [2:0]  pilot_tap,
  // slave training FIFO
  input  logic        fifo_wr,
  input  logic [7:0]  fifo_wdata,
  input  logic        fifo_rd,
  output logic [7:0]  fifo_rdata,
  output logic        fifo_empty,
  output logic        fifo_full,
  // training status
  output train_state_t train_state,
  output logic        train_fail,
  output logic [7:0]  n_retrain,
  output logic [7:0]  n_loops,
  output logic [15:0] chk_errors,
  // impedance calibration
  input  logic        zq_start,
  input  cal_algo_t   zq_algo,
  input  logic        zq_match,
  input  logic        zq_above,
  input  logic        zq_mode,
  output logic [1:0]  zq_sel_line,
  output logic        zq_ref_on,
  output logic [5:0]  zq_cal_code,
  output logic [2:0]  zq_lin_code,
  output logic [5:0]  zq_pcode,
  output logic [5:0]  zq_ncode,
  output logic [5:0]  zq_tcode,
  output logic [2:0]  zq_ref_save,
  output logic [2:0]  zq_lin_save [3],
  output logic [15:0] zq_cycles,
  output logic        zq_done
);
  // ---------------- training sequencer ----------------
  logic go, rxeq_done, txeq_done, chk_done, rd_ok, wr_ok, phase_done;
  logic [15:0] cnt;
  pd_state_t   pd_state;

  training_seq u_seq (
    .clk, .rst_n, .start,
    .rd_done(phase_done), .rxeq_done, .wr_done(phase_done), .txeq_done,
    .chk_done, .rd_ok, .wr_ok, .ber_high,
    .state(train_state), .go, .fail(train_fail), .n_retrain, .n_loops);

  // step length counter, cleared on every step entry
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (go) cnt <= '0;
    else if (cnt != 16'hFFFF) cnt <= cnt + 1'b1;
  end

  // ---------------- CDR ----------------
  // a phase training is done once the CDR reports alignment after at least four
  // fresh phase-detector words in this step
  assign phase_done = cdr_aligned && (cnt >= 16'd32);
  logic cdr_train;
  assign cdr_train = (train_state == TS_READ) || (train_state == TS_WRITE);

  pi2_cdr u_cdr (
    .clk, .rst_n, .train_en(cdr_train), .i_bit, .q1_bit, .q2_bit, .pre_filt, .gain_sel,
    .clk_a_lvl, .clk_b_lvl, .ctrl_a, .ctrl_b, .pi_sel, .code_q1, .code_q2, .code_i,
    .aligned(cdr_aligned), .pd_state);

  // reference pair for the interpolator: quadrant of the I phase code
  mux_4_2 u_refmux (.in(ref_clk), .pair_sel(code_i[5:4]), .c(ref_sw), .out1(ref_out1), .out2(ref_out2));
  mux_3_2 u_stgmux (.in1(stage_in1), .in2(stage_in2), .in3(stage_in3), .control(code_i[3]),
                    .out_1(stage_out1), .out_2(stage_out2));
  phase_interpolator u_pi_i  (.ref_clk(ref_clk[0]), .code(code_i),  .clk_out(iclk));
  phase_interpolator u_pi_q1 (.ref_clk(ref_clk[0]), .code(code_q1), .clk_out(q1clk));
  phase_interpolator u_pi_q2 (.ref_clk(ref_clk[0]), .code(code_q2), .clk_out(q2clk));

  // ---------------- pattern generator ----------------
  logic pat;
  logic [31:0] pat_hist;
  prbs_gen u_prbs (.clk, .rst_n, .en(1'b1), .bit_out(pat));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pat_hist <= '0;
    else        pat_hist <= {pat_hist[30:0], pat};
  end

  // ---------------- receive equalizer ----------------
  logic rx_train, rx_ideal, rx_ref;
  sm_t  rx_err;
  logic [7:0] ffe_dac [4];
  logic [7:0] dfe_dac [4];
  logic [3:0] ffe_sgn, dfe_sgn;
  assign rx_train = (train_state == TS_RXEQ);
  assign rx_ideal = pat_hist[rx_align];

  rx_eq u_rxeq (
    .clk, .rst_n, .train(rx_train), .load(go && rx_train),
    .rx_code, .ideal(rx_ideal), .mu, .y(rx_y), .dec(rx_dec), .ref_bit(rx_ref), .err(rx_err),
    .ffe_coef, .dfe_coef, .ffe_dac, .dfe_dac, .ffe_sign(ffe_sgn), .dfe_sign(dfe_sgn));

  assign rxeq_done = rx_train && (cnt == 16'(RXEQ_LEN));

  // ---------------- transmit equalizers ----------------
  logic tx_train, lms_train, pil_active, dir_active;
  logic wr_ideal;
  sm_t  tx_err;
  logic signed [15:0] lms_y, sum_y;
  logic [7:0] lms_dac [TX_TAPS];
  logic [TX_TAPS-1:0] lms_sgn;
  sm_t  sum_coef [DIR_TAPS];
  logic pil_bit, pil_valid, pil_c1, pil_c2, pil_busy, pil_done;
  logic [2:0] pil_tap;
  logic [15:0] pil_n;
  logic dir_done;

  assign tx_train   = (train_state == TS_TXEQ);
  assign lms_train  = tx_train && (txeq_algo == 2'd0);
  assign pil_active = (txeq_algo == 2'd1);
  assign dir_active = (txeq_algo == 2'd2);
  assign wr_ideal   = pat_hist[wr_align];
  // error of the write direction: ideal bit minus the returned sample
  assign tx_err     = q2sm((wr_ideal ? 16'sd256 : -16'sd256) - ((16'(signed'({1'b0, wr_code})) - 16'sd128) <<< 1));

  // y (FFE input) delayed to line up with Y (equalizer output)
  sm_t rx_code_d;
  logic [7:0] rxc_d [5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 5; i++) rxc_d[i] <= 8'd128;
    else begin
      rxc_d[0] <= rx_code;
      for (int i = 1; i < 5; i++) rxc_d[i] <= rxc_d[i-1];
    end
  end
  assign rx_code_d = q2sm((16'(signed'({1'b0, rxc_d[4]})) - 16'sd128) <<< 1);

  function automatic logic nxt_is_txeq();
    return train_state == TS_TXEQ;
  endfunction

  tx_eq_lms #(.TAPS(TX_TAPS), .ERR_LAT(1)) u_txlms (
    .clk, .rst_n, .train(lms_train), .load(go && lms_train), .tx_bit(pat), .err(tx_err), .mu,
    .tx_y(lms_y), .coef(lms_coef), .dac_code(lms_dac), .dac_sign(lms_sgn));

  pilot_txeq_ctrl u_pilot (
    .clk, .rst_n, .start(go && pil_active && nxt_is_txeq()), .rx_bit(pilot_ret), .rx_valid(pilot_ret_valid),
    .pilot_bit(pil_bit), .pilot_valid(pil_valid), .coef(pilot_coef), .tap(pil_tap),
    .comp1(pil_c1), .comp2(pil_c2), .busy(pil_busy), .done(pil_done), .n_patterns(pil_n));

  direct_coef_calc #(.TAPS(DIR_TAPS)) u_direct (
    .clk, .rst_n, .start(go && dir_active && nxt_is_txeq()), .smp_valid(dir_smp_valid),
    .y_s(rx_code_d), .Y_s(q2sm(rx_y)), .coef(dir_coef), .done(dir_done));


  // summer used by the pilot (6-bit DAC, LSB = 1/16) and direct coefficients
  always_comb begin
    for (int n = 0; n < DIR_TAPS; n++)
      sum_coef[n] = pil_active ? q2sm(16'(pilot_coef[n]) <<< 4) : dir_coef[n];
  end
  txeq_summer #(.TAPS(DIR_TAPS)) u_sum (.clk, .rst_n, .data_in(tx_bit), .coef(sum_coef), .eq_out(sum_y));

  assign tx_bit = (pil_active && tx_train) ? pil_bit : pat;
  assign pilot_valid = pil_valid;
  assign pilot_tap   = pil_tap;
  assign tx_y   = (txeq_algo == 2'd0) ? lms_y : sum_y;

  always_comb begin
    unique case (txeq_algo)
      2'd0:    txeq_done = tx_train && (cnt == 16'(TXEQ_LEN));
      2'd1:    txeq_done = tx_train && pil_done && !go;
      default: txeq_done = tx_train && dir_done && !go;
    endcase
  end

  // ---------------- checks ----------------
  logic chk_rd, chk_wr;
  assign chk_rd   = (train_state == TS_RDCHK);
  assign chk_wr   = (train_state == TS_WRCHK);
  assign chk_done = (chk_rd || chk_wr) && (cnt == 16'(CHK_LEN));
  assign rd_ok    = (chk_errors == 0);
  assign wr_ok    = (chk_errors == 0);

  // the pattern bit that rx_dec stands for (rx_eq output is 4 clock edges behind)
  logic [4:0] ideal_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ideal_pipe <= '0;
    else        ideal_pipe <= {ideal_pipe[3:0], rx_ideal};
  end
  function automatic logic rx_ref_check();
    return ideal_pipe[4];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_errors <= '0;
    else if (go) chk_errors <= '0;
    else if (chk_rd && cnt > 16'd8 && rx_dec != rx_ref_check()) chk_errors <= chk_errors + 1'b1;
    else if (chk_wr && cnt > 16'd8 && (wr_code >= 8'd128) != wr_ideal) chk_errors <= chk_errors + 1'b1;
  end


  // ---------------- slave training FIFO ----------------
  train_fifo u_fifo (.clk, .rst_n, .wr_en(fifo_wr), .wdata(fifo_wdata), .rd_en(fifo_rd),
                     .rdata(fifo_rdata), .full(fifo_full), .empty(fifo_empty));

  // ---------------- impedance calibration ----------------
  logic [3:0] zq_nb, zq_nh;
  zq_cal_ctrl u_zq (
    .clk, .rst_n, .start(zq_start), .algo(zq_algo), .match(zq_match), .above(zq_above), .mode(zq_mode),
    .sel_line(zq_sel_line), .ref_on(zq_ref_on), .cal_code(zq_cal_code), .lin_code(zq_lin_code),
    .pcode(zq_pcode), .ncode(zq_ncode), .tcode(zq_tcode),
    .ref_save(zq_ref_save), .lin_save(zq_lin_save), .n_bin(zq_nb), .n_hyb(zq_nh),
    .cycles(zq_cycles), .done(zq_done));
endmodule
