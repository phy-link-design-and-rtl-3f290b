// pi2_cdr - digital controller of the PI2 clock-data-recovery loop with the
// three-times-sampling (3TS) stop mechanism.
//
// Data are sampled three times per unit interval by clocks derived from one
// 64-step phase code: Q1 (the reference), Q2 = Q1 + ZONE_LSB codes and
// I = Q1 + ZONE_LSB/2 + Q_OFFSET codes (I lags the edge zone by about half a unit
// interval, Q_OFFSET = 16 codes = 90 degrees of the half-rate clock). The loop is
//   deserializer (1:8) -> 3TS Alexander PD -> EN/DS -> pre-filter -> PI controller
//   -> glitch-free interpolator switching (A/B) -> phase codes
// The PD drives Q2 onto the data edge. Once every edge of a word falls between
// Q1 and Q2 the PD reports "aligned"; EN/DS then freezes the pre-filter and PI
// controller so the recovered clock stops dithering, and `aligned` tells the
// training logic that the receive phase is found. Any later early/late decision
// re-enables the loop.
// Interface: clk is the bit-rate clock, one sample of each phase per cycle;
// clk_a_lvl/clk_b_lvl are the levels of the two interpolator outputs.
// Timing: the controller works once per 8-bit word; a decision reaches the code
// 3 word periods after the word is complete, plus the A/B switch time.
// The block structure, gains and zone size follow the document; code offsets
// and the EN/DS rule are this design's choices.
// Lint notes: the mixed sync/async rst_n report comes from the assertion inside
// pi_switch_ctrl. The PD error sum and the switch busy flag are kept for
// observation and feed no logic.
module pi2_cdr
  import phy_pkg::*;
#(
  parameter int WIDTH    = 8,
  parameter int PRE_FILT = 2,
  parameter int K_PD     = 32,
  parameter int Q_OFFSET = 16,
  parameter int ZONE_LSB = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       train_en,
  input  logic       i_bit,
  input  logic       q1_bit,
  input  logic       q2_bit,
  input  logic [3:0] pre_filt,     // 0: use PRE_FILT
  input  logic [1:0] gain_sel,
  input  logic       clk_a_lvl,
  input  logic       clk_b_lvl,
  output logic [5:0] ctrl_a,
  output logic [5:0] ctrl_b,
  output logic       pi_sel,
  output logic [5:0] code_q1,
  output logic [5:0] code_q2,
  output logic [5:0] code_i,
  output logic       aligned,
  output pd_state_t  pd_state
);
  logic [WIDTH-1:0] i_w, q1_w, q2_w;
  logic             wv;
  logic             q2_prev;
  pd_state_t        st_c;
  logic signed [7:0] esum;
  logic signed [1:0] pd_dir, carry;
  logic             wv_d;
  logic [5:0]       pi_code, act_code;
  logic             sw_busy;

  deserializer #(.WIDTH(WIDTH)) u_des (
    .clk, .rst_n, .i_bit, .q1_bit, .q2_bit,
    .i_word(i_w), .q1_word(q1_w), .q2_word(q2_w), .word_valid(wv));

  alexander_pd_3ts #(.WIDTH(WIDTH)) u_pd (
    .i_word(i_w), .q1_word(q1_w), .q2_word(q2_w), .q2_prev,
    .state(st_c), .err_sum(esum));

  // register the PD decision once per word; keep last Q2 sample for the next word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pd_state <= PD_NONE;
      q2_prev  <= 1'b0;
      wv_d     <= 1'b0;
      aligned  <= 1'b0;
    end else begin
      wv_d <= wv;
      if (wv) begin
        pd_state <= st_c;
        q2_prev  <= q2_w[WIDTH-1];
        // EN/DS: aligned disables the controller, early/late re-enables it
        if (st_c == PD_ALIGNED)                         aligned <= 1'b1;
        else if (st_c == PD_EARLY || st_c == PD_LATE)   aligned <= 1'b0;
      end
    end
  end

  // early -> the clocks sample too soon -> move them later (code up)
  always_comb begin
    unique case (pd_state)
      PD_EARLY: pd_dir = 2'sd1;
      PD_LATE:  pd_dir = -2'sd1;
      default:  pd_dir = 2'sd0;
    endcase
  end

  pre_filter #(.PRE_FILT(PRE_FILT)) u_pf (
    .clk, .rst_n, .en(wv_d && train_en && !aligned), .pd_dir, .thresh(pre_filt), .carry);

  pi_controller #(.K_PD(K_PD), .CODE_W(6)) u_pi (
    .clk, .rst_n, .en(train_en && !aligned), .eps(carry), .gain_sel, .code(pi_code));

  pi_switch_ctrl #(.CODE_W(6)) u_sw (
    .clk, .rst_n, .code_in(pi_code), .clk_a_lvl, .clk_b_lvl,
    .ctrl_a, .ctrl_b, .sel(pi_sel), .active_code(act_code), .busy(sw_busy));

  assign code_q1 = act_code;
  assign code_q2 = act_code + 6'(ZONE_LSB);
  assign code_i  = act_code + 6'(ZONE_LSB / 2) + 6'(Q_OFFSET);
endmodule
