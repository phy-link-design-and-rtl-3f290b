// lms_fir - adaptive tap bank: TAPS LMS engines over a delay line plus the summer.
//
// x_code enters a delay line x[0] (newest) .. x[TAPS-1] (oldest). The summer forms
// y = sum coef[i] * x[i] (Q8 two's complement, registered). Tap i's LMS engine is fed
// x[i] delayed by ERR_LAT cycles, so that it pairs with the error the caller
// computes ERR_LAT cycles after the delay-line contents produced y (ERR_LAT = 1 when
// the error is formed combinationally from y). Coefficient MAIN_TAP is preset to
// MAIN_INIT on `load`, the others to zero.
// In the document the summer is an analog differential-pair circuit driven by the
// DAC codes; here it is a digital multiply-add so the loop closes in logic.
// Timing: y is registered one cycle after x_code; a coefficient update lands
// 7 cycles after its error.
module lms_fir
  import phy_pkg::*;
#(
  parameter int TAPS      = 4,
  parameter int ERR_LAT   = 1,
  parameter int MAIN_TAP  = 3,
  parameter int MAIN_INIT = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,          // adapt
  input  logic        load,        // preset coefficients
  input  logic [7:0]  x_code,
  input  sm_t         err,
  input  sm_t         mu,
  output sm_t         coef [TAPS],
  output logic [7:0]  dac_code [TAPS],
  output logic [TAPS-1:0] dac_sign,
  output logic [7:0]  x_taps [TAPS],
  output logic signed [15:0] y
);
  logic [7:0] x  [TAPS];
  logic [7:0] xd [ERR_LAT+1][TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) x[i] <= 8'd128;
    end else begin
      x[0] <= x_code;
      for (int i = 1; i < TAPS; i++) x[i] <= x[i-1];
    end
  end

  assign x_taps = x;

  // align tap data with the error
  assign xd[0] = x;
  for (genvar d = 0; d < ERR_LAT; d++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) for (int i = 0; i < TAPS; i++) xd[d+1][i] <= 8'd128;
      else        xd[d+1] <= xd[d];
    end
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    lms_engine u_eng (
      .clk, .rst_n, .en, .load,
      .init((i == MAIN_TAP) ? q2sm(16'(MAIN_INIT)) : sm_t'(0)),
      .x_code(xd[ERR_LAT][i]), .err, .mu,
      .coef(coef[i]), .dac_code(dac_code[i]), .dac_sign(dac_sign[i]));
  end

  // summer model
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else begin
      logic signed [31:0] acc;
      acc = '0;
      for (int i = 0; i < TAPS; i++)
        acc += 32'(sm2q(coef[i])) * ((32'(signed'({1'b0, x[i]})) - 32'sd128) <<< 1);
      y <= 16'(acc >>> 8);
    end
  end
endmodule
