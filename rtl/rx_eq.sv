// rx_eq - adaptive receiver equalizer: 4-tap FFE plus 4-tap DFE trained by LMS.
//
// Y(k) = sum_i C_i v(k-i+1) + sum_j D_j I(k-j),  e(k) = I(k) - Y(k)
// The FFE taps run on the distorted received samples v (8-bit ADC codes), the DFE
// taps on the bits I already decided. During training (train = 1) I is the known
// pattern (the slave's FIFO returns the same PRBS the controller holds); in normal
// operation I is the equalizer's own decision and coefficients are frozen.
// The FFE main tap is its oldest, so the ideal bit is delayed to meet Y, like the
// unit delays of the document's model: the FFE cancels the pre-cursor, the DFE the
// post-cursors. Data are +1/-1 for bits 1/0; mu is an input (document: 0.032).
// The FFE main tap starts at 1.0, the others at zero (design choice). The FFE
// summer is registered; the DFE sum is added combinationally so that the newest
// decision is fed back in time.
// Timing: `y`/`dec` for a received sample are valid after the FFE_TAPS-th clock
// edge that follows the edge taking in the sample whose main cursor they carry;
// `ideal` is given together with that sample.
module rx_eq
  import phy_pkg::*;
#(
  parameter int FFE_TAPS = 4,
  parameter int DFE_TAPS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        train,
  input  logic        load,
  input  logic [7:0]  rx_code,
  input  logic        ideal,
  input  sm_t         mu,
  output logic signed [15:0] y,
  output logic        dec,
  output logic        ref_bit,
  output sm_t         err,
  output sm_t         ffe_coef [FFE_TAPS],
  output sm_t         dfe_coef [DFE_TAPS],
  output logic [7:0]  ffe_dac  [FFE_TAPS],
  output logic [7:0]  dfe_dac  [DFE_TAPS],
  output logic [FFE_TAPS-1:0] ffe_sign,
  output logic [DFE_TAPS-1:0] dfe_sign
);
  logic [FFE_TAPS:0]  ideal_d;      // ideal_d[FFE_TAPS] meets the FFE output
  logic signed [15:0] y_ffe, y_dfe_reg_unused;
  logic [7:0]         dfe_in;
  logic [7:0]         hist [DFE_TAPS];   // I(k-1) .. I(k-DFE_TAPS) as codes
  logic [7:0]         ffe_x_unused [FFE_TAPS];
  logic signed [15:0] y_dfe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ideal_d <= '0;
    else        ideal_d <= {ideal_d[FFE_TAPS-1:0], ideal};
  end

  assign ref_bit = train ? ideal_d[FFE_TAPS] : dec;
  assign dfe_in  = ref_bit ? 8'd255 : 8'd1;   // +-254/256 on the DFE delay line

  lms_fir #(.TAPS(FFE_TAPS), .ERR_LAT(1), .MAIN_TAP(FFE_TAPS-1), .MAIN_INIT(256)) u_ffe (
    .clk, .rst_n, .en(train), .load, .x_code(rx_code), .err, .mu,
    .coef(ffe_coef), .dac_code(ffe_dac), .dac_sign(ffe_sign), .x_taps(ffe_x_unused), .y(y_ffe));

  lms_fir #(.TAPS(DFE_TAPS), .ERR_LAT(0), .MAIN_TAP(0), .MAIN_INIT(0)) u_dfe (
    .clk, .rst_n, .en(train), .load, .x_code(dfe_in), .err, .mu,
    .coef(dfe_coef), .dac_code(dfe_dac), .dac_sign(dfe_sign), .x_taps(hist), .y(y_dfe_reg_unused));

  always_comb begin
    logic signed [31:0] acc;
    acc = '0;
    for (int j = 0; j < DFE_TAPS; j++)
      acc += 32'(sm2q(dfe_coef[j])) * ((32'(signed'({1'b0, hist[j]})) - 32'sd128) <<< 1);
    y_dfe = 16'(acc >>> 8);
    y     = y_ffe + y_dfe;
    dec   = ~y[15];
  end

  assign err = q2sm((ideal_d[FFE_TAPS] ? 16'sd256 : -16'sd256) - y);
endmodule
