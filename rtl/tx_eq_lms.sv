// tx_eq_lms - semi-digital LMS transmitter equalizer (pre-emphasis) with 8 taps.
//
// The transmit bits (+1/-1) run through an 8-tap linear equalizer whose output
// tx_y drives the channel. The coefficients are adapted with the same LMS engines
// as the receiver: C_i += mu * e * b(k-i), where the error e is measured in the
// controller after the channel, the slave's FIFO and the already trained Rx EQ,
// and arrives ERR_LAT cycles after the LMS tap data that produced it. Because the
// whole adaptation sits in the controller, the slave side needs no equalizer.
// Tap MAIN_TAP starts at 1.0, the others at zero; MAIN_TAP > 0 leaves taps for
// pre-cursors. Eight taps follow the document; MAIN_TAP and ERR_LAT are this
// design's (the round-trip latency must be known from the link).
// Timing: tx_y is registered, one cycle after tx_bit.
module tx_eq_lms
  import phy_pkg::*;
#(
  parameter int TAPS     = 8,
  parameter int MAIN_TAP = 2,
  parameter int ERR_LAT  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        train,
  input  logic        load,
  input  logic        tx_bit,
  input  sm_t         err,
  input  sm_t         mu,
  output logic signed [15:0] tx_y,
  output sm_t         coef [TAPS],
  output logic [7:0]  dac_code [TAPS],
  output logic [TAPS-1:0] dac_sign
);
  logic [7:0] x_unused [TAPS];

  lms_fir #(.TAPS(TAPS), .ERR_LAT(ERR_LAT), .MAIN_TAP(MAIN_TAP), .MAIN_INIT(256)) u_leq (
    .clk, .rst_n, .en(train), .load, .x_code(tx_bit ? 8'd255 : 8'd1), .err, .mu,
    .coef, .dac_code, .dac_sign, .x_taps(x_unused), .y(tx_y));
endmodule
