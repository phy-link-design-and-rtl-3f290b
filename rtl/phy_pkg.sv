// phy_pkg - shared types and constants of the PHY link training logic.
//
// Number format used throughout the equalizer datapath: a 10-bit sign-magnitude
// word {sign, integer bit, 8 fraction bits}, so the magnitude range is 0..511/256.
// This is the format the equalizer hardware is specified with; the helper
// functions convert it to and from two's complement with 8 fraction bits (Q8).
package phy_pkg;

  localparam int SM_W   = 10;   // sign-magnitude word width
  localparam logic [8:0] SM_MAX = 9'h1FF;  // largest magnitude

  typedef logic [SM_W-1:0] sm_t;

  // Phase detector decision of the three-times-sampling (3TS) CDR
  typedef enum logic [1:0] {
    PD_NONE    = 2'd0,   // no change (0)
    PD_EARLY   = 2'd1,   // early (+1)
    PD_LATE    = 2'd2,   // late (-1)
    PD_ALIGNED = 2'd3    // aligned (-2)
  } pd_state_t;

  // Interface training sequence
  typedef enum logic [3:0] {
    TS_IDLE     = 4'd0,
    TS_READ     = 4'd1,   // read training (CDR, receive phase)
    TS_RXEQ     = 4'd2,   // Rx EQ training
    TS_RDCHK    = 4'd3,   // read check
    TS_WRITE    = 4'd4,   // write training (transmit phase)
    TS_TXEQ     = 4'd5,   // Tx EQ training
    TS_WRCHK    = 4'd6,   // write check
    TS_NORMAL   = 4'd7,   // normal operation
    TS_FAIL     = 4'd8
  } train_state_t;

  // Impedance calibration search algorithm
  typedef enum logic [1:0] {
    CAL_BINARY   = 2'd0,
    CAL_HYB_LIN  = 2'd1,
    CAL_HYB_RB   = 2'd2
  } cal_algo_t;

  // Sign-magnitude -> two's complement Q8 (16 bit)
  function automatic logic signed [15:0] sm2q(input sm_t v);
    logic signed [15:0] m;
    m = signed'({7'd0, v[8:0]});
    return v[9] ? -m : m;
  endfunction

  // Two's complement Q8 -> sign-magnitude, saturating
  function automatic sm_t q2sm(input logic signed [15:0] q);
    logic [15:0] m;
    m = q[15] ? 16'(-q) : 16'(q);
    if (m > 16'(SM_MAX)) m = 16'(SM_MAX);
    return (m == 16'd0) ? sm_t'(0) : {q[15], m[8:0]};
  endfunction

endpackage
