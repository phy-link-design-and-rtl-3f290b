// lms_engine - digital LMS engine that adapts one equalizer coefficient.
//
// Implements C(k+1) = C(k) + mu * e(k) * x(k) with the blocks of the semi-digital
// equalizer: Rom_in turns the 8-bit ADC code of the tap's data (the distorted
// sample for an FFE tap, the ideal bit for a DFE tap) into a sign-magnitude value,
// one pipelined multiplier forms x*e, a second one multiplies by the step size,
// the accumulator integrates, and Rom_out turns the coefficient magnitude into an
// 8-bit DAC code; dac_sign tells the analog summer to swap its differential inputs.
// Rom_in maps code c to (c-128)/128 (offset binary, +-1 full scale) and Rom_out maps
// the magnitude 0..1.5 linearly onto 0..255; the document does not give the ROM
// contents, so both maps are this design's. They are computed, not stored.
// Timing: a product reaches the coefficient 7 cycles after x_code/err (two
// 3-cycle multipliers and the accumulator); en is delayed to match.
module lms_engine
  import phy_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       load,
  input  sm_t        init,
  input  logic [7:0] x_code,
  input  sm_t        err,
  input  sm_t        mu,
  output sm_t        coef,
  output logic [7:0] dac_code,
  output logic       dac_sign
);
  sm_t        x_sm, xe, dlt;
  logic [5:0] en_d;

  // Rom_in: offset-binary ADC code -> sign-magnitude, Q8
  assign x_sm = q2sm(16'(signed'({1'b0, x_code}) - 16'sd128) <<< 1);

  sm_mult u_m1 (.clk, .rst_n, .a(x_sm), .b(err), .y(xe));
  sm_mult u_m2 (.clk, .rst_n, .a(xe),   .b(mu),  .y(dlt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_d <= '0;
    else        en_d <= {en_d[4:0], en};
  end

  sm_acc u_acc (.clk, .rst_n, .en(en_d[5]), .load, .init, .delta(dlt), .coef);

  // Rom_out: magnitude (max 384 = 1.5) -> DAC code 0..255
  always_comb begin
    logic [17:0] d;
    d = (18'(coef[8:0]) * 18'd170) >> 8;
    dac_code = (d > 18'd255) ? 8'd255 : d[7:0];
    dac_sign = coef[9];
  end
endmodule
