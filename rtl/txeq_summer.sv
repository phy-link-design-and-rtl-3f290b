// txeq_summer - digital summer of the full-digital transmitter equalizer.
//
// The data bit (+1/-1) passes four D flip-flops; the current bit and each delayed
// copy are multiplied by C1..C5 and the products are added:
//   eq_out(k) = sum_{n=1..TAPS} C_n * d(k-n+1)
// Coefficients are sign-magnitude {sign, integer, 8 fraction bits}; eq_out is
// two's complement with 8 fraction bits, registered. The structure is the
// document's; the +-1 data mapping is this design's.
// Timing: eq_out is valid one cycle after data_in.
module txeq_summer
  import phy_pkg::*;
#(
  parameter int TAPS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_in,
  input  sm_t         coef [TAPS],
  output logic signed [15:0] eq_out
);
  logic [TAPS-2:0] dl;     // D flip-flops: dl[0] = d(k-1)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dl     <= '0;
      eq_out <= '0;
    end else begin
      logic signed [15:0] acc;
      logic [TAPS-1:0]    d;
      d   = {dl, data_in};
      acc = '0;
      for (int n = 0; n < TAPS; n++)
        acc += d[n] ? sm2q(coef[n]) : -sm2q(coef[n]);
      eq_out <= acc;
      dl     <= d[TAPS-2:0];
    end
  end
endmodule
