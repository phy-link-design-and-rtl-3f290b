// sm_acc - saturating coefficient accumulator of the digital LMS engine.
//
// coef <= coef + delta on every cycle with en = 1, in sign-magnitude format
// {sign, integer bit, 8 fraction bits}. The sum is formed in two's complement and
// clamped to +-SAT (default 384 = 1.5, the clamp value the document's adder uses).
// en = 0 keeps the coefficient ("keep"); load presets it to init.
// Timing: coef is registered, one cycle after delta.
module sm_acc
  import phy_pkg::*;
#(
  parameter int SAT = 384
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic load,
  input  sm_t  init,
  input  sm_t  delta,
  output sm_t  coef
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef <= '0;
    end else if (load) begin
      coef <= init;
    end else if (en) begin
      logic signed [15:0] s;
      s = sm2q(coef) + sm2q(delta);
      if (s > 16'(SAT))       s = 16'(SAT);
      else if (s < -16'(SAT)) s = -16'(SAT);
      coef <= q2sm(s);
    end
  end
endmodule
