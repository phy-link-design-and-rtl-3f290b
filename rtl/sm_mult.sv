// sm_mult - three-stage pipelined multiplier for 10-bit sign-magnitude numbers.
//
// Format {sign, integer bit, 8 fraction bits}. Stage 1 forms the product sign and,
// for an operand of 1.0 or more, shifts its magnitude right by one bit so that the
// core multiplier is 8 x 8 bits. Stage 2 multiplies. Stage 3 shifts the product
// back by the number of pre-shifts, keeps 8 fraction bits and saturates the
// magnitude at 511/256. A zero magnitude always carries a positive sign.
// This is the algorithm the document gives for the LMS engine; the saturation and
// the three-stage split are this design's choices.
// Timing: y is valid 3 cycles after a and b.
module sm_mult
  import phy_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  sm_t  a,
  input  sm_t  b,
  output sm_t  y
);
  logic       s1_sign, s2_sign;
  logic [7:0] s1_a, s1_b;
  logic [1:0] s1_sh, s2_sh;
  logic [15:0] s2_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_sign <= 1'b0; s1_a <= '0; s1_b <= '0; s1_sh <= '0;
      s2_sign <= 1'b0; s2_p <= '0; s2_sh <= '0;
      y       <= '0;
    end else begin
      // stage 1: sign and pre-shift of operands >= 1.0
      s1_sign <= a[9] ^ b[9];
      s1_a    <= a[8] ? a[8:1] : a[7:0];
      s1_b    <= b[8] ? b[8:1] : b[7:0];
      s1_sh   <= 2'(a[8]) + 2'(b[8]);
      // stage 2: 8 x 8 multiply (Q16 scaled by 2^-sh)
      s2_sign <= s1_sign;
      s2_p    <= s1_a * s1_b;
      s2_sh   <= s1_sh;
      // stage 3: shift back, keep Q8, saturate
      begin
        logic [17:0] m;
        m = ({2'b00, s2_p} << s2_sh) >> 8;
        if (m > 18'(SM_MAX)) m = 18'(SM_MAX);
        y <= {s2_sign && (m != 0), m[8:0]};
      end
    end
  end
endmodule
