// pi_controller - proportional-integral loop filter of the PI2 CDR.
//
// phase = (eps*beta + alpha*sum(eps)) * K_PD, where eps is the pre-filter carry
// (+1/-1/0). The four alpha values 2^-10..2^-7 and beta values 2^-8..2^-5 of the
// document are realised by shifts and picked with gain_sel (g): alpha = 2^-(10-g),
// beta = 2^-(8-g). The integral branch keeps alpha*K_PD*sum(eps) directly in a
// fixed-point register with FRAC fraction bits; it wraps modulo 2^CODE_W codes,
// i.e. one full turn of the 64-step interpolator. The proportional branch is
// added on the cycle the carry arrives and the sum is rounded to the code.
// Timing: `code` is registered, one cycle after `eps`.
// Structure and gains follow the document; gain_sel and the wrap are design choices.
module pi_controller #(
  parameter int K_PD   = 32,
  parameter int FRAC   = 10,
  parameter int CODE_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic signed [1:0] eps,
  input  logic [1:0]        gain_sel,
  output logic [CODE_W-1:0] code
);
  localparam int AW = CODE_W + FRAC;
  localparam int KSH = $clog2(K_PD);   // K_PD is a power of two

  logic [AW-1:0] integ;                // alpha*K_PD*sum(eps), modulo 2^CODE_W codes
  logic [AW-1:0] i_step, p_step, sum;

  // alpha*K_PD = 2^(g-10+KSH), beta*K_PD = 2^(g-8+KSH), in units of 2^-FRAC
  assign i_step = AW'(1) << (FRAC - 10 + KSH + int'(gain_sel));
  assign p_step = AW'(1) << (FRAC - 8 + KSH + int'(gain_sel));

  always_comb begin
    logic [AW-1:0] ni;
    ni = integ;
    if (en && eps == 2'sd1)  ni = integ + i_step;
    if (en && eps == -2'sd1) ni = integ - i_step;
    sum = ni;
    if (en && eps == 2'sd1)  sum = ni + p_step;
    if (en && eps == -2'sd1) sum = ni - p_step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      code  <= '0;
    end else begin
      if (en && eps == 2'sd1)  integ <= integ + i_step;
      if (en && eps == -2'sd1) integ <= integ - i_step;
      // round to nearest code
      code <= CODE_W'((sum + (AW'(1) << (FRAC-1))) >> FRAC);
    end
  end
endmodule
