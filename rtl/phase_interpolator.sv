// phase_interpolator - BEHAVIOURAL MODEL (not synthesizable) of the digital phase
// interpolator of the PI2 CDR.
//
// The real block is built from weighted inverter cells (3-bit stages fed by
// multiplexers) and produces a clock whose phase lies between two reference
// phases. This model keeps only the result: clk_out is ref_clk delayed by
// code * STEP_FS femtoseconds (written with a 1 fs time literal, so it does not
// depend on the time unit of the simulation; it rounds to the simulation
// precision). The reference is taken to be a 50% duty clock whose half period
// is 2^(CODE_W-1) steps, so the code MSB selects the inverted reference and the
// other bits add a delay shorter than half a period. Synthesis ignores the delay.
// With the default 6.25 ps step and a 2.5 GHz reference (400 ps period), the 64
// codes cover one period in 5.625 degree steps.
// The step size and code width follow the document; the delay-line form of the
// model is this design's choice.
// Lint note: for code 0 the delay is zero, and a linter reports the delayed
// assignment as a zero delay. That is the intended result for the first step.
module phase_interpolator #(
  parameter int CODE_W  = 6,
  parameter int STEP_FS = 6250
) (
  input  logic              ref_clk,
  input  logic [CODE_W-1:0] code,
  output logic              clk_out
);
  logic src;
  // MSB: inverted reference (half a period later); other bits: fine delay
  assign src = code[CODE_W-1] ? ~ref_clk : ref_clk;
  initial clk_out = 1'b0;
  always @(src) clk_out <= #(code[CODE_W-2:0] * STEP_FS * 1fs) src;
endmodule
