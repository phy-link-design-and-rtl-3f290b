// pi_switch_ctrl - glitch-free switching between two phase interpolators A and B.
//
// Changing the control code of the interpolator that drives the sampling clock
// would produce spikes, so two interpolators are kept: one drives the output
// (sel = 0: A, sel = 1: B) while the other is idle. When code_in differs from the
// active code the new code is written into the idle interpolator's control word,
// SETTLE or more clocks are waited so that it can settle, and the output is then
// switched over only in a "safe area" where both interpolator clocks have the same
// level (clk_a_lvl == clk_b_lvl, sampled in this clock domain). The protocol is the
// document's; holding a new request until a running switch ends is this design's.
// Timing: a request takes SETTLE+1 cycles plus the wait for a safe point.
// Lint note: rst_n is both the asynchronous reset of the registers and the
// `disable iff` term of the safe-switch assertion. A linter can report this as a
// mixed sync/async net. The assertion adds no hardware.
module pi_switch_ctrl #(
  parameter int CODE_W = 6,
  parameter int SETTLE = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] code_in,
  input  logic              clk_a_lvl,
  input  logic              clk_b_lvl,
  output logic [CODE_W-1:0] ctrl_a,
  output logic [CODE_W-1:0] ctrl_b,
  output logic              sel,
  output logic [CODE_W-1:0] active_code,
  output logic              busy
);
  typedef enum logic [1:0] {SW_IDLE, SW_SETTLE, SW_SAFE} sw_state_t;
  sw_state_t st;
  logic [7:0] cnt;

  assign active_code = sel ? ctrl_b : ctrl_a;
  assign busy        = (st != SW_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= SW_IDLE;
      ctrl_a <= '0;
      ctrl_b <= '0;
      sel    <= 1'b0;
      cnt    <= '0;
    end else begin
      unique case (st)
        SW_IDLE: if (code_in != active_code) begin
          if (sel) ctrl_a <= code_in;     // load the idle interpolator
          else     ctrl_b <= code_in;
          cnt <= 8'(SETTLE);
          st  <= SW_SETTLE;
        end
        SW_SETTLE: begin
          if (cnt <= 8'd1) st <= SW_SAFE;
          cnt <= cnt - 1'b1;
        end
        SW_SAFE: if (clk_a_lvl == clk_b_lvl) begin
          sel <= ~sel;
          st  <= SW_IDLE;
        end
        default: st <= SW_IDLE;
      endcase
    end
  end

  // the active interpolator's code never changes while it drives the output
  property p_active_stable;
    @(posedge clk) disable iff (!rst_n) (st != SW_SAFE) |=> $stable(active_code) || $changed(sel);
  endproperty
  a_active_stable: assert property (p_active_stable);
endmodule
