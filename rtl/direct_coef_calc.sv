// direct_coef_calc - coefficient calculation of the full-digital direct Tx EQ.
//
// One impulse is sent from the slave to the controller. y(k) are the samples at
// the input of the receive FFE (channel only) and Y(k) the samples after the
// trained receive equalizer, which stand for what the ideally pre-emphasised
// transmit path must produce. The coefficients follow
//   C1 = Y(1) / y(1)
//   Ck = [ Y(k) - sum_{j=1..k-1} C_j * y(k+1-j) ] * C1 / Y(1),   k >= 2
// After `start`, TAPS samples of y and Y are captured on smp_valid. The
// calculation then runs sequentially on one pipelined multiplier (3 cycles) and
// one pipelined divider (18 cycles), in sign-magnitude {sign, integer, 8 fraction}.
// The equation is the document's; computing it sequentially on shared units
// instead of the document's fully pipelined array is this design's choice.
// Timing: done rises about 5 + sum_k (4(k-1) + 23) cycles after the last sample.
module direct_coef_calc
  import phy_pkg::*;
#(
  parameter int TAPS = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic smp_valid,
  input  sm_t  y_s,
  input  sm_t  Y_s,
  output sm_t  coef [TAPS],
  output logic done
);
  typedef enum logic [2:0] {D_IDLE, D_CAP, D_MAC, D_MACW, D_SCALE, D_DIV, D_DONE} d_state_t;
  d_state_t st;

  sm_t  ys [TAPS];
  sm_t  Ys [TAPS];
  logic [2:0] k, j, ncap;
  logic [4:0] wcnt;
  logic signed [15:0] acc;

  sm_t m_a, m_b, m_y;
  sm_t d_n, d_d, d_q;

  sm_mult    u_mul (.clk, .rst_n, .a(m_a), .b(m_b), .y(m_y));
  sm_divider u_div (.clk, .rst_n, .dividend(d_n), .divisor(d_d), .quot(d_q));

  assign done = (st == D_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= D_IDLE;
      k    <= '0; j <= '0; ncap <= '0; wcnt <= '0;
      acc  <= '0;
      m_a  <= '0; m_b <= '0; d_n <= '0; d_d <= '0;
      for (int i = 0; i < TAPS; i++) begin
        ys[i] <= '0; Ys[i] <= '0; coef[i] <= '0;
      end
    end else begin
      unique case (st)
        D_IDLE, D_DONE: if (start) begin
          ncap <= '0;
          st   <= D_CAP;
        end
        D_CAP: if (smp_valid) begin
          ys[ncap] <= y_s;
          Ys[ncap] <= Y_s;
          ncap     <= ncap + 1'b1;
          if (ncap == 3'(TAPS-1)) begin
            // C1 = Y(1)/y(1)
            k    <= '0;
            d_n  <= Ys[0];
            d_d  <= ys[0];
            wcnt <= '0;
            st   <= D_DIV;
          end
        end
        D_DIV: begin
          // first cycle: operands (already set) enter; wait for the quotient
          if (k == 0 && wcnt == 0) begin
            d_n <= Ys[0];
            d_d <= ys[0];
          end
          wcnt <= wcnt + 1'b1;
          if (wcnt == 5'd19) begin
            coef[k] <= d_q;
            if (k == 3'(TAPS-1)) st <= D_DONE;
            else begin
              k   <= k + 1'b1;
              acc <= sm2q(Ys[k+1]);
              j   <= '0;
              st  <= D_MAC;
            end
          end
        end
        D_MAC: begin
          // acc -= C_j * y(k+1-j)  (0-based: C[j] * ys[k-j])
          m_a  <= coef[j];
          m_b  <= ys[k-j];
          wcnt <= '0;
          st   <= D_MACW;
        end
        D_MACW: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 5'd3) begin
            acc <= acc - sm2q(m_y);
            if (j == k - 1'b1) begin
              m_a  <= q2sm(acc - sm2q(m_y));
              m_b  <= coef[0];
              wcnt <= '0;
              st   <= D_SCALE;
            end else begin
              j  <= j + 1'b1;
              st <= D_MAC;
            end
          end
        end
        D_SCALE: begin
          // [..] * C1, then / Y(1)
          wcnt <= wcnt + 1'b1;
          if (wcnt == 5'd3) begin
            d_n  <= m_y;
            d_d  <= Ys[0];
            wcnt <= 5'd1;
            st   <= D_DIV;
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
