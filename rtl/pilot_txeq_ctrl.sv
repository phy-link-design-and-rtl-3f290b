// pilot_txeq_ctrl - control unit of the pilot-signal transmitter equalizer training.
//
// Taps are trained one after another. For tap n the pilot pattern of Table
// "pilot signals" (10000, 11000, 10100, 10010, 10001; tap 1 .. tap 5) is shifted out
// MSB first, written into the slave's FIFO through the sampler, read back through
// the trained Rx EQ and compared bit by bit with the ideal pattern. A "hold" flag
// keeps any mismatch until the pattern is complete. Then:
//   comp1 (error)    - coefficient n is raised by one DAC LSB and the pattern resent
//   comp2 (no error) - tap n is finished, the next pilot pattern is sent
// Tap 1 starts at zero, the others at the most negative DAC value, so each
// coefficient rises from a minimum until its pilot peak is detected. A tap that
// reaches the DAC maximum is also finished. The protocol is the document's;
// the start values and the bit-by-bit return handshake are this design's.
// Interface: pilot_bit/pilot_valid go to the transmitter; rx_bit/rx_valid bring
// the returned bits back in order (any latency).
module pilot_txeq_ctrl #(
  parameter int TAPS  = 5,
  parameter int DAC_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic rx_bit,
  input  logic rx_valid,
  output logic pilot_bit,
  output logic pilot_valid,
  output logic signed [DAC_W-1:0] coef [TAPS],
  output logic [2:0] tap,
  output logic comp1,
  output logic comp2,
  output logic busy,
  output logic done,
  output logic [15:0] n_patterns
);
  localparam int PL = 5;                              // pilot length
  localparam logic signed [DAC_W-1:0] CMIN = {1'b1, {(DAC_W-1){1'b0}}};
  localparam logic signed [DAC_W-1:0] CMAX = {1'b0, {(DAC_W-1){1'b1}}};

  typedef enum logic [2:0] {P_IDLE, P_SEND, P_WAIT, P_COMP, P_DONE} p_state_t;
  p_state_t st;

  logic [PL-1:0] pattern;
  logic [2:0]    tx_cnt, rx_cnt;
  logic          hold;                // error hold, cleared by the next pattern

  // pilot ROM: "1" followed by a single "1" at position n (none for tap 1)
  function automatic logic [PL-1:0] pilot_rom(input logic [2:0] n);
    return (n == 3'd0) ? 5'b10000 : (5'b10000 | (5'b10000 >> n));
  endfunction
  assign pattern = pilot_rom(tap);

  assign busy = (st != P_IDLE) && (st != P_DONE);
  assign done = (st == P_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= P_IDLE;
      tap         <= '0;
      tx_cnt      <= '0;
      rx_cnt      <= '0;
      hold        <= 1'b0;
      pilot_bit   <= 1'b0;
      pilot_valid <= 1'b0;
      comp1       <= 1'b0;
      comp2       <= 1'b0;
      n_patterns  <= '0;
      for (int i = 0; i < TAPS; i++) coef[i] <= (i == 0) ? '0 : CMIN;
    end else begin
      pilot_valid <= 1'b0;
      comp1       <= 1'b0;
      comp2       <= 1'b0;
      unique case (st)
        P_IDLE, P_DONE: if (start) begin
          tap    <= '0;
          tx_cnt <= '0;
          rx_cnt <= '0;
          hold   <= 1'b0;
          for (int i = 0; i < TAPS; i++) coef[i] <= (i == 0) ? '0 : CMIN;
          st     <= P_SEND;
        end
        P_SEND: begin
          pilot_bit   <= pattern[PL-1-int'(tx_cnt)];
          pilot_valid <= 1'b1;
          tx_cnt      <= tx_cnt + 1'b1;
          if (tx_cnt == 3'(PL-1)) begin
            st <= P_WAIT;
            n_patterns <= n_patterns + 1'b1;
          end
        end
        P_WAIT: ;
        P_COMP: begin
          tx_cnt <= '0;
          rx_cnt <= '0;
          hold   <= 1'b0;
          if (hold && coef[tap] != CMAX) begin
            comp1     <= 1'b1;                         // raise by one LSB, resend
            coef[tap] <= coef[tap] + 1'b1;
            st        <= P_SEND;
          end else begin
            comp2 <= 1'b1;                             // tap finished
            if (tap == 3'(TAPS-1)) st <= P_DONE;
            else begin
              tap <= tap + 1'b1;
              st  <= P_SEND;
            end
          end
        end
        default: st <= P_IDLE;
      endcase
      // returned bits are compared in order while a pattern is outstanding
      if ((st == P_SEND || st == P_WAIT) && rx_valid) begin
        if (rx_bit != pattern[PL-1-int'(rx_cnt)]) hold <= 1'b1;
        rx_cnt <= rx_cnt + 1'b1;
        if (rx_cnt == 3'(PL-1)) st <= P_COMP;
      end
    end
  end
endmodule
