// training_seq - interface training sequencer of the controller.
//
// Runs the trainings in the order the link needs them:
//   read training (receive phase, CDR) -> Rx EQ training -> read check
//     read check fails: back to read training (the equalizer moved the eye)
//   write training (transmit phase)    -> Tx EQ training -> write check
//     write check fails: back to write training
//   normal operation; a BER monitor alarm (ber_high) restarts the whole sequence.
// Each step is started by a one-cycle go_* pulse on entry and ends with its *_done
// input; rd_ok / wr_ok are sampled together with chk_done. More than MAX_LOOPS
// failed checks in a row end in TS_FAIL. The order and loops are the document's;
// the handshake and retry limit are this design's.
module training_seq
  import phy_pkg::*;
#(
  parameter int MAX_LOOPS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         rd_done,
  input  logic         rxeq_done,
  input  logic         wr_done,
  input  logic         txeq_done,
  input  logic         chk_done,
  input  logic         rd_ok,
  input  logic         wr_ok,
  input  logic         ber_high,
  output train_state_t state,
  output logic         go,          // one-cycle pulse on entry into a step
  output logic         fail,
  output logic [7:0]   n_retrain,   // BER-triggered restarts
  output logic [7:0]   n_loops      // failed checks
);
  logic [3:0] loops;
  train_state_t nxt;

  assign fail = (state == TS_FAIL);

  always_comb begin
    nxt = state;
    unique case (state)
      TS_IDLE:   if (start)     nxt = TS_READ;
      TS_READ:   if (rd_done)   nxt = TS_RXEQ;
      TS_RXEQ:   if (rxeq_done) nxt = TS_RDCHK;
      TS_RDCHK:  if (chk_done)  nxt = rd_ok ? TS_WRITE : ((loops >= 4'(MAX_LOOPS)) ? TS_FAIL : TS_READ);
      TS_WRITE:  if (wr_done)   nxt = TS_TXEQ;
      TS_TXEQ:   if (txeq_done) nxt = TS_WRCHK;
      TS_WRCHK:  if (chk_done)  nxt = wr_ok ? TS_NORMAL : ((loops >= 4'(MAX_LOOPS)) ? TS_FAIL : TS_WRITE);
      TS_NORMAL: if (ber_high)  nxt = TS_READ;
      TS_FAIL:   if (start)     nxt = TS_READ;
      default:                  nxt = TS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= TS_IDLE;
      go        <= 1'b0;
      loops     <= '0;
      n_retrain <= '0;
      n_loops   <= '0;
    end else begin
      state <= nxt;
      go    <= (nxt != state) && (nxt != TS_FAIL) && (nxt != TS_NORMAL);
      if ((state == TS_RDCHK && chk_done && !rd_ok) || (state == TS_WRCHK && chk_done && !wr_ok)) begin
        loops   <= loops + 1'b1;
        n_loops <= n_loops + 1'b1;
      end else if ((state == TS_RDCHK || state == TS_WRCHK) && chk_done) begin
        loops <= '0;
      end
      if (state == TS_NORMAL && ber_high) n_retrain <= n_retrain + 1'b1;
      if (state == TS_FAIL && start) loops <= '0;
    end
  end
endmodule
