// tb_training_seq - a model of the training units answers every step with its done
// after a random time; checks pass or fail at random (and always fail in one phase
// to reach the retry limit); the BER alarm fires in normal operation. The state,
// the go pulses and the counters are compared every cycle with a reference model.
module tb_training_seq;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, start;
  logic rd_done, rxeq_done, wr_done, txeq_done, chk_done, rd_ok, wr_ok, ber_high;
  train_state_t state;
  logic go, fail;
  logic [7:0] n_retrain, n_loops;
  int checks = 0, failures = 0;
  int visits [9];

  training_seq #(.MAX_LOOPS(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int m_state, m_loops, m_retrain, m_nloops, prev_state, n_fail_phase;
    start = 0; rd_done = 0; rxeq_done = 0; wr_done = 0; txeq_done = 0;
    chk_done = 0; rd_ok = 0; wr_ok = 0; ber_high = 0;
    m_state = 0; m_loops = 0; m_retrain = 0; m_nloops = 0; prev_state = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int nxt;
      logic ev, ok;
      @(negedge clk);
      ev = ($urandom % 8) == 0;
      n_fail_phase = ((cyc / 4000) == 2) ? 1 : 0;   // checks always fail in this window
      ok = n_fail_phase ? 1'b0 : (($urandom % 4) != 0);
      start     = (m_state == 0 || m_state == 8) && ev;
      rd_done   = (m_state == 1) && ev;
      rxeq_done = (m_state == 2) && ev;
      wr_done   = (m_state == 4) && ev;
      txeq_done = (m_state == 5) && ev;
      chk_done  = (m_state == 3 || m_state == 6) && ev;
      rd_ok = ok; wr_ok = ok;
      ber_high  = (m_state == 7) && (($urandom % 50) == 0);
      // reference model
      nxt = m_state;
      case (m_state)
        0: if (start) nxt = 1;
        1: if (rd_done) nxt = 2;
        2: if (rxeq_done) nxt = 3;
        3: if (chk_done) begin
             if (rd_ok) begin nxt = 4; m_loops = 0; end
             else begin nxt = (m_loops >= 4) ? 8 : 1; m_loops++; m_nloops++; end
           end
        4: if (wr_done) nxt = 5;
        5: if (txeq_done) nxt = 6;
        6: if (chk_done) begin
             if (wr_ok) begin nxt = 7; m_loops = 0; end
             else begin nxt = (m_loops >= 4) ? 8 : 4; m_loops++; m_nloops++; end
           end
        7: if (ber_high) begin nxt = 1; m_retrain++; end
        8: if (start) begin nxt = 1; m_loops = 0; end
        default: nxt = 0;
      endcase
      prev_state = m_state;
      m_state = nxt;
      @(posedge clk); #1;
      visits[int'(state)]++;
      checks++;
      if (int'(state) != m_state) begin
        failures++; $display("cycle %0d state %s expected %0d", cyc, state.name(), m_state);
        m_state = int'(state);
      end
      checks++;
      if (go != (m_state != prev_state && m_state != 8 && m_state != 7)) begin
        failures++; $display("cycle %0d go %b on %0d -> %0d", cyc, go, prev_state, m_state);
      end
      checks++;
      if (fail != (state == TS_FAIL)) begin failures++; $display("fail flag wrong"); end
    end
    checks++;
    if (int'(n_retrain) != (m_retrain % 256) || int'(n_loops) != (m_nloops % 256)) begin
      failures++; $display("counters %0d %0d expected %0d %0d", n_retrain, n_loops, m_retrain, m_nloops);
    end
    visits[0]++;   // idle is left right after reset
    foreach (visits[s]) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
