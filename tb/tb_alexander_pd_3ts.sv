// tb_alexander_pd_3ts - drives the phase detector with sample words built from a
// data stream and a known edge position, and checks the decision against an
// independent model: the sampling clocks are early when the data edge falls after
// Q2, late when it falls before Q1, aligned when it falls between Q1 and Q2.
module tb_alexander_pd_3ts;
  import phy_pkg::*;
  logic [7:0] i_word, q1_word, q2_word;
  logic q2_prev;
  pd_state_t state;
  logic signed [7:0] err_sum;
  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0, n_al = 0;

  alexander_pd_3ts #(.WIDTH(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bits b[0..9]; UI k spans [32k, 32k+32); the data edge sits at offset `edge_pos`.
  // I(k) sampled at 32k+16 - 32 + i_off, Q1 at 32k + q1_off, Q2 at 32k + q2_off
  function automatic logic smp(input logic [9:0] b, input int t, input int edge_pos);
    int idx;
    idx = (t - edge_pos) >= 0 ? (t - edge_pos) / 32 : -1;
    if (idx < 0) idx = 0;
    if (idx > 9) idx = 9;
    return b[idx];
  endfunction

  initial begin
    for (int trial = 0; trial < 600; trial++) begin
      logic [9:0] b;
      int edge_pos, q1o, q2o, expect_kind, ntr;
      b = 10'($urandom);
      // at least one transition inside the word
      if (b[8:1] == 8'h00 || b[8:1] == 8'hFF) b[4] = ~b[4];
      q1o = 32 + 14;           // Q1 of UI k at 32(k+1)+14
      q2o = 32 + 18;
      case (trial % 3)
        0: edge_pos = 18 + 2 + ($urandom % 6);   // edge after Q2 -> early
        1: edge_pos = 14 - 2 - ($urandom % 6);   // edge before Q1 -> late
        default: edge_pos = 15 + ($urandom % 3); // between Q1 and Q2 -> aligned
      endcase
      // sample UI k = 0..7 of bits b[1..8]; edge between bit k and k+1 at 32(k+1)+edge_pos
      for (int k = 0; k < 8; k++) begin
        i_word[k]  = b[k+1];
        q1_word[k] = ((q1o - 32) < edge_pos) ? b[k+1] : b[k+2];
        q2_word[k] = ((q2o - 32) < edge_pos) ? b[k+1] : b[k+2];
      end
      q2_prev = ((q2o - 32) < edge_pos) ? b[0] : b[1];
      #1;
      ntr = 0;
      for (int k = 0; k < 7; k++) if (b[k+1] != b[k+2]) ntr++;
      case (trial % 3)
        0: expect_kind = 1;
        1: expect_kind = 2;
        default: expect_kind = (ntr > 0) ? 3 : 0;
      endcase
      checks++;
      if (expect_kind == 1 && state != PD_EARLY && !(state == PD_NONE && err_sum == 0)) begin
        failures++; $display("trial %0d expected early got %s sum %0d", trial, state.name(), err_sum);
      end
      if (expect_kind == 2 && state != PD_LATE && !(state == PD_NONE && err_sum == 0)) begin
        failures++; $display("trial %0d expected late got %s sum %0d", trial, state.name(), err_sum);
      end
      if (expect_kind == 3 && state != PD_ALIGNED) begin
        failures++; $display("trial %0d expected aligned got %s", trial, state.name());
      end
      if (state == PD_EARLY) n_early++;
      if (state == PD_LATE) n_late++;
      if (state == PD_ALIGNED) n_al++;
    end
    checks++;
    if (n_early < 50 || n_late < 50 || n_al < 50) begin
      failures++; $display("decision counts early %0d late %0d aligned %0d", n_early, n_late, n_al);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
