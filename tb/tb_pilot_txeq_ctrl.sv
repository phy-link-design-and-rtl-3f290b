// tb_pilot_txeq_ctrl - the slave and channel are modelled by a return path that
// echoes each pilot bit after a random latency and corrupts the pattern's second
// "1" (the first bit for tap 1) while the coefficient of the tap under training is
// below a hidden target. Checks: the patterns are the five pilot signals, each
// coefficient stops exactly at its target, comp1/comp2 counts match, done rises.
module tb_pilot_txeq_ctrl;
  logic clk = 0, rst_n = 0, start, rx_bit, rx_valid;
  logic pilot_bit, pilot_valid, comp1, comp2, busy, done;
  logic signed [5:0] coef [5];
  logic [2:0] tap;
  logic [15:0] n_patterns;
  int checks = 0, failures = 0;
  int target [5];
  int n_comp1 = 0, n_comp2 = 0, exp_comp1;
  logic rq [$];
  int rlat [$];
  logic [4:0] cur_pat;
  int pos;
  logic [4:0] pilots [5] = '{5'b10000, 5'b11000, 5'b10100, 5'b10010, 5'b10001};

  pilot_txeq_ctrl #(.TAPS(5), .DAC_W(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // return path: bits come back in order with a random delay
  int wait_cnt = 0;
  always @(posedge clk) begin
    rx_valid <= 1'b0;
    if (pilot_valid && rst_n) begin
      logic b;
      int p;
      p = pos;
      cur_pat[4 - p] = pilot_bit;
      b = pilot_bit;
      if (int'(coef[tap]) < target[tap] && ((tap == 0 && p == 0) || (tap != 0 && p == int'(tap))))
        b = ~b;
      rq.push_back(b);
      pos = (pos + 1) % 5;
      if (pos == 0) begin
        checks++;
        if (cur_pat != pilots[tap]) begin failures++; $display("tap %0d pattern %b", tap, cur_pat); end
      end
    end
    if (rq.size() > 0) begin
      if (wait_cnt == 0) begin
        rx_bit <= rq.pop_front();
        rx_valid <= 1'b1;
        wait_cnt = int'($urandom % 4);
      end else wait_cnt--;
    end
    if (comp1 && rst_n) n_comp1++;
    if (comp2 && rst_n) n_comp2++;
  end

  initial begin
    start = 0; rx_bit = 0; rx_valid = 0; pos = 0;
    for (int round = 0; round < 2; round++) begin
      target[0] = int'($urandom % 20);
      for (int t = 1; t < 5; t++) target[t] = int'($urandom % 40) - 32;
      if (round == 1) target[2] = 40;   // unreachable: must stop at the DAC maximum
      exp_comp1 = target[0];
      for (int t = 1; t < 5; t++) exp_comp1 += ((target[t] > 31) ? 31 : target[t]) + 32;
      n_comp1 = 0; n_comp2 = 0;
      rst_n = 0;
      repeat (2) @(posedge clk);
      @(negedge clk); rst_n = 1; start = 1;
      @(negedge clk); start = 0;
      fork
        wait (done);
        begin repeat (200000) @(posedge clk); end
      join_any
      disable fork;
      @(posedge clk); #1;
      checks++;
      if (!done) begin failures++; $display("round %0d: training never finished", round); end
      for (int t = 0; t < 5; t++) begin
        int want;
        want = (target[t] > 31) ? 31 : target[t];
        checks++;
        if (int'(coef[t]) != want) begin failures++; $display("round %0d tap %0d coef %0d target %0d", round, t, coef[t], want); end
      end
      checks++;
      if (n_comp1 != exp_comp1 || n_comp2 != 5) begin
        failures++; $display("comp1 %0d (expected %0d) comp2 %0d", n_comp1, exp_comp1, n_comp2);
      end
      checks++;
      if (int'(n_patterns) != exp_comp1 + 5) begin failures++; $display("patterns %0d", n_patterns); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
