// tb_pre_filter - random early/late/none decisions against a reference
// accumulator; checks carry value and timing for thresholds 2 (default) and 8.
module tb_pre_filter;
  logic clk = 0, rst_n = 0, en;
  logic signed [1:0] pd_dir, carry;
  logic [3:0] thresh;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0;
  int acc, th, exp_carry;

  pre_filter #(.PRE_FILT(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; pd_dir = 0; thresh = 0; acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      thresh = (phase == 0) ? 4'd0 : 4'd8;
      th = (phase == 0) ? 2 : 8;
      acc = 0;
      // flush state
      @(negedge clk); en = 1; pd_dir = 0;
      for (int i = 0; i < 1500; i++) begin
        int r;
        @(negedge clk);
        en = ($urandom % 4) != 0;
        r = $urandom % 10;
        // biased toward +1 in the first half, -1 in the second
        pd_dir = (r < 5) ? ((i < 750) ? 2'sd1 : -2'sd1) : (r < 8 ? 2'sd0 : ((i < 750) ? -2'sd1 : 2'sd1));
        exp_carry = 0;
        if (en) begin
          acc += int'(pd_dir);
          if (acc >= th) begin exp_carry = 1; acc = 0; end
          else if (acc <= -th) begin exp_carry = -1; acc = 0; end
        end
        @(posedge clk); #1;
        checks++;
        if (int'(carry) != exp_carry) begin
          failures++; $display("cycle %0d th %0d carry %0d expected %0d", i, th, carry, exp_carry);
        end
        if (carry == 1) n_up++;
        if (carry == -1) n_dn++;
      end
      if (phase == 0) begin
        // resync the reference after the threshold change
        @(negedge clk); en = 0; pd_dir = 0; rst_n = 0; @(negedge clk); rst_n = 1;
      end
    end
    checks++;
    if (n_up < 20 || n_dn < 20) begin failures++; $display("carries up %0d down %0d", n_up, n_dn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
