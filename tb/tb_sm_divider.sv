// tb_sm_divider - one division per cycle through the 18-stage pipeline; checks
// the quotient against floor(|a|*256/|b|) saturated at 511, the sign, and the
// divide-by-zero rule.
module tb_sm_divider;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0;
  sm_t dividend, divisor, quot;
  int checks = 0, failures = 0;
  sm_t exp_q [$];

  sm_divider #(.STAGES(18)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dividend = 0; divisor = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int q;
      @(negedge clk);
      dividend = 10'($urandom);
      divisor  = (i % 50 == 7) ? {1'($urandom), 9'd0} : 10'($urandom);
      if (i % 4 == 0) divisor[8:0] = 9'(256 + $urandom % 256);   // quotient < 2
      if (divisor[8:0] == 0) q = 511;
      else begin
        q = (int'(dividend[8:0]) * 256) / int'(divisor[8:0]);
        if (q > 511) q = 511;
      end
      exp_q.push_back({(dividend[9] ^ divisor[9]) && q != 0, 9'(q)});
      @(posedge clk); #1;
      if (exp_q.size() == 18) begin
        sm_t e;
        e = exp_q.pop_front();
        checks++;
        if (quot !== e) begin failures++; $display("step %0d quot %h expected %h", i, quot, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
