// tb_txeq_summer - random bits and coefficients; eq_out must equal
// sum C_n * (+-1 of bit k-n+1) one cycle after the bit.
module tb_txeq_summer;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, data_in;
  sm_t coef [5];
  logic signed [15:0] eq_out;
  int checks = 0, failures = 0;
  logic [4:0] hist;

  txeq_summer #(.TAPS(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    data_in = 0; hist = 0;
    foreach (coef[i]) coef[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int e;
      @(negedge clk);
      data_in = 1'($urandom);
      if (i % 16 == 0) foreach (coef[n]) coef[n] = 10'($urandom);
      hist = {hist[3:0], data_in};
      e = 0;
      for (int n = 0; n < 5; n++)
        e += (hist[n] ? 1 : -1) * (coef[n][9] ? -int'(coef[n][8:0]) : int'(coef[n][8:0]));
      @(posedge clk); #1;
      if (i >= 4) begin
        checks++;
        if (int'(eq_out) != e) begin failures++; $display("step %0d out %0d expected %0d", i, eq_out, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
