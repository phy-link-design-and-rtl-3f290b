// tb_pi_controller - random +1/-1/0 inputs for each gain setting, checked against
// a real-valued model: code = round(alpha*K_PD*sum(eps) + beta*K_PD*eps) mod 64.
module tb_pi_controller;
  logic clk = 0, rst_n = 0, en;
  logic signed [1:0] eps;
  logic [1:0] gain_sel;
  logic [5:0] code;
  int checks = 0, failures = 0, n_wrap = 0;
  real integ, alpha, beta, v;
  int exp_code, prev_code;

  pi_controller #(.K_PD(32), .FRAC(10), .CODE_W(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; eps = 0; gain_sel = 0;
    for (int g = 0; g < 4; g++) begin
      rst_n = 0; en = 0; eps = 0; gain_sel = 2'(g);
      alpha = 1.0 / (2.0 ** (10 - g)); beta = 1.0 / (2.0 ** (8 - g));
      integ = 0.0; prev_code = 0;
      repeat (2) @(posedge clk);
      @(negedge clk); rst_n = 1;
      for (int i = 0; i < 3000; i++) begin
        int r;
        @(negedge clk);
        en = ($urandom % 8) != 0;
        r = $urandom % 6;
        eps = (r < 3) ? 2'sd1 : (r < 4 ? -2'sd1 : 2'sd0);
        v = integ;
        if (en) begin
          integ += alpha * 32.0 * real'(int'(eps));
          v = integ + beta * 32.0 * real'(int'(eps));
        end
        exp_code = int'($floor(v + 0.5)) % 64;
        if (exp_code < 0) exp_code += 64;
        @(posedge clk); #1;
        checks++;
        if (int'(code) != exp_code) begin
          failures++; $display("g %0d step %0d code %0d expected %0d", g, i, code, exp_code);
        end
        if (code < 8 && prev_code > 56) n_wrap++;
        prev_code = code;
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("the code never wrapped round"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
