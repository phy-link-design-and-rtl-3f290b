// tb_pi_switch_ctrl - random code requests with random levels of the two
// interpolator clocks. Checks: the output only changes over in a safe area
// (levels equal), never before SETTLE cycles, the active code is never rewritten
// while selected, and every request is finally served.
module tb_pi_switch_ctrl;
  logic clk = 0, rst_n = 0;
  logic [5:0] code_in, ctrl_a, ctrl_b, active_code;
  logic clk_a_lvl, clk_b_lvl, sel, busy;
  int checks = 0, failures = 0, n_sw = 0;
  logic prev_sel, prev_a_eq, prev_b_eq;
  logic [5:0] prev_a, prev_b;

  pi_switch_ctrl #(.CODE_W(6), .SETTLE(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    code_in = 0; clk_a_lvl = 0; clk_b_lvl = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int req = 0; req < 200; req++) begin
      int wait_cyc;
      @(negedge clk);
      code_in = 6'($urandom);
      if (code_in == active_code) code_in = code_in + 1;
      wait_cyc = 1;   // the posedge right after the request already counts
      while (active_code != code_in && wait_cyc < 100) begin
        logic levels_eq;
        @(negedge clk);
        clk_a_lvl = 1'($urandom); clk_b_lvl = 1'($urandom);
        levels_eq = (clk_a_lvl == clk_b_lvl);
        prev_sel = sel; prev_a = ctrl_a; prev_b = ctrl_b;
        @(posedge clk); #1;
        wait_cyc++;
        if (sel != prev_sel) begin
          n_sw++;
          checks++;
          if (!levels_eq) begin failures++; $display("switched outside safe area"); end
          checks++;
          if (wait_cyc < 3) begin failures++; $display("switched after %0d cycles", wait_cyc); end
        end
        checks++;
        // the code of the interpolator that was active must not have changed
        if ((!prev_sel && ctrl_a != prev_a) || (prev_sel && ctrl_b != prev_b)) begin
          failures++; $display("active interpolator code rewritten");
        end
      end
      checks++;
      if (active_code != code_in) begin failures++; $display("request %0d not served", req); end
    end
    checks++;
    if (n_sw < 150) begin failures++; $display("only %0d switches", n_sw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
