// tb_phase_interpolator - 2.5 GHz reference; for several codes measures the delay
// from a reference edge to the output edge and checks it is code * 6.25 ps
// (within the 1 ps simulation precision) and that the output keeps the period.
module tb_phase_interpolator;
  logic ref_clk = 0, clk_out;
  logic [5:0] code;
  int checks = 0, failures = 0;
  realtime t_ref, t_out, t_out2;

  phase_interpolator #(.CODE_W(6), .STEP_FS(6250)) dut (.*);
  always #200ps ref_clk = ~ref_clk;

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      real d, want;
      code = (n < 8) ? 6'(n * 9) : 6'($urandom);
      repeat (3) @(posedge ref_clk);     // let the new delay reach the output
      @(posedge ref_clk); t_ref = $realtime;
      @(posedge clk_out); t_out = $realtime;
      @(posedge clk_out); t_out2 = $realtime;
      d = (t_out - t_ref) / 1ps;
      want = real'(code) * 6.25;
      checks++;
      if (d < want - 1.0 || d > want + 1.0) begin
        failures++; $display("code %0d delay %0.2f ps expected %0.2f", code, d, want);
      end
      checks++;
      if ((t_out2 - t_out) / 1ps < 399.0 || (t_out2 - t_out) / 1ps > 401.0) begin
        failures++; $display("code %0d output period %0.2f ps", code, (t_out2 - t_out) / 1ps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
