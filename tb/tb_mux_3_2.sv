// tb_mux_3_2 - exhaustive: control 0 passes (In1, In2), control 1 passes (In2, In3).
module tb_mux_3_2;
  logic in1, in2, in3, control, out_1, out_2;
  int checks = 0, failures = 0;

  mux_3_2 dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {control, in3, in2, in1} = 4'(v);
      #1;
      checks++;
      if (out_1 != (control ? in2 : in1) || out_2 != (control ? in3 : in2)) begin
        failures++; $display("ctl %b in %b%b%b -> %b %b", control, in3, in2, in1, out_1, out_2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
