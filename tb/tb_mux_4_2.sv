// tb_mux_4_2 - exhaustive: for each pair select and input pattern the two outputs
// must be the selected neighbouring inputs (In1/In2, In2/In3, In3/In4, In4/In1)
// and exactly one switch control must be on.
module tb_mux_4_2;
  logic [3:0] in, c;
  logic [1:0] pair_sel;
  logic out1, out2;
  int checks = 0, failures = 0;

  mux_4_2 dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 16; v++) begin
        pair_sel = 2'(s); in = 4'(v);
        #1;
        checks++;
        if (out1 != in[s] || out2 != in[(s + 1) % 4] || !$onehot(c)) begin
          failures++; $display("sel %0d in %b -> %b %b c %b", s, in, out1, out2, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
