// tb_prbs_gen - the output must obey o(n+7) = o(n) ^ o(n+1) (x^7 + x^6 + 1),
// repeat with period 127 and visit all 127 non-zero 7-bit windows; en = 0 holds it.
module tb_prbs_gen;
  logic clk = 0, rst_n = 0, en, bit_out;
  int checks = 0, failures = 0;
  logic o [400];
  bit seen [128];

  prbs_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n, nseen;
    en = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    n = 0;
    while (n < 400) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      if (en) begin o[n] = bit_out; n++; end
      else begin
        logic b;
        b = bit_out;
        @(posedge clk); #1;
        checks++;
        if (bit_out != b) begin failures++; $display("moved while disabled"); end
        continue;
      end
      @(posedge clk);
    end
    for (int k = 0; k + 7 < 400; k++) begin
      checks++;
      if (o[k+7] != (o[k] ^ o[k+1])) begin failures++; $display("recurrence broken at %0d", k); end
    end
    for (int k = 0; k + 127 < 400; k++) begin
      checks++;
      if (o[k] != o[k+127]) begin failures++; $display("period broken at %0d", k); end
    end
    nseen = 0;
    for (int k = 0; k < 127; k++) begin
      int w;
      w = 0;
      for (int j = 0; j < 7; j++) w = w * 2 + int'(o[k+j]);
      if (!seen[w]) nseen++;
      seen[w] = 1'b1;
    end
    checks++;
    if (nseen != 127 || seen[0]) begin failures++; $display("%0d distinct windows", nseen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
