// tb_deserializer - checks that every 8 samples the three words hold the last 8
// samples of each stream (oldest in bit 0) and that word_valid comes every 8 cycles.
module tb_deserializer;
  logic clk = 0, rst_n = 0;
  logic i_bit, q1_bit, q2_bit;
  logic [7:0] i_word, q1_word, q2_word;
  logic word_valid;
  int checks = 0, failures = 0;
  logic [7:0] hi, h1, h2;
  int last_valid = -1, cyc = 0;

  deserializer #(.WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_bit = 0; q1_bit = 0; q2_bit = 0; hi = 0; h1 = 0; h2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      i_bit = 1'($urandom); q1_bit = 1'($urandom); q2_bit = 1'($urandom);
      @(posedge clk);
      hi = {i_bit, hi[7:1]}; h1 = {q1_bit, h1[7:1]}; h2 = {q2_bit, h2[7:1]};
      cyc++;
      #1;
      if (word_valid) begin
        checks++;
        if (i_word != hi || q1_word != h1 || q2_word != h2) begin
          failures++;
          $display("word mismatch %h/%h %h/%h %h/%h", i_word, hi, q1_word, h1, q2_word, h2);
        end
        if (last_valid >= 0) begin
          checks++;
          if (cyc - last_valid != 8) begin failures++; $display("valid spacing %0d", cyc - last_valid); end
        end
        last_valid = cyc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
