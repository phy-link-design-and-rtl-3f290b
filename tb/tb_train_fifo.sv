// tb_train_fifo - random writes and reads against a queue model; checks read
// data, full and empty, and that writes when full and reads when empty are ignored.
module tb_train_fifo;
  logic clk = 0, rst_n = 0, wr_en, rd_en, full, empty;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [7:0] q [$];

  train_fifo #(.DEPTH(32), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      @(negedge clk);
      checks++;
      if (full != (q.size() == 32) || empty != (q.size() == 0)) begin
        failures++; $display("flags full %b empty %b size %0d", full, empty, q.size());
      end
      if (!empty && q.size() > 0) begin
        checks++;
        if (rdata != q[0]) begin failures++; $display("rdata %h expected %h", rdata, q[0]); end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      bias = ((i / 500) % 2) ? 30 : 70;   // alternate filling and draining
      wr_en = ($urandom % 100) < bias;
      rd_en = ($urandom % 100) < (100 - bias);
      wdata = 8'($urandom);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && q.size() < 32 + (rd_en ? 1 : 0) && !full) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full %0d empty %0d", n_full, n_empty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
