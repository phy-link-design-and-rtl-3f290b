// tb_sm_mult - random and corner operands through the 3-stage sign-magnitude
// multiplier, checked bit-exactly against an integer model of the algorithm
// (pre-shift of operands >= 1.0, 8x8 product, shift back, saturate at 511) and
// loosely against the exact product (error below 2% of full scale + 2 LSB).
module tb_sm_mult;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0;
  sm_t a, b, y;
  int checks = 0, failures = 0;
  sm_t exp_q [$];

  sm_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic sm_t model(sm_t x, sm_t z);
    int ma, mb, sh, p;
    ma = x[8:0]; mb = z[8:0]; sh = 0;
    if (ma >= 256) begin ma = ma / 2; sh++; end
    if (mb >= 256) begin mb = mb / 2; sh++; end
    p = (ma * mb * (1 << sh)) / 256;
    if (p > 511) p = 511;
    return {(x[9] ^ z[9]) && p != 0, 9'(p)};
  endfunction

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      case (i % 10)
        0: begin a = {1'($urandom), 9'd511}; b = {1'($urandom), 9'd511}; end
        1: begin a = {1'($urandom), 9'd0};   b = 10'($urandom); end
        2: begin a = {1'($urandom), 9'd256}; b = 10'($urandom); end
        default: begin a = 10'($urandom); b = 10'($urandom); end
      endcase
      exp_q.push_back(model(a, b));
      begin
        int ex, got;
        ex = (int'(a[8:0]) * int'(b[8:0])) / 256;
        if (ex > 511) ex = 511;
        got = model(a, b) & 10'h1FF;
        checks++;
        if (got - ex > 12 || ex - got > 12) begin
          failures++; $display("algorithm error too large: %0d*%0d -> %0d vs %0d", a[8:0], b[8:0], got, ex);
        end
      end
      @(posedge clk); #1;
      if (exp_q.size() == 3) begin
        sm_t e;
        e = exp_q.pop_front();
        checks++;
        // y now holds the result of the operands three samples back
        if (y !== e) begin failures++; $display("step %0d y %h expected %h", i, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
