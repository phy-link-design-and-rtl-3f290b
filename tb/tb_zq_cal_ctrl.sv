// tb_zq_cal_ctrl - impedance calibration over 135 random PVT corners with each of
// the three algorithms. The driver model: strength S = 60 (reference leg) * ref_on
// + cal_code (binary legs, LSB = 1) + 2 per linear leg; every section has a hidden
// target strength T set by the corner. match = |S - T| <= 2% of T (the +-1% voltage
// window), mode = |S - T| <= 10% of T (+-5% window); for the pull-up section the
// pad voltage is above VREF when S > T, for the two pull-down sections when S < T.
// Checks: every section ends matched in at least 90% of the runs, the stored code
// reproduces a matched strength, matched sections are not searched, and over the
// corners near nominal both hybrid searches need fewer clocks than binary.
module tb_zq_cal_ctrl;
  import phy_pkg::*;
  logic clk = 0, rst_n = 0, start, match, above, mode;
  cal_algo_t algo;
  logic [1:0] sel_line;
  logic ref_on, done;
  logic [5:0] cal_code, pcode, ncode, tcode;
  logic [2:0] lin_code, ref_save;
  logic [2:0] lin_save [3];
  logic [3:0] n_bin, n_hyb;
  logic [15:0] cycles;
  int checks = 0, failures = 0;
  real tgt [3];

  zq_cal_ctrl #(.CAL_W(6), .LIN_W(3), .SETTLE(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real strength(logic r, logic [5:0] c, logic [2:0] l);
    return (r ? 60.0 : 0.0) + real'(c) + 2.0 * real'($countones(l));
  endfunction

  // analog comparators
  always_comb begin
    real s, t;
    s = strength(ref_on, cal_code, lin_code);
    t = tgt[sel_line > 2 ? 2 : sel_line];
    match = (s - t <= 0.02 * t) && (t - s <= 0.02 * t);
    mode  = (s - t <= 0.10 * t) && (t - s <= 0.10 * t);
    above = (sel_line == 0) ? (s > t) : (s < t);
  end

  initial begin
    int cyc_near [3], matched [3], runs;
    start = 0; algo = CAL_BINARY;
    foreach (tgt[i]) tgt[i] = 60.0;
    cyc_near = '{0, 0, 0}; matched = '{0, 0, 0}; runs = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int corner = 0; corner < 135; corner++) begin
      real tc [3];
      logic near;
      near = (corner % 3) != 0;
      for (int s = 0; s < 3; s++)
        tc[s] = near ? 55.0 + real'($urandom % 1100) / 100.0 : 30.0 + real'($urandom % 9000) / 100.0;
      if (corner == 5) tc[1] = 60.0;   // already matched section
      for (int a = 0; a < 3; a++) begin
        int waitc;
        tgt = tc;
        algo = cal_algo_t'(a);
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        waitc = 0;
        while (!done && waitc < 500) begin @(negedge clk); waitc++; end
        checks++;
        if (!done) begin failures++; $display("corner %0d algo %0d: not done", corner, a); continue; end
        runs++;
        for (int s = 0; s < 3; s++) begin
          real st;
          logic [5:0] code;
          code = (s == 0) ? pcode : (s == 1) ? ncode : tcode;
          st = strength(ref_save[s], code, lin_save[s]);
          if ((st - tc[s] <= 0.02 * tc[s]) && (tc[s] - st <= 0.02 * tc[s])) matched[a]++;
        end
        if (near) cyc_near[a] += int'(cycles);
        if (corner == 5) begin
          checks++;
          if (ncode != 0 || !ref_save[1] || lin_save[1] != 0) begin
            failures++; $display("matched section was changed");
          end
        end
        checks++;
        if (int'(n_bin) + int'(n_hyb) > 3 || (a == 0 && n_hyb != 0)) begin
          failures++; $display("search counts bin %0d hyb %0d", n_bin, n_hyb);
        end
      end
    end
    $display("matched sections: binary %0d, hybrid linear %0d, hybrid RB %0d of %0d", matched[0], matched[1], matched[2], runs);
    $display("clocks over near corners: binary %0d, hybrid linear %0d, hybrid RB %0d", cyc_near[0], cyc_near[1], cyc_near[2]);
    for (int a = 0; a < 3; a++) begin
      checks++;
      if (matched[a] < (135 * 3 * 9) / 10) begin failures++; $display("algo %0d matched too rarely", a); end
    end
    checks++;
    if (cyc_near[1] >= cyc_near[0] || cyc_near[2] >= cyc_near[0]) begin
      failures++; $display("hybrid search not faster than binary");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
