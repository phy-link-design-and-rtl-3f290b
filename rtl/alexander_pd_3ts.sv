// alexander_pd_3ts - modified Alexander phase detector of the three-times-sampling CDR.
//
// Every unit interval k is sampled three times: I(k) near the data centre, and
// Q1(k), Q2(k) close together around the expected data edge between I(k) and
// I(k+1) (Q1 first). From one word of samples the detector returns one of four
// decisions:
//   early  (+1)  sum over k of (I(k+1)^Q2(k)) - (I(k+1)^Q2(k+1)) is positive
//   late   (-1)  that sum is negative
//   none   ( 0)  the sum is zero
//   aligned(-2)  every data transition in the word falls between Q1 and Q2
// The early/late sum is the document's; the k = -1 term uses the last Q2 sample
// of the previous word (q2_prev). The document gives the aligned measure as the
// count of Q1^Q2 but not its test; here it is aligned when that count equals the
// number of transitions and there is at least one transition (design choice).
// Purely combinational; the caller registers the result.
module alexander_pd_3ts
  import phy_pkg::*;
#(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] i_word,
  input  logic [WIDTH-1:0] q1_word,
  input  logic [WIDTH-1:0] q2_word,
  input  logic             q2_prev,
  output pd_state_t        state,
  output logic signed [7:0] err_sum
);
  always_comb begin
    logic signed [7:0] e;
    logic              trans, zone, ok;
    int                ntrans;
    e      = '0;
    ntrans = 0;
    ok     = 1'b1;
    // early/late: terms k = -1 .. WIDTH-2
    for (int k = 0; k < WIDTH; k++) begin
      logic q2k;   // Q2(k-1)
      q2k = (k == 0) ? q2_prev : q2_word[k-1];
      e = e + 8'(signed'({1'b0, i_word[k] ^ q2k})) - 8'(signed'({1'b0, i_word[k] ^ q2_word[k]}));
    end
    // alignment zone: transitions between I(k) and I(k+1), k = 0 .. WIDTH-2
    for (int k = 0; k < WIDTH-1; k++) begin
      trans = i_word[k] ^ i_word[k+1];
      zone  = q1_word[k] ^ q2_word[k];
      if (trans) ntrans++;
      if (trans != zone) ok = 1'b0;
    end
    err_sum = e;
    if (ok && ntrans > 0)  state = PD_ALIGNED;
    else if (e > 0)        state = PD_EARLY;
    else if (e < 0)        state = PD_LATE;
    else                   state = PD_NONE;
  end
endmodule
