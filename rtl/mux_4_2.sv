// mux_4_2 - selects one adjacent pair of the four reference phases.
//
// The four reference clocks In1..In4 each have two switches, one to Out1 and one
// to Out2. pair_sel = 0..3 passes (In1,In2), (In2,In3), (In3,In4) or (In4,In1).
// The control logic keeps the switch controls c0..c3 one-hot, so exactly one
// upper and one lower switch are closed. In silicon the switches are transmission
// gates with dummy loads; here they are logic. Purely combinational.
module mux_4_2 (
  input  logic [3:0] in,        // in[0] = In1 .. in[3] = In4
  input  logic [1:0] pair_sel,
  output logic [3:0] c,         // one-hot switch controls
  output logic       out1,
  output logic       out2
);
  logic [3:0] in_rot;           // in_rot[n] = input feeding Out2 when c[n] is set
  assign in_rot = {in[0], in[3:1]};
  assign c      = 4'b0001 << pair_sel;
  assign out1   = |(in & c);
  assign out2   = |(in_rot & c);

  a_onehot: assert final ($onehot(c));
endmodule
