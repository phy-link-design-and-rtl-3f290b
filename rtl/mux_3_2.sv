// mux_3_2 - forwards two of three phases to the next interpolator stage.
//
// control = 0 passes (In1, In2), control = 1 passes (In2, In3); the complementary
// !Control pin of the transmission-gate version is the inverse of `control`. The
// mapping of control values to input pairs is this design's choice. Combinational.
module mux_3_2 (
  input  logic in1,
  input  logic in2,
  input  logic in3,
  input  logic control,
  output logic out_1,
  output logic out_2
);
  assign out_1 = control ? in2 : in1;
  assign out_2 = control ? in3 : in2;
endmodule
