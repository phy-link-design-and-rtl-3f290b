// prbs_gen - pseudo-random training pattern generator (algorithmic pattern
// generator) for the equalizer trainings.
//
// Fibonacci LFSR for x^7 + x^6 + 1 (PRBS7, period 127). The polynomial is this
// design's choice. One bit per enabled cycle; bit_out is the register's MSB.
module prbs_gen #(
  parameter int        ORDER = 7,
  parameter logic [6:0] SEED = 7'h7F
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_out
);
  logic [ORDER-1:0] lfsr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr <= ORDER'(SEED);
    else if (en) lfsr <= {lfsr[ORDER-2:0], lfsr[ORDER-1] ^ lfsr[ORDER-2]};
  end
  assign bit_out = lfsr[ORDER-1];
endmodule
