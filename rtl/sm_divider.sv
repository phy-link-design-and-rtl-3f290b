// sm_divider - pipelined restoring divider for 10-bit sign-magnitude numbers.
//
// quot = dividend / divisor with 8 fraction bits, format {sign, integer bit,
// 8 fraction bits}. The dividend magnitude is extended by 8 zero fraction bits
// (17 bits); each of the 17 pipeline stages brings down one dividend bit into the
// partial remainder, subtracts the divisor when the remainder is at least as
// large (quotient bit 1) or keeps it (quotient bit 0), and passes everything on.
// A final stage applies the sign and saturates quotients above 511/256; a zero
// divisor gives the largest magnitude. One result per cycle.
// The bit-serial restoring procedure is the document's; the saturation and
// divide-by-zero rules are this design's.
// Timing: quot is valid STAGES = 18 cycles after the operands.
module sm_divider
  import phy_pkg::*;
#(
  parameter int STAGES = 18
) (
  input  logic clk,
  input  logic rst_n,
  input  sm_t  dividend,
  input  sm_t  divisor,
  output sm_t  quot
);
  localparam int NB = STAGES - 1;             // quotient bits (17)

  logic [NB-1:0] dd  [NB+1];                  // remaining dividend bits
  logic [NB-1:0] qq  [NB+1];                  // quotient so far
  logic [9:0]    rr  [NB+1];                  // partial remainder (< 2*divisor)
  logic [8:0]    dv  [NB+1];                  // divisor magnitude
  logic          sg  [NB+1];

  assign dd[0] = NB'({dividend[8:0], 8'b0});
  assign qq[0] = '0;
  assign rr[0] = '0;
  assign dv[0] = divisor[8:0];
  assign sg[0] = dividend[9] ^ divisor[9];

  for (genvar s = 0; s < NB; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dd[s+1] <= '0; qq[s+1] <= '0; rr[s+1] <= '0; dv[s+1] <= '0; sg[s+1] <= 1'b0;
      end else begin
        logic [9:0] r;
        r = {rr[s][8:0], dd[s][NB-1]};        // bring down the next bit
        if (dv[s] != 0 && r >= {1'b0, dv[s]}) begin
          rr[s+1] <= r - {1'b0, dv[s]};
          qq[s+1] <= {qq[s][NB-2:0], 1'b1};
        end else begin
          rr[s+1] <= r;
          qq[s+1] <= {qq[s][NB-2:0], 1'b0};
        end
        dd[s+1] <= {dd[s][NB-2:0], 1'b0};
        dv[s+1] <= dv[s];
        sg[s+1] <= sg[s];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quot <= '0;
    end else begin
      logic [8:0] m;
      if (dv[NB] == 0 || qq[NB] > NB'(SM_MAX)) m = SM_MAX;
      else                                     m = qq[NB][8:0];
      quot <= {sg[NB] && (m != 0), m};
    end
  end
endmodule
