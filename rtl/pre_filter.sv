// pre_filter - programmable accumulator ("Pre-filter") of the PI2 CDR.
//
// Each valid phase-detector decision (+1 early, -1 late, 0 none) is added to a
// signed accumulator. When the accumulator reaches +thresh or -thresh a one-cycle
// carry of +1 or -1 is emitted and the accumulator restarts from zero. A larger
// threshold (the document uses Pre_filt = 2 or 8) lowers how often the phase moves.
// Clearing after each carry is this design's reading of the text.
// Timing: carry is registered, one cycle after the decision that causes it.
module pre_filter #(
  parameter int PRE_FILT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic signed [1:0] pd_dir,
  input  logic [3:0]        thresh,     // run-time threshold; 0 selects PRE_FILT
  output logic signed [1:0] carry
);
  logic signed [5:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      carry <= '0;
    end else begin
      carry <= '0;
      if (en) begin
        logic signed [5:0] nxt;
        logic signed [5:0] th;
        th  = (thresh == 4'd0) ? 6'(PRE_FILT) : 6'(signed'({2'b00, thresh}));
        nxt = acc + 6'(pd_dir);
        if (nxt >= th) begin
          carry <= 2'sd1;
          acc   <= '0;
        end else if (nxt <= -th) begin
          carry <= -2'sd1;
          acc   <= '0;
        end else begin
          acc <= nxt;
        end
      end
    end
  end
endmodule
