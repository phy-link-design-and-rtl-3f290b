// deserializer - 1:WIDTH deserializer for the three sampling phases of the 3TS CDR.
//
// The three samplers (data clock Iclk and the two edge-zone clocks Q1clk, Q2clk)
// each deliver one sample per unit interval on `clk`. Each stream is shifted into
// its own WIDTH-bit register; every WIDTH samples the three words are copied to the
// outputs together with a one-cycle `word_valid` strobe, which stands for the edge
// of the low-rate system clock (one WIDTH-th of the bit rate) that the rest of the
// CDR controller works on. Bit 0 of a word is the oldest sample.
//
// A 1:8 ratio follows the document's deserializer. Modelling the front end as one
// sample per clock (instead of half-rate I/Q clocks) is this design's choice.
// Lint note: bit 0 of each shift register is never read, because a word is built
// from the incoming sample and bits WIDTH-1..1 in the same cycle that the oldest
// sample would leave; the unused-bit warning is expected.
module deserializer #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             i_bit,
  input  logic             q1_bit,
  input  logic             q2_bit,
  output logic [WIDTH-1:0] i_word,
  output logic [WIDTH-1:0] q1_word,
  output logic [WIDTH-1:0] q2_word,
  output logic             word_valid
);
  localparam int CW = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] i_sh, q1_sh, q2_sh;
  logic [CW-1:0]    cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_sh       <= '0;
      q1_sh      <= '0;
      q2_sh      <= '0;
      cnt        <= '0;
      i_word     <= '0;
      q1_word    <= '0;
      q2_word    <= '0;
      word_valid <= 1'b0;
    end else begin
      // newest sample enters at the top, oldest ends at bit 0
      i_sh  <= {i_bit,  i_sh[WIDTH-1:1]};
      q1_sh <= {q1_bit, q1_sh[WIDTH-1:1]};
      q2_sh <= {q2_bit, q2_sh[WIDTH-1:1]};
      word_valid <= 1'b0;
      if (cnt == CW'(WIDTH-1)) begin
        cnt        <= '0;
        i_word     <= {i_bit,  i_sh[WIDTH-1:1]};
        q1_word    <= {q1_bit, q1_sh[WIDTH-1:1]};
        q2_word    <= {q2_bit, q2_sh[WIDTH-1:1]};
        word_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
