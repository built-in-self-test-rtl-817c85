// tpg: test pattern generator for parity trees of unknown structure.
//
// It produces every frame with exactly one 1 (a single one walked through a
// field of zeros) and every frame with exactly two 1s: N + N(N-1)/2 =
// (N^2 + N)/2 patterns for N frame bits, which is 861,328 for a 1312-bit
// frame. Two N-bit shift registers A and B hold one 1 each at most, and N
// two-input OR gates form the pattern A | B. A word multiplexer then hands
// the pattern out 32 bits at a time. The register pair, the OR gates and the
// 64-to-1 word multiplexer follow the document.
//
// The order of the patterns is this design's own choice:
//  * A starts with its 1 in bit 0 and B empty, giving the single-one pattern.
//  * Each step loads B with A shifted up one bit, then shifts B up one bit
//    at a time. This gives the pairs (i, i+1) ... (i, N-1).
//  * When the 1 in B reaches the top bit, the next step shifts A up one bit
//    and empties B.
//  * The last pattern is the single one in bit N-1.
// A flag records whether B holds its 1, so that no wide OR over B is needed.
//
// Interface and timing:
//  * init_i loads the first pattern and step_i advances to the next one;
//    step_i is the TPG clock enable.
//  * last_o is high while the current pattern is the last.
//  * word_o is registered: it is word sel_i of the current pattern one
//    cycle after sel_i is presented.
//  * rst is synchronous and active high.
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = STD_FRAME_WORDS,
  parameter int unsigned SEL_W       = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             init_i,
  input  logic             step_i,
  input  logic [SEL_W-1:0] sel_i,
  output word_t            word_o,
  output logic             last_o
);

  localparam int unsigned N = FRAME_WORDS * WORD_W;

  logic [N-1:0] sr_a, sr_b;
  logic         b_full;
  logic [N-1:0] pattern;
  word_t        words [2**SEL_W];

  always_ff @(posedge clk) begin
    if (rst || init_i) begin
      sr_a   <= N'(1);
      sr_b   <= '0;
      b_full <= 1'b0;
    end else if (step_i) begin
      if (!b_full) begin
        if (!sr_a[N-1]) begin
          sr_b   <= {sr_a[N-2:0], 1'b0};
          b_full <= 1'b1;
        end
      end else if (sr_b[N-1]) begin
        sr_a   <= {sr_a[N-2:0], 1'b0};
        sr_b   <= '0;
        b_full <= 1'b0;
      end else begin
        sr_b <= {sr_b[N-2:0], 1'b0};
      end
    end
  end

  assign pattern = sr_a | sr_b;
  assign last_o  = !b_full && sr_a[N-1];

  // 32-bit 64-to-1 multiplexer; inputs past the end of the frame read zero
  always_comb begin
    for (int w = 0; w < 2**SEL_W; w++) begin
      words[w] = (w < FRAME_WORDS) ? pattern[w*WORD_W +: WORD_W] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) word_o <= '0;
    else     word_o <= words[sel_i];
  end

endmodule
