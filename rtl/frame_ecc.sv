// frame_ecc: sequential Hamming and overall-parity checker for one
// configuration frame, producing the Frame ECC outputs SYNDROME[11:0],
// ERROR and SYNDROMEVALID.
//
// A frame of FRAME_WORDS 32-bit words arrives one word per valid cycle, in
// order. A word counter selects, from a mask LUT, which bits of the current
// word feed each of twelve 32-input parity trees: one per Hamming bit
// H1..H11 and one for the overall parity. The masked word goes through AND
// gates and the parity trees, and twelve flip-flops accumulate the results
// across the frame. When the middle word passes, its 12-bit stored ECC field
// is captured. After the last word the accumulated bits are XORed with the
// captured field to form the syndrome.
//  * SYNDROME[10:0] is the Hamming syndrome: for a single-bit error it is
//    the position of the bit in the counting sequence.
//  * SYNDROME[11] is the overall parity error.
//  * ERROR is high when any syndrome bit is set.
// Table I of the classic SEC-DED scheme applies. A non-zero Hamming part
// with a parity error is a correctable single error. A non-zero Hamming part
// without a parity error is a double error.
//
// The structure (word counter, mask LUT, AND gates, twelve parity trees,
// twelve accumulating flip-flops, capture of the stored bits, final XOR)
// follows the document's sequential Hamming generator. This design's own
// choices:
//  * the stored field is bits [10:0] = H1..H11 and bit [11] = parity of
//    word FRAME_WORDS/2;
//  * the Hamming trees skip the whole field, and the parity tree skips only
//    the stored parity bit;
//  * the capture is an enabled flip-flop rather than a latch.
//
// Timing: word_i is sampled when word_valid_i is high. SYNDROMEVALID is high
// for exactly the one cycle after the last word of each frame. SYNDROME and
// ERROR are valid in that cycle. rst is synchronous and active high.
module frame_ecc
  import bist_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = STD_FRAME_WORDS
) (
  input  logic      clk,
  input  logic      rst,
  input  word_t     word_i,
  input  logic      word_valid_i,
  output syndrome_t syndrome_o,
  output logic      error_o,
  output logic      syndromevalid_o
);

  localparam int unsigned MID_WORD   = ecc_word(FRAME_WORDS);
  localparam int unsigned WC_W       = $clog2(FRAME_WORDS);

  // Mask LUT: for every word, one 32-bit mask per parity tree. Bit b of
  // mask h is set when frame bit 32*word+b has bit h set in its Hamming
  // position; the overall-parity mask (h = 11) covers every bit except the
  // stored parity bit itself.
  typedef logic [FRAME_WORDS-1:0][ECC_BITS-1:0][WORD_W-1:0] mask_table_t;

  function automatic mask_table_t build_mask_lut();
    mask_table_t t;
    hpos_t       p;
    for (int unsigned w = 0; w < FRAME_WORDS; w++) begin
      for (int unsigned b = 0; b < WORD_W; b++) begin
        p = frame_bit_position(FRAME_WORDS, w * WORD_W + b);
        for (int unsigned h = 0; h < HAM_BITS; h++) t[w][h][b] = p[h];
        t[w][ECC_BITS-1][b] = !(w == MID_WORD && b == ECC_BITS - 1);
      end
    end
    return t;
  endfunction

  localparam mask_table_t MASK_LUT = build_mask_lut();

  logic [WC_W-1:0]                 word_cnt;
  syndrome_t                       acc;      // cumulative parity of the trees
  syndrome_t                       stored;   // ECC field captured from the middle word
  logic [ECC_BITS-1:0][WORD_W-1:0] mask;
  syndrome_t                       contrib;

  // Mask LUT, AND gates and the twelve 32-input parity trees
  always_comb begin
    mask = MASK_LUT[word_cnt];
    for (int h = 0; h < ECC_BITS; h++) contrib[h] = ^(word_i & mask[h]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      word_cnt        <= '0;
      acc             <= '0;
      stored          <= '0;
      syndromevalid_o <= 1'b0;
    end else begin
      syndromevalid_o <= 1'b0;
      if (word_valid_i) begin
        acc <= ((word_cnt == '0) ? '0 : acc) ^ contrib;
        if (int'(word_cnt) == MID_WORD) stored <= word_i[ECC_BITS-1:0];
        if (int'(word_cnt) == FRAME_WORDS - 1) begin
          word_cnt        <= '0;
          syndromevalid_o <= 1'b1;
        end else begin
          word_cnt <= word_cnt + 1'b1;
        end
      end
    end
  end

  assign syndrome_o = acc ^ stored;
  assign error_o    = |syndrome_o;

endmodule
