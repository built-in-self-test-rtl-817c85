// instr_rom: instruction block RAM of the BIST, 512 words of 32 bits, read
// synchronously like a block RAM port (data one cycle after the address).
//
// It holds the configuration packet words that the ICAP receives, in the
// layout given by bist_pkg:
//  * a once-per-run preamble: dummy word, sync word, NOOP;
//  * the frame write sequence: reset CRC, write the device ID to IDCODE,
//    WCFG command, write FAR, FDRI header for two frames of words;
//  * after the test pattern words, which come from the TPG: one pad frame
//    of zero words, two NOOPs and a write of 0x0000DEFC to CRC;
//  * the frame read sequence: RCFG command, write FAR, FDRO read header for
//    two frames;
//  * two trailing NOOPs.
// The content is computed at elaboration from the frame size, the device ID
// and the target frame address. It uses about 64 of the 512 words; the rest
// read zero. The depth, the width and the order of the sequences follow the
// document. The packet encodings, the device ID and the frame address
// defaults are this design's (public configuration interface values).
module instr_rom
  import bist_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = STD_FRAME_WORDS,
  parameter int unsigned DEPTH       = 512,
  parameter word_t       DEVICE_ID   = default_device_id(VIRTEX4),
  parameter word_t       FRAME_ADDR  = default_frame_addr(VIRTEX4),
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_i,
  output word_t         data_o
);

  word_t mem [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = rom_word(FRAME_WORDS, a, DEVICE_ID, FRAME_ADDR);
  end

  always_ff @(posedge clk) data_o <= mem[addr_i];

endmodule
