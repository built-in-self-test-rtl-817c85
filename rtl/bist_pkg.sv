// bist_pkg: types, constants and constant functions shared by the ICAP /
// Frame ECC built-in self-test.
//
// It holds four things:
//  * the frame geometry. A configuration frame is FRAME_WORDS 32-bit words,
//    41 words or 1312 bits in both device families. Its 12-bit ECC field
//    (11 Hamming bits and an overall parity bit) sits in the middle word.
//  * the Hamming position of every frame bit. Data bits take the counting
//    positions that are not powers of two, as in the classic parity matrix.
//    The Frame ECC mask LUT is computed from these positions.
//  * the characteristic polynomial of the 32-bit MISRs,
//    P(x) = x^32 + x^28 + x^27 + x + 1.
//  * the configuration packet words that make up the frame write and frame
//    read instruction sequences, and the layout of those words in the
//    instruction block RAM.
// The frame size, the parity-matrix rule, the polynomial and the order of
// the instruction sequences follow the document. The packet encodings
// (Type 1 headers, register and command codes), where the ECC field sits in
// the middle word, the device IDs and the frame addresses come from the
// public configuration interface of these families, not from the document.
package bist_pkg;

  typedef enum logic {VIRTEX4 = 1'b0, VIRTEX5 = 1'b1} family_e;

  localparam int unsigned WORD_W      = 32;
  localparam int unsigned STD_FRAME_WORDS = 41;          // 1312 bits
  localparam int unsigned HAM_BITS    = 11;            // Hamming bits H1..H11
  localparam int unsigned ECC_BITS    = HAM_BITS + 1;  // plus overall parity

  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [HAM_BITS-1:0] hpos_t;
  typedef logic [ECC_BITS-1:0] syndrome_t;

  // MISR feedback taps for x^28 + x^27 + x + 1 (the x^32 term is the shift out)
  localparam word_t MISR_TAPS = 32'h1800_0003;

  // ---------------------------------------------------------------------
  // Hamming positions
  // ---------------------------------------------------------------------
  // Position (1-based counting sequence) of the k-th data bit, k from 0:
  // positions that are powers of two belong to the Hamming bits.
  function automatic int unsigned data_position(int unsigned k);
    int unsigned p;
    int unsigned t;
    p = k + 1;
    t = 0;
    while ((32'd1 << t) <= p) begin
      p = p + 1;
      t = t + 1;
    end
    return p;
  endfunction

  // Index of the word that holds the stored ECC field
  function automatic int unsigned ecc_word(int unsigned fw);
    return fw / 2;
  endfunction

  // Position of frame bit f in a frame of fw words; 0 for the 12 bits of
  // the stored ECC field (bits [11:0] of the middle word), which take part
  // in no Hamming tree.
  function automatic hpos_t frame_bit_position(int unsigned fw, int unsigned f);
    int unsigned field_lo;
    field_lo = ecc_word(fw) * WORD_W;
    if (f >= field_lo && f < field_lo + ECC_BITS) return '0;
    if (f < field_lo) return hpos_t'(data_position(f));
    return hpos_t'(data_position(f - ECC_BITS));
  endfunction

  // ---------------------------------------------------------------------
  // Configuration packets
  // ---------------------------------------------------------------------
  localparam word_t DUMMY_WORD = 32'hFFFF_FFFF;
  localparam word_t SYNC_WORD  = 32'hAA99_5566;
  localparam word_t NOOP_WORD  = 32'h2000_0000;
  localparam word_t CRC_VALUE  = 32'h0000_DEFC;

  typedef enum logic [4:0] {
    REG_CRC = 5'd0, REG_FAR = 5'd1, REG_FDRI = 5'd2, REG_FDRO = 5'd3,
    REG_CMD = 5'd4, REG_CTL = 5'd5, REG_IDCODE = 5'd12
  } cfg_reg_e;

  typedef enum logic [4:0] {
    CMD_NULL = 5'd0, CMD_WCFG = 5'd1, CMD_RCFG = 5'd4, CMD_RCRC = 5'd7
  } cfg_cmd_e;

  localparam logic [1:0] OP_NOOP = 2'b00, OP_READ = 2'b01, OP_WRITE = 2'b10;

  // Type 1 packet header: [31:29]=001, [28:27] opcode, [17:13] register,
  // [10:0] word count
  function automatic word_t type1(logic [1:0] op, cfg_reg_e r, logic [10:0] cnt);
    word_t w;
    w        = '0;
    w[31:29] = 3'b001;
    w[28:27] = op;
    w[17:13] = r;
    w[10:0]  = cnt;
    return w;
  endfunction

  // Virtex-5 presents ICAP words byte-swapped relative to Virtex-4
  function automatic word_t icap_order(family_e fam, word_t w);
    return (fam == VIRTEX5) ? {w[7:0], w[15:8], w[23:16], w[31:24]} : w;
  endfunction

  // Device ID written to the IDCODE register (XC4VFX12 / XC5VLX30T)
  function automatic word_t default_device_id(family_e fam);
    return (fam == VIRTEX5) ? 32'h02A5_6093 : 32'h01E5_8093;
  endfunction

  // Target frame: leftmost I/O column, bottom half, first row, minor 0.
  // Virtex-4 FAR: top/bottom in bit 22; Virtex-5 FAR: top/bottom in bit 20.
  function automatic word_t default_frame_addr(family_e fam);
    return (fam == VIRTEX5) ? 32'h0010_0000 : 32'h0040_0000;
  endfunction

  // ---------------------------------------------------------------------
  // Instruction ROM layout (all lengths depend on the frame size)
  // ---------------------------------------------------------------------
  //  PRE : dummy, sync, NOOP                              (once per run)
  //  WH  : write header up to the FDRI packet header      (per pattern)
  //        -> then FRAME_WORDS words from the TPG
  //  WT  : FRAME_WORDS pad words, 2 NOOPs, CRC packet     (per pattern)
  //  RH  : read header up to the FDRO packet header       (per pattern)
  //        -> then the read window
  //  RT  : 2 NOOPs                                        (per pattern)
  localparam int unsigned PRE_LEN = 3;
  localparam int unsigned WH_LEN  = 9;
  localparam int unsigned RH_LEN  = 5;
  localparam int unsigned RT_LEN  = 2;

  function automatic int unsigned wt_len(int unsigned fw);  return fw + 4; endfunction
  function automatic int unsigned pre_base();               return 0; endfunction
  function automatic int unsigned wh_base();                return PRE_LEN; endfunction
  function automatic int unsigned wt_base();                return PRE_LEN + WH_LEN; endfunction
  function automatic int unsigned rh_base(int unsigned fw); return wt_base() + wt_len(fw); endfunction
  function automatic int unsigned rt_base(int unsigned fw); return rh_base(fw) + RH_LEN; endfunction
  function automatic int unsigned rom_used(int unsigned fw); return rt_base(fw) + RT_LEN; endfunction

  // Clock cycles per test pattern: every instruction word, every TPG word
  // and the read window take one cycle each.
  function automatic int unsigned pattern_cycles(int unsigned fw, int unsigned rd_win);
    return WH_LEN + fw + wt_len(fw) + RH_LEN + rd_win + RT_LEN;
  endfunction

  // Number of test patterns for a parity generator with n inputs:
  // all single ones plus all pairs of ones, (n^2 + n) / 2.
  function automatic longint unsigned num_patterns(int unsigned n);
    return (longint'(n) * longint'(n) + longint'(n)) / 2;
  endfunction

  // Content of one instruction ROM word
  function automatic word_t rom_word(int unsigned fw, int unsigned a,
                                     word_t device_id, word_t frame_addr);
    int unsigned o;
    if (a < wh_base()) begin
      case (a)
        0:       return DUMMY_WORD;
        1:       return SYNC_WORD;
        default: return NOOP_WORD;
      endcase
    end
    if (a < wt_base()) begin
      o = a - wh_base();
      case (o)
        0:       return type1(OP_WRITE, REG_CMD, 1);
        1:       return word_t'(CMD_RCRC);
        2:       return type1(OP_WRITE, REG_IDCODE, 1);
        3:       return device_id;
        4:       return type1(OP_WRITE, REG_CMD, 1);
        5:       return word_t'(CMD_WCFG);
        6:       return type1(OP_WRITE, REG_FAR, 1);
        7:       return frame_addr;
        default: return type1(OP_WRITE, REG_FDRI, 11'(2 * fw));
      endcase
    end
    if (a < rh_base(fw)) begin
      o = a - wt_base();
      if (o < fw)     return '0;           // pad frame
      if (o < fw + 2) return NOOP_WORD;
      if (o == fw + 2) return type1(OP_WRITE, REG_CRC, 1);
      return CRC_VALUE;
    end
    if (a < rt_base(fw)) begin
      o = a - rh_base(fw);
      case (o)
        0:       return type1(OP_WRITE, REG_CMD, 1);
        1:       return word_t'(CMD_RCFG);
        2:       return type1(OP_WRITE, REG_FAR, 1);
        3:       return frame_addr;
        default: return type1(OP_READ, REG_FDRO, 11'(2 * fw));
      endcase
    end
    if (a < rom_used(fw)) return NOOP_WORD;
    return '0;
  endfunction

endpackage
