// misr: 32-bit multiple input signature register with internal feedback.
//
// Each enabled cycle the register shifts up one bit. The bit shifted out of
// bit 31 is fed back into bits 28, 27, 1 and 0, and the 32-bit input is
// XORed in. This is a Galois-form LFSR with the primitive characteristic
// polynomial P(x) = x^32 + x^28 + x^27 + x + 1 given in the document. A
// narrower response, such as the 12-bit Frame ECC syndrome, is connected to
// the low bits with the rest tied to zero. The aliasing probability is
// about 2^-32.
//
// In scan mode the register is instead a plain 32-bit shift register,
// scan_i into bit 0 and scan_o from bit 31. Several MISRs chain into one
// scan path, used to load and retrieve signatures. Scan mode and the scan
// port follow the document; the shift is taken one bit per cycle in which
// scan_shift_i is high (a strobe derived from the scan clock), which is this
// design's choice.
//
// Priority: rst or clear_i (synchronous, active high) zeroes the register,
// then scan mode, then compaction when en_i is high.
module misr
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  clear_i,
  input  logic  en_i,
  input  word_t din_i,
  input  logic  scan_mode_i,
  input  logic  scan_shift_i,
  input  logic  scan_i,
  output word_t sig_o,
  output logic  scan_o
);

  word_t q;

  always_ff @(posedge clk) begin
    if (rst || clear_i) begin
      q <= '0;
    end else if (scan_mode_i) begin
      if (scan_shift_i) q <= {q[WORD_W-2:0], scan_i};
    end else if (en_i) begin
      q <= {q[WORD_W-2:0], 1'b0} ^ (q[WORD_W-1] ? MISR_TAPS : '0) ^ din_i;
    end
  end

  assign sig_o  = q;
  assign scan_o = q[WORD_W-1];

endmodule
