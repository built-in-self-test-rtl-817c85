// bist_ref_pkg: reference computations for the BIST testbenches, written
// independently of the RTL.
//  * Hamming positions are found by walking the counting sequence and
//    skipping powers of two.
//  * The syndrome of a frame with ones at given bit indices is the XOR of
//    their positions, with the stored field's bits XORed in, and the parity
//    of the number of ones.
//  * The MISR step is written bit by bit from P(x) = x^32+x^28+x^27+x+1.
package bist_ref_pkg;

  // Hamming position of frame bit f in a frame of fw words; 0 inside the
  // stored ECC field (bits [11:0] of word fw/2)
  function automatic int unsigned ref_position(int unsigned fw, int unsigned f);
    int unsigned p;
    int unsigned lo;
    int unsigned k;
    lo = (fw / 2) * 32;
    if (f >= lo && f < lo + 12) return 0;
    k = (f < lo) ? f : f - 12;       // index among data bits
    p = 0;
    for (int unsigned d = 0; d <= k; d++) begin
      p++;
      while ((p & (p - 1)) == 0) p++;
    end
    return p;
  endfunction

  // Syndrome {parity error, Hamming syndrome} of a frame whose only ones
  // are at bit a (position pa) and, if two, bit b (position pb)
  function automatic logic [11:0] ref_syndrome(int unsigned fw, int unsigned a, int unsigned pa,
                                               int unsigned b, int unsigned pb, bit two);
    logic [10:0] h;
    int unsigned lo;
    lo = (fw / 2) * 32;
    h  = 11'(pa);
    if (a >= lo && a < lo + 11) h ^= 11'(1 << (a - lo));
    if (two) begin
      h ^= 11'(pb);
      if (b >= lo && b < lo + 11) h ^= 11'(1 << (b - lo));
    end
    // every bit of the frame is covered by the overall parity check
    return {!two, h};
  endfunction

  function automatic logic [31:0] ref_misr(logic [31:0] q, logic [31:0] d);
    logic [31:0] n;
    for (int k = 0; k < 32; k++) begin
      n[k] = ((k == 0) ? 1'b0 : q[k-1]) ^ d[k];
      if (k == 0 || k == 1 || k == 27 || k == 28) n[k] ^= q[31];
    end
    return n;
  endfunction

endpackage
