// frame_ecc_tb: self-checking test of the sequential Frame ECC checker.
//
// The testbench builds frames with a correct ECC field and then leaves them
// clean or flips one or two random bits. Some frames are fully random
// instead. The expected syndrome comes from a reference that walks the
// counting sequence itself: data bits take the positions that are not
// powers of two, and the stored field is bits [11:0] of the middle word.
// The testbench checks:
//  * SYNDROME, ERROR and the Table I classification (none, single, double);
//  * that SYNDROMEVALID comes exactly one cycle after the last word, once
//    per frame.
// Words are fed with random idle gaps between them.
module frame_ecc_tb;
  import bist_pkg::*;

  localparam int unsigned FW    = STD_FRAME_WORDS;
  localparam int unsigned FBITS = FW * WORD_W;
  localparam int unsigned MID   = FW / 2;

  logic      clk = 1'b0;
  logic      rst = 1'b1;
  word_t     word;
  logic      word_valid;
  syndrome_t syndrome;
  logic      error, svalid;

  int checks = 0, failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0;

  frame_ecc #(.FRAME_WORDS(FW)) dut (
    .clk, .rst, .word_i(word), .word_valid_i(word_valid),
    .syndrome_o(syndrome), .error_o(error), .syndromevalid_o(svalid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned pos_ref [FBITS];
  logic [FBITS-1:0] frame;

  function automatic bit is_pow2(int unsigned p);
    return (p & (p - 1)) == 0;
  endfunction

  function automatic bit in_field(int unsigned f);
    return f >= MID * 32 && f < MID * 32 + 12;
  endfunction

  task automatic build_positions();
    int unsigned p = 1;
    for (int unsigned f = 0; f < FBITS; f++) begin
      if (in_field(f)) begin
        pos_ref[f] = 0;
      end else begin
        while (is_pow2(p)) p++;
        pos_ref[f] = p;
        p++;
      end
    end
  endtask

  // Expected 12-bit syndrome of an arbitrary frame
  function automatic syndrome_t ref_syndrome(logic [FBITS-1:0] fr);
    logic [10:0] h = '0;
    logic        par = 1'b0;
    for (int unsigned f = 0; f < FBITS; f++) begin
      if (fr[f]) begin
        h   ^= pos_ref[f][10:0];
        par ^= 1'b1;
      end
    end
    h ^= fr[MID*32 +: 11];
    return {par, h};
  endfunction

  // Fill the ECC field so that the frame is error free
  task automatic encode(inout logic [FBITS-1:0] fr);
    syndrome_t s;
    fr[MID*32 +: 12] = '0;
    s = ref_syndrome(fr);                 // Hamming of data, parity of data
    fr[MID*32 +: 11] = s[10:0];
    // overall parity covers data and Hamming bits
    fr[MID*32 + 11] = s[11] ^ (^s[10:0]);
  endtask

  task automatic send_frame(logic [FBITS-1:0] fr, syndrome_t exp, int kind);
    for (int w = 0; w < FW; w++) begin
      while ($urandom_range(3) == 0) begin
        word_valid <= 1'b0;
        word       <= $urandom;
        @(posedge clk);
        #1;
        checks++;
        if (svalid) begin failures++; $display("unexpected SYNDROMEVALID"); end
      end
      word       <= fr[w*32 +: 32];
      word_valid <= 1'b1;
      @(posedge clk);
      #1;
      // SYNDROMEVALID follows the last word by one cycle, never another word
      checks++;
      if (svalid !== (w == FW - 1)) begin
        failures++;
        $display("SYNDROMEVALID=%0b after word %0d", svalid, w);
      end
    end
    checks++;
    if (syndrome !== exp) begin
      failures++;
      $display("syndrome %h expected %h (kind %0d)", syndrome, exp, kind);
    end
    checks++;
    if (error !== (exp != 0)) begin failures++; $display("ERROR wrong"); end
    // Table I classification
    checks++;
    case (kind)
      0: if (syndrome != 0) failures++;
      1: if (!(syndrome[11] && syndrome[10:0] != 0)) begin failures++; $display("not SEC"); end
      2: if (!(!syndrome[11] && syndrome[10:0] != 0)) begin failures++; $display("not DED"); end
      default: ;
    endcase
  endtask

  initial begin
    int unsigned a, b;
    word       = '0;
    word_valid = 1'b0;
    build_positions();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // sanity of the reference against the printed parity matrix: D1 at 3, D4 at 7, D5 at 9
    checks++;
    if (pos_ref[0] != 3 || pos_ref[3] != 7 || pos_ref[4] != 9) failures++;
    for (int n = 0; n < 300; n++) begin
      for (int w = 0; w < FW; w++) frame[w*32 +: 32] = $urandom;
      encode(frame);
      case (n % 4)
        0: begin send_frame(frame, '0, 0); n_clean++; end
        1: begin
          a = $urandom_range(FBITS - 1);
          frame[a] = ~frame[a];
          send_frame(frame, ref_syndrome(frame), in_field(a) ? 3 : 1);
          n_single++;
          // single data-bit error: syndrome is its position
          if (!in_field(a)) begin
            checks++;
            if (syndrome[10:0] != pos_ref[a][10:0]) failures++;
          end
        end
        2: begin
          a = $urandom_range(FBITS - 1);
          do b = $urandom_range(FBITS - 1); while (b == a);
          frame[a] = ~frame[a];
          frame[b] = ~frame[b];
          send_frame(frame, ref_syndrome(frame),
                     (in_field(a) || in_field(b)) ? 3 : 2);
          n_double++;
        end
        default: begin
          for (int w = 0; w < FW; w++) frame[w*32 +: 32] = $urandom;
          send_frame(frame, ref_syndrome(frame), 3);
        end
      endcase
    end
    checks++;
    if (n_clean == 0 || n_single == 0 || n_double == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
