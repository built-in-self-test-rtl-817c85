// frame_ecc_bist_v5_full_tb: one complete BIST run of the Virtex-5 variant
// at full size: 1312-bit frames, 861,328 test patterns, 318 cycles per
// pattern, byte-swapped ICAP words, the Virtex-5 device ID and frame
// address. Only FAMILY is set; every other parameter keeps its default.
//
// Checks:
//  * every frame written into the ICAP model (which undoes the byte swap)
//    is the next expected pattern;
//  * every pattern period is 318 cycles, and Done rises after the expected
//    273,902,304 cycles of patterns plus preamble and Start synchronisation;
//  * no frame write is rejected, so the device ID in the instruction RAM
//    matches the Virtex-5 part;
//  * the signatures scanned out equal a reference compaction computed in
//    the testbench, with the ICAP words taken in Virtex-5 byte order;
//  * TDO is 1 for TDI = 0, since these signatures differ from the silicon
//    values the defaults hold, and TDO is 1 for TDI = 1.
module frame_ecc_bist_v5_full_tb;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  localparam int unsigned FW     = STD_FRAME_WORDS;
  localparam int unsigned N      = FW * 32;
  localparam longint      NPAT   = 861328;
  localparam longint      PERIOD = 318;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tdi = 1'b0, start = 1'b0, scan_in = 1'b0, scan_mode = 1'b0, scan_clk = 1'b0;
  logic tdo, done, scan_out;
  word_t icap_i, icap_o, cfg_word;
  logic icap_ce, icap_wr, icap_busy, cfg_valid;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (280000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  frame_ecc_bist #(.FAMILY(VIRTEX5)) dut (
    .Clock(clk), .Reset(rst), .TDI(tdi), .Start(start), .Scan_In(scan_in),
    .Scan_Mode(scan_mode), .Scan_Clock(scan_clk), .TDO(tdo), .Done(done),
    .Scan_Out(scan_out), .icap_i_o(icap_i), .icap_ce_o(icap_ce),
    .icap_write_o(icap_wr), .icap_o_i(icap_o), .icap_busy_i(icap_busy),
    .cfg_word_i(cfg_word), .cfg_word_valid_i(cfg_valid));
  icap_model #(.FAMILY(VIRTEX5)) icap (
    .clk, .ce(icap_ce), .write(icap_wr), .din(icap_i), .dout(icap_o),
    .busy(icap_busy), .cfg_word(cfg_word), .cfg_word_valid(cfg_valid));

  int unsigned pos_tab [N];
  int unsigned exp_a = 0, exp_b = 0;
  bit          exp_two = 1'b0;
  int unsigned last_frames = 0;
  longint      n_bad_frames = 0;
  longint      cyc = 0, last_fdri = -1, n_periods = 0, n_period_bad = 0;

  always @(posedge clk) begin
    cyc++;
    if (icap.frames_written != last_frames) begin
      last_frames = icap.frames_written;
      for (int w = 0; w < FW; w++) begin
        word_t ex;
        ex = '0;
        if (exp_a / 32 == w) ex[exp_a % 32] = 1'b1;
        if (exp_two && exp_b / 32 == w) ex[exp_b % 32] = 1'b1;
        if (icap.frame_mem[w] !== ex) n_bad_frames++;
      end
      if (!exp_two) begin
        if (exp_a + 1 < N) begin exp_b = exp_a + 1; exp_two = 1'b1; end
        else exp_a = N;
      end else if (exp_b + 1 < N) exp_b++;
      else begin exp_a++; exp_two = 1'b0; end
    end
    if (icap_ce && icap_wr && icap_i == icap_order(VIRTEX5, type1(OP_WRITE, REG_FDRI, 11'(2 * FW)))) begin
      if (last_fdri >= 0) begin
        n_periods++;
        if (cyc - last_fdri != PERIOD) n_period_bad++;
      end
      last_fdri = cyc;
    end
  end

  initial begin
    word_t       e_ref, i_ref;
    logic [63:0] sig;
    longint      t0, t1;
    for (int f = 0; f < N; f++) pos_tab[f] = ref_position(FW, f);
    // reference signatures
    e_ref = '0;
    i_ref = '0;
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned k = 0; k < N - a; k++) begin
        int unsigned b;
        bit two;
        two   = (k != 0);
        b     = a + k;
        e_ref = ref_misr(e_ref, 32'h0);
        e_ref = ref_misr(e_ref, {20'h0, ref_syndrome(FW, a, pos_tab[a], b, pos_tab[b], two)});
        for (int unsigned w = 0; w < FW; w++) begin
          word_t d;
          d = '0;
          if (a / 32 == w) d[a % 32] = 1'b1;
          if (two && b / 32 == w) d[b % 32] = 1'b1;
          i_ref = ref_misr(i_ref, icap_order(VIRTEX5, d));
        end
      end
    end
    checks++;
    if (num_patterns(N) != NPAT) failures++;

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    t0 = cyc;
    start <= 1'b1;                       // Start left asserted, as when tied high
    while (!done) @(posedge clk);
    t1 = cyc;
    #1;
    $display("BIST run: %0d cycles, %0d frames written", t1 - t0, icap.frames_written);
    checks++;
    if (t1 - t0 < 3 + NPAT * PERIOD || t1 - t0 > 3 + NPAT * PERIOD + 4) failures++;
    checks++;
    if (NPAT * PERIOD != 273902304) failures++;
    checks++;
    if (icap.frames_written != NPAT) failures++;
    checks++;
    if (n_bad_frames != 0) begin failures++; $display("%0d bad frame words", n_bad_frames); end
    checks++;
    if (n_periods != NPAT - 1 || n_period_bad != 0) begin
      failures++;
      $display("periods %0d, wrong %0d", n_periods, n_period_bad);
    end
    checks++;
    if (icap.words_read != NPAT * 2 * FW) failures++;
    checks++;
    if (icap.rejected_writes != 0) failures++;
    // pass/fail output
    tdi <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (tdo !== 1'b1) failures++;
    tdi <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (tdo !== 1'b1) failures++;
    // scan the signatures out: ICAP MISR first, then Frame ECC MISR
    scan_mode <= 1'b1;
    repeat (4) @(posedge clk);
    for (int i = 63; i >= 0; i--) begin
      sig[i] = scan_out;
      repeat (2) @(posedge clk);
      scan_clk <= 1'b1;
      repeat (4) @(posedge clk);
      scan_clk <= 1'b0;
      repeat (4) @(posedge clk);
    end
    $display("signatures: Frame ECC %h (reference %h), ICAP %h (reference %h)",
             sig[31:0], e_ref, sig[63:32], i_ref);
    checks++;
    if (sig[31:0] !== e_ref) failures++;
    checks++;
    if (sig[63:32] !== i_ref) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
