// frame_ecc_bist_tb: end-to-end test of the BIST with the ICAP model, at a
// reduced frame of FW words. Two systems run side by side, one Virtex-4 and
// one Virtex-5, the latter with byte-swapped ICAP words.
//
// Checks:
//  * every frame the ICAP model receives is the next pattern of the
//    expected sequence (each single one, then its pairs with higher bits);
//  * every read-back returns all 2*FW words inside the read window;
//  * the pattern period is the length of the instruction sequences plus the
//    read window, and the whole run takes the expected number of cycles;
//  * the signatures scanned out after Done equal a reference compaction of
//    the expected ICAP words and syndromes;
//  * TDO is 1 with the document's good signatures, which this model does
//    not reproduce;
//  * after the reference signatures are scanned in, TDO follows TDI, and a
//    corrupted signature forces TDO to 1;
//  * toggling Start clears the MISRs and reruns the BIST with the same
//    result.
// Each mechanism (single and double patterns, SEC- and DED-type syndromes,
// discarded pad frames, TPG/block RAM switching, restart, scan load and
// unload, pass and fail) is counted. One that never happened is a failure.
module frame_ecc_bist_tb;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  localparam int unsigned FW     = 3;
  localparam int unsigned N      = FW * 32;
  localparam int unsigned RD_WIN = 16;
  localparam longint     NPAT    = (longint'(N) * N + N) / 2;
  localparam longint     PERIOD  = (9 + FW) + (FW + 4) + 5 + RD_WIN + 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tdi = 1'b0, start = 1'b0, scan_in = 1'b0, scan_mode = 1'b0, scan_clk = 1'b0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- two systems: Virtex-4 (index 0) and Virtex-5 (index 1)
  logic  tdo [2], done [2], scan_out [2];
  word_t icap_i [2], icap_o [2], cfg_word [2];
  logic  icap_ce [2], icap_wr [2], icap_busy [2], cfg_valid [2];

  frame_ecc_bist #(.FAMILY(VIRTEX4), .FRAME_WORDS(FW), .RD_WIN(RD_WIN)) dut4 (
    .Clock(clk), .Reset(rst), .TDI(tdi), .Start(start), .Scan_In(scan_in),
    .Scan_Mode(scan_mode), .Scan_Clock(scan_clk), .TDO(tdo[0]), .Done(done[0]),
    .Scan_Out(scan_out[0]), .icap_i_o(icap_i[0]), .icap_ce_o(icap_ce[0]),
    .icap_write_o(icap_wr[0]), .icap_o_i(icap_o[0]), .icap_busy_i(icap_busy[0]),
    .cfg_word_i(cfg_word[0]), .cfg_word_valid_i(cfg_valid[0]));
  icap_model #(.FAMILY(VIRTEX4), .FRAME_WORDS(FW)) icap4 (
    .clk, .ce(icap_ce[0]), .write(icap_wr[0]), .din(icap_i[0]), .dout(icap_o[0]),
    .busy(icap_busy[0]), .cfg_word(cfg_word[0]), .cfg_word_valid(cfg_valid[0]));

  frame_ecc_bist #(.FAMILY(VIRTEX5), .FRAME_WORDS(FW), .RD_WIN(RD_WIN)) dut5 (
    .Clock(clk), .Reset(rst), .TDI(tdi), .Start(start), .Scan_In(scan_in),
    .Scan_Mode(scan_mode), .Scan_Clock(scan_clk), .TDO(tdo[1]), .Done(done[1]),
    .Scan_Out(scan_out[1]), .icap_i_o(icap_i[1]), .icap_ce_o(icap_ce[1]),
    .icap_write_o(icap_wr[1]), .icap_o_i(icap_o[1]), .icap_busy_i(icap_busy[1]),
    .cfg_word_i(cfg_word[1]), .cfg_word_valid_i(cfg_valid[1]));
  icap_model #(.FAMILY(VIRTEX5), .FRAME_WORDS(FW)) icap5 (
    .clk, .ce(icap_ce[1]), .write(icap_wr[1]), .din(icap_i[1]), .dout(icap_o[1]),
    .busy(icap_busy[1]), .cfg_word(cfg_word[1]), .cfg_word_valid(cfg_valid[1]));

  // ---------------- mechanism counters
  longint n_single = 0, n_pair = 0, n_sec = 0, n_ded = 0, n_pad_discard = 0;
  longint n_mux_switch = 0, n_restart = 0, n_scan_out = 0, n_scan_in = 0;
  longint n_pass = 0, n_fail = 0, n_done = 0;

  int unsigned pos_tab [N];

  // expected pattern sequence, tracked as frames arrive at the Virtex-4 model
  int unsigned exp_a = 0, exp_b = 0;
  bit          exp_two = 1'b0;
  int unsigned last_frames = 0;
  int unsigned last_reads  = 0;

  task automatic advance_expected();
    if (!exp_two) begin
      if (exp_a + 1 < N) begin exp_b = exp_a + 1; exp_two = 1'b1; end
      else exp_a = N;                                 // past the end
    end else if (exp_b + 1 < N) begin
      exp_b++;
    end else begin
      exp_a++;
      exp_two = 1'b0;
    end
  endtask

  always @(posedge clk) begin
    // pattern written into configuration memory (Virtex-4 system)
    if (icap4.frames_written != last_frames) begin
      logic [N-1:0] fr;
      logic [N-1:0] ex;
      last_frames = icap4.frames_written;
      for (int w = 0; w < FW; w++) fr[w*32 +: 32] = icap4.frame_mem[w];
      ex = '0;
      if (exp_a < N) ex[exp_a] = 1'b1;
      if (exp_two) ex[exp_b] = 1'b1;
      checks++;
      if (fr !== ex) begin
        failures++;
        if (failures < 5) $display("frame %0d: got %h expected %h", last_frames, fr, ex);
      end
      if (exp_two) n_pair++; else n_single++;
      advance_expected();
    end
    // Frame ECC results, classified as in Table I
    if (dut4.syndromevalid) begin
      if (dut4.syndrome[11] && dut4.syndrome[10:0] != 0) n_sec++;
      if (!dut4.syndrome[11] && dut4.syndrome[10:0] != 0) n_ded++;
    end
    // read-back words that the ICAP MISR does not take: the pad frame
    if (icap4.cfg_word_valid && !dut4.icap_misr_en) n_pad_discard++;
  end

  // TPG <-> block RAM switches and pattern period (header of FDRI writes)
  logic   prev_sel = 1'b0;
  longint cyc = 0, last_fdri = -1;
  longint n_period_bad = 0, n_periods = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut4.tpg_data_sel != prev_sel) n_mux_switch++;
    prev_sel = dut4.tpg_data_sel;
    if (icap_ce[0] && icap_wr[0] && icap_i[0] == type1(OP_WRITE, REG_FDRI, 11'(2 * FW))) begin
      if (last_fdri >= 0) begin
        n_periods++;
        if (cyc - last_fdri != PERIOD) n_period_bad++;
      end
      last_fdri = cyc;
    end
  end

  // ---------------- reference signatures
  function automatic void reference(family_e fam, output word_t ecc_sig, output word_t icap_sig);
    int unsigned a, b;
    logic [N-1:0] fr;
    ecc_sig  = '0;
    icap_sig = '0;
    for (a = 0; a < N; a++) begin
      for (int k = 0; k < N - a; k++) begin
        bit two;
        two = (k != 0);
        b   = a + k;
        fr  = '0;
        fr[a] = 1'b1;
        if (two) fr[b] = 1'b1;
        // pad frame syndrome (all zero), then the test frame's
        ecc_sig = ref_misr(ecc_sig, 32'h0);
        ecc_sig = ref_misr(ecc_sig, {20'h0, ref_syndrome(FW, a, pos_tab[a], b, pos_tab[b], two)});
        for (int w = 0; w < FW; w++) icap_sig = ref_misr(icap_sig, icap_order(fam, fr[w*32 +: 32]));
      end
    end
  endfunction

  // ---------------- scan helpers: 64 shifts, both systems together
  task automatic scan_shift64(input logic [63:0] in_bits, output logic [63:0] out4,
                              output logic [63:0] out5);
    scan_mode <= 1'b1;
    repeat (4) @(posedge clk);
    for (int i = 63; i >= 0; i--) begin
      out4[i] = scan_out[0];
      out5[i] = scan_out[1];
      scan_in  <= in_bits[i];
      repeat (2) @(posedge clk);
      scan_clk <= 1'b1;
      repeat (4) @(posedge clk);
      scan_clk <= 1'b0;
      repeat (4) @(posedge clk);
    end
    scan_mode <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  task automatic pulse_start();
    start <= 1'b1;
    repeat (4) @(posedge clk);
    start <= 1'b0;
  endtask

  task automatic run_and_check(input word_t e4, input word_t i4, input word_t e5, input word_t i5,
                               input bit first);
    longint t0, t1;
    logic [63:0] o4, o5;
    t0 = cyc;
    pulse_start();
    while (!(done[0] && done[1])) begin
      @(posedge clk);
      if (cyc - t0 > 2 * NPAT * PERIOD) break;
    end
    t1 = cyc;
    #1;
    n_done++;
    checks++;
    if (!(done[0] && done[1])) begin failures++; $display("Done never rose"); end
    // start synchroniser (3 cycles) + preamble + NPAT periods
    checks++;
    if (t1 - t0 < 3 + NPAT * PERIOD || t1 - t0 > 3 + NPAT * PERIOD + 4) begin
      failures++;
      $display("run took %0d cycles, expected about %0d", t1 - t0, 3 + NPAT * PERIOD);
    end
    // every read-back complete
    checks++;
    if (icap4.words_read != icap4.readbacks * 2 * FW || icap5.words_read != icap5.readbacks * 2 * FW) begin
      failures++;
      $display("incomplete read-back");
    end
    // the paper's silicon signatures are not this model's: TDO must flag it
    tdi <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (tdo[0] !== 1'b1 || tdo[1] !== 1'b1) failures++;
    else n_fail++;
    // signatures out (and the same values back in)
    scan_shift64({i4, e4}, o4, o5);
    n_scan_out++;
    checks++;
    if (o4 !== {i4, e4}) begin
      failures++;
      $display("V4 signatures icap=%h ecc=%h expected icap=%h ecc=%h", o4[63:32], o4[31:0], i4, e4);
    end
    checks++;
    if (o5 !== {i5, e5}) begin
      failures++;
      $display("V5 signatures icap=%h ecc=%h expected icap=%h ecc=%h", o5[63:32], o5[31:0], i5, e5);
    end
    if (first) $display("signatures: V4 ecc=%h icap=%h  V5 ecc=%h icap=%h", e4, i4, e5, i5);
  endtask

  initial begin
    word_t e4, i4, e5, i5;
    logic [63:0] o4, o5;
    for (int f = 0; f < N; f++) pos_tab[f] = ref_position(FW, f);
    reference(VIRTEX4, e4, i4);
    reference(VIRTEX5, e5, i5);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);

    run_and_check(e4, i4, e5, i5, 1'b1);
    checks++;
    if (icap4.frames_written != NPAT) begin failures++; $display("frames %0d", icap4.frames_written); end
    checks++;
    if (icap4.rejected_writes != 0 || icap5.rejected_writes != 0) failures++;
    checks++;
    if (n_period_bad != 0 || n_periods != NPAT - 1) begin
      failures++;
      $display("pattern period wrong %0d times in %0d", n_period_bad, n_periods);
    end

    // Scan in the Virtex-4 paper signatures: the Virtex-4 system must pass
    scan_shift64({32'hB3FF_B18B, 32'h9BC9_2CDB}, o4, o5);
    n_scan_in++;
    tdi <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (tdo[0] !== 1'b0) failures++; else n_pass++;
    checks++;
    if (tdo[1] !== 1'b1) failures++;        // wrong family's signatures
    tdi <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (tdo[0] !== 1'b1) failures++;
    // one wrong bit in the ICAP signature fails the Virtex-4 system
    scan_shift64({32'hB3FF_B18A, 32'h9BC9_2CDB}, o4, o5);
    tdi <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (tdo[0] !== 1'b1) failures++; else n_fail++;
    // what was scanned out must be what was scanned in before
    checks++;
    if (o4 !== {32'hB3FF_B18B, 32'h9BC9_2CDB}) failures++;

    // Restart: MISRs are cleared and the run reproduces its signatures
    n_restart++;
    exp_a = 0; exp_b = 0; exp_two = 1'b0;
    run_and_check(e4, i4, e5, i5, 1'b0);

    // every mechanism must have happened
    checks++; if (n_single != 2 * N)                failures++;
    checks++; if (n_pair != 2 * (NPAT - N))         failures++;
    checks++; if (n_sec == 0)                       begin failures++; $display("no SEC"); end
    checks++; if (n_ded == 0)                       begin failures++; $display("no DED"); end
    checks++; if (n_pad_discard != 2 * NPAT * FW)   begin failures++; $display("pad %0d", n_pad_discard); end
    checks++; if (n_mux_switch == 0)                failures++;
    checks++; if (n_restart == 0 || n_done != 2)    failures++;
    checks++; if (n_scan_out == 0 || n_scan_in == 0) failures++;
    checks++; if (n_pass == 0 || n_fail == 0)       failures++;
    $display("single=%0d pair=%0d sec=%0d ded=%0d pad_words=%0d mux_switches=%0d restarts=%0d pass=%0d fail=%0d",
             n_single, n_pair, n_sec, n_ded, n_pad_discard, n_mux_switch, n_restart, n_pass, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
