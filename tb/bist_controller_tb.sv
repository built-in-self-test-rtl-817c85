// bist_controller_tb: self-checking test of the BIST sequencer at its
// default sizes (41-word frame, 216-cycle read window) over K patterns.
//
// The expected issue schedule is built here from the instruction sequences:
//  * preamble words 0..2;
//  * per pattern: write header words 3..11, 41 TPG words (select 0..40),
//    pad/NOOP/CRC words 12..56, read header words 57..61, the 216-cycle
//    read window, NOOP words 62..63.
// Each cycle the block RAM address or TPG select must match the schedule,
// and one cycle later CE, WRITE and the data select must match too. A
// simple ICAP responder answers reads with BUSY low for 82 cycles after a
// short latency. The testbench also checks:
//  * the ICAP MISR enable covers the second frame only, 41 words a pattern;
//  * Start clears the MISRs and loads the TPG once;
//  * the TPG steps K-1 times and Done rises after K patterns;
//  * a pattern takes 318 cycles.
module bist_controller_tb;
  import bist_pkg::*;

  localparam int unsigned FW     = STD_FRAME_WORDS;
  localparam int unsigned RD_WIN = 216;
  localparam int unsigned K      = 4;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0, tpg_last = 1'b0, busy;
  logic [8:0] rom_addr;
  logic [5:0] tpg_sel;
  logic       tpg_init, tpg_step, data_sel, ce, wr, misr_clear, misr_en, done;
  int         checks = 0, failures = 0;

  bist_controller dut (
    .clk, .rst, .start_i(start), .tpg_last_i(tpg_last), .icap_busy_i(busy),
    .rom_addr_o(rom_addr), .tpg_sel_o(tpg_sel), .tpg_init_o(tpg_init),
    .tpg_step_o(tpg_step), .tpg_data_sel_o(data_sel), .icap_ce_o(ce),
    .icap_write_o(wr), .misr_clear_o(misr_clear), .icap_misr_en_o(misr_en),
    .done_o(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ICAP responder: after the switch to read mode, 3 busy cycles, then 82
  // words with BUSY low
  int rd_t = 0;
  always_comb busy = !(ce && !wr && rd_t >= 3 && rd_t < 3 + 2 * FW);
  always @(posedge clk) rd_t <= (ce && !wr) ? rd_t + 1 : 0;

  // expected issue schedule: kind 0 = block RAM address, 1 = TPG select, 2 = read
  int sched_kind [$];
  int sched_val  [$];
  task automatic push(int k, int v);
    sched_kind.push_back(k);
    sched_val.push_back(v);
  endtask

  int n_steps = 0, n_clear = 0, n_init = 0, n_misr = 0;
  always @(posedge clk) begin
    if (!rst && tpg_step) n_steps++;
    if (!rst && misr_clear) n_clear++;
    if (!rst && tpg_init) n_init++;
    if (!rst && misr_en) n_misr++;
  end
  always_comb tpg_last = (n_steps == K - 1);

  initial begin
    int  k_prev, v_prev;
    int  t, period_start, pat;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int a = 0; a < 3; a++) push(0, a);
    for (int p = 0; p < K; p++) begin
      for (int a = 3; a < 12; a++) push(0, a);
      for (int s = 0; s < FW; s++) push(1, s);
      for (int a = 12; a < 57; a++) push(0, a);
      for (int a = 57; a < 62; a++) push(0, a);
      for (int r = 0; r < RD_WIN; r++) push(2, 0);
      for (int a = 62; a < 64; a++) push(0, a);
    end
    checks++;
    if (sched_kind.size() != 3 + K * 318) failures++;
    start = 1'b1;                 // left high: only its rising edge matters
    while (!tpg_init) begin @(posedge clk); #1; end
    k_prev = -1;
    v_prev = 0;
    t = 0;
    pat = 0;
    period_start = 3;
    while (sched_kind.size() > 0 || k_prev >= 0) begin
      // what was issued last cycle must now be presented to the ICAP
      if (k_prev >= 0) begin
        checks++;
        if (!ce || wr !== (k_prev != 2) || data_sel !== (k_prev == 1)) begin
          failures++;
          if (failures < 5) $display("t=%0d ce=%b wr=%b sel=%b kind %0d", t, ce, wr, data_sel, k_prev);
        end
      end
      if (sched_kind.size() == 0) break;
      k_prev = sched_kind.pop_front();
      v_prev = sched_val.pop_front();
      checks++;
      if (k_prev == 0 && int'(rom_addr) != v_prev) begin
        failures++;
        if (failures < 5) $display("t=%0d addr %0d expected %0d", t, rom_addr, v_prev);
      end
      if (k_prev == 1 && int'(tpg_sel) != v_prev) begin
        failures++;
        if (failures < 5) $display("t=%0d sel %0d expected %0d", t, tpg_sel, v_prev);
      end
      @(posedge clk);
      #1;
      t++;
    end
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (!done) begin failures++; $display("Done not set"); end
    checks++;
    if (n_steps != K - 1 || n_clear != 1 || n_init != 1) failures++;
    checks++;
    if (n_misr != K * FW) begin failures++; $display("misr enables %0d", n_misr); end
    checks++;
    if (t != 3 + K * 318) failures++;
    // Done stays until a new Start
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (!done || ce) failures++;
    start = 1'b0;
    repeat (4) @(posedge clk);
    #1;
    start = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (done || n_clear != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
