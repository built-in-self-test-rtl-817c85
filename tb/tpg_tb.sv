// tpg_tb: self-checking test of the test pattern generator.
//
// A 3-word instance (96 bits) is read out word by word for every pattern.
// Each frame must hold exactly one or two 1s. Every single-one pattern and
// every pair must appear exactly once, and the count must be (N^2 + N)/2.
// last_o must rise on the final pattern only. A full-size instance
// (1312 bits) is stepped through all its patterns. It is checked against
// the 861,328 patterns the formula gives, with spot checks of its words.
module tpg_tb;
  import bist_pkg::*;

  localparam int unsigned FW_S = 3;
  localparam int unsigned N_S  = FW_S * 32;
  localparam int unsigned N_L  = STD_FRAME_WORDS * 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic init_s, step_s, init_l, step_l;
  logic [5:0] sel_s, sel_l;
  word_t word_s, word_l;
  logic last_s, last_l;

  int checks = 0, failures = 0;

  tpg #(.FRAME_WORDS(FW_S)) dut_s (.clk, .rst, .init_i(init_s), .step_i(step_s),
                                   .sel_i(sel_s), .word_o(word_s), .last_o(last_s));
  tpg dut_l (.clk, .rst, .init_i(init_l), .step_i(step_l),
             .sel_i(sel_l), .word_o(word_l), .last_o(last_l));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [N_S][N_S];   // [i][j], i <= j; i == j stands for a single one

  // Read word w of the current small pattern (registered output: 1 cycle)
  task automatic read_small(input int w, output word_t v);
    sel_s <= 6'(w);
    @(posedge clk);
    #1;
    v = word_s;
  endtask

  initial begin
    logic [N_S-1:0] fr;
    word_t          v;
    int             ones [2];
    int             n1, count;
    longint         count_l;
    longint         expected_l;
    init_s = 1'b0; step_s = 1'b0; sel_s = '0;
    init_l = 1'b0; step_l = 1'b0; sel_l = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    init_s <= 1'b1;
    init_l <= 1'b1;
    @(posedge clk);
    #1;
    init_s <= 1'b0;
    init_l <= 1'b0;

    // ---- small instance: every word of every pattern
    count = 0;
    forever begin
      for (int w = 0; w < FW_S; w++) begin
        read_small(w, v);
        fr[w*32 +: 32] = v;
      end
      // words beyond the frame read zero
      read_small(FW_S, v);
      checks++;
      if (v != 0) failures++;
      n1 = 0;
      for (int b = 0; b < N_S; b++) if (fr[b]) begin
        if (n1 < 2) ones[n1] = b;
        n1++;
      end
      checks++;
      if (n1 < 1 || n1 > 2) begin
        failures++;
        $display("pattern %0d has %0d ones", count, n1);
      end else begin
        if (n1 == 1) ones[1] = ones[0];
        checks++;
        if (seen[ones[0]][ones[1]]) begin failures++; $display("repeat pattern"); end
        seen[ones[0]][ones[1]] = 1'b1;
      end
      count++;
      checks++;
      if (last_s !== (count == (N_S * N_S + N_S) / 2)) begin
        failures++;
        $display("last_o=%0b at pattern %0d", last_s, count);
      end
      if (last_s || count > N_S * N_S) break;
      step_s <= 1'b1;
      @(posedge clk);
      #1;
      step_s <= 1'b0;
    end
    checks++;
    if (count != (N_S * N_S + N_S) / 2) begin failures++; $display("count %0d", count); end
    for (int i = 0; i < N_S; i++)
      for (int j = i; j < N_S; j++) begin
        checks++;
        if (!seen[i][j]) failures++;
      end

    // ---- full-size instance: pattern count and a few words
    expected_l = num_patterns(N_L);
    checks++;
    if (expected_l != 861328) failures++;
    // first pattern: single one in bit 0
    sel_l <= 6'd0;
    @(posedge clk);
    #1;
    checks++;
    if (word_l != 32'h1) failures++;
    // second pattern: bits 0 and 1
    step_l <= 1'b1;
    @(posedge clk);
    #1;
    step_l <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (word_l != 32'h3) begin failures++; $display("word %h", word_l); end
    count_l = 2;
    step_l <= 1'b1;
    sel_l  <= 6'd40;
    while (!last_l) begin
      @(posedge clk);
      #1;
      count_l++;
      if (count_l > expected_l + 10) break;
    end
    step_l <= 1'b0;
    checks++;
    if (count_l != expected_l) begin
      failures++;
      $display("full-size pattern count %0d expected %0d", count_l, expected_l);
    end
    @(posedge clk);
    #1;
    // last pattern: only bit 1311, the top bit of word 40
    checks++;
    if (word_l != 32'h8000_0000) begin failures++; $display("last word %h", word_l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
