// misr_tb: self-checking test of the 32-bit MISR.
//
// It compares the register with a bit-by-bit model of P(x) = x^32 + x^28 +
// x^27 + x + 1 over random inputs and random enables. It also checks clear,
// the priority of scan mode over compaction, scan shifting and scan_o, and
// that the register is never all zero again during 200,000 autonomous steps
// from 1.
module misr_tb;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  clear, en, scan_mode, scan_shift, scan_in;
  word_t din, sig;
  logic  scan_out;
  int    checks = 0, failures = 0;
  word_t model;

  misr dut (.clk, .rst, .clear_i(clear), .en_i(en), .din_i(din),
            .scan_mode_i(scan_mode), .scan_shift_i(scan_shift), .scan_i(scan_in),
            .sig_o(sig), .scan_o(scan_out));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    #1;
    checks++;
    if (sig !== model) begin
      failures++;
      if (failures < 5) $display("sig %h model %h", sig, model);
    end
    checks++;
    if (scan_out !== model[31]) failures++;
  endtask

  initial begin
    bit zero_seen;
    clear = 1'b0; en = 1'b0; scan_mode = 1'b0; scan_shift = 1'b0; scan_in = 1'b0; din = '0;
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    // random compaction
    for (int i = 0; i < 5000; i++) begin
      en  = $urandom_range(3) != 0;
      din = $urandom;
      step_model();
      step();
    end
    // clear
    clear = 1'b1;
    model  = '0;
    step();
    clear = 1'b0;
    // scan mode: load a value, compaction inputs ignored
    scan_mode = 1'b1;
    en        = 1'b1;
    for (int i = 0; i < 200; i++) begin
      scan_shift = $urandom_range(1);
      scan_in    = $urandom_range(1);
      din        = $urandom;
      if (scan_shift) model = {model[30:0], scan_in};
      step();
    end
    scan_mode  = 1'b0;
    scan_shift = 1'b0;
    // autonomous run from 1
    clear = 1'b1;
    @(posedge clk);
    #1;
    clear = 1'b0;
    din   = 32'h1;
    en    = 1'b1;
    @(posedge clk);
    #1;
    din   = '0;
    model = 32'h1;
    checks++;
    if (sig !== 32'h1) failures++;
    zero_seen = 1'b0;
    for (int i = 0; i < 200000; i++) begin
      @(posedge clk);
      #1;
      model = ref_misr(model, '0);
      if (sig == '0) zero_seen = 1'b1;
    end
    checks++;
    if (zero_seen || sig !== model) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_model();
    if (en) model = ref_misr(model, din);
  endtask
endmodule
