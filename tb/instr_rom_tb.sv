// instr_rom_tb: self-checking test of the instruction block RAM contents
// and its one-cycle read latency, at the default 41-word frame and
// Virtex-4 device ID and frame address. The expected words are written out
// here as plain configuration packets.
module instr_rom_tb;
  import bist_pkg::*;

  logic       clk = 1'b0;
  logic [8:0] addr;
  word_t      data;
  int         checks = 0, failures = 0;
  word_t      exp [512];

  instr_rom dut (.clk, .addr_i(addr), .data_o(data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < 512; i++) exp[i] = '0;
    a = 0;
    // preamble
    exp[a++] = 32'hFFFF_FFFF; exp[a++] = 32'hAA99_5566; exp[a++] = 32'h2000_0000;
    // frame write header
    exp[a++] = 32'h3000_8001; exp[a++] = 32'h0000_0007;   // CMD RCRC
    exp[a++] = 32'h3001_8001; exp[a++] = 32'h01E5_8093;   // IDCODE
    exp[a++] = 32'h3000_8001; exp[a++] = 32'h0000_0001;   // CMD WCFG
    exp[a++] = 32'h3000_2001; exp[a++] = 32'h0040_0000;   // FAR
    exp[a++] = 32'h3000_4052;                             // FDRI, 82 words
    // pad frame, NOOPs, CRC
    a += 41;
    exp[a++] = 32'h2000_0000; exp[a++] = 32'h2000_0000;
    exp[a++] = 32'h3000_0001; exp[a++] = 32'h0000_DEFC;
    // frame read header
    exp[a++] = 32'h3000_8001; exp[a++] = 32'h0000_0004;   // CMD RCFG
    exp[a++] = 32'h3000_2001; exp[a++] = 32'h0040_0000;   // FAR
    exp[a++] = 32'h2800_6052;                             // read FDRO, 82 words
    exp[a++] = 32'h2000_0000; exp[a++] = 32'h2000_0000;
    checks++;
    if (a != 64) failures++;

    addr = '0;
    @(posedge clk);
    for (int i = 0; i < 512; i++) begin
      addr <= 9'(i);
      @(posedge clk);
      #1;
      checks++;
      if (data !== exp[i]) begin
        failures++;
        if (failures < 5) $display("addr %0d: %h expected %h", i, data, exp[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
