// result_check_tb: self-checking test of the signature comparators and the
// TDO OR gate, with the default (Virtex-4) good signatures. It covers both
// signatures good, each one off by every single bit, random signatures,
// and both TDI values.
module result_check_tb;
  import bist_pkg::*;

  localparam word_t GE = 32'h9BC9_2CDB;
  localparam word_t GI = 32'hB3FF_B18B;

  logic  tdi, ecc_fail, icap_fail, tdo;
  word_t ecc_sig, icap_sig;
  int    checks = 0, failures = 0;

  result_check dut (.tdi_i(tdi), .ecc_sig_i(ecc_sig), .icap_sig_i(icap_sig),
                    .ecc_fail_o(ecc_fail), .icap_fail_o(icap_fail), .tdo_o(tdo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic t, word_t e, word_t i);
    logic exp_e, exp_i;
    tdi = t; ecc_sig = e; icap_sig = i;
    #1;
    exp_e = (e != GE);
    exp_i = (i != GI);
    checks++;
    if (ecc_fail !== exp_e || icap_fail !== exp_i || tdo !== (t || exp_e || exp_i)) begin
      failures++;
      $display("tdi=%b ecc=%h icap=%h -> tdo=%b", t, e, i, tdo);
    end
  endtask

  initial begin
    for (int t = 0; t < 2; t++) begin
      apply(t[0], GE, GI);
      for (int b = 0; b < 32; b++) begin
        apply(t[0], GE ^ (32'h1 << b), GI);
        apply(t[0], GE, GI ^ (32'h1 << b));
      end
      for (int n = 0; n < 200; n++) apply(t[0], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
