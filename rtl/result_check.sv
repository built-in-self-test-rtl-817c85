// result_check: BIST pass/fail output.
//
// Each final signature is compared with its known good-circuit signature:
// 32 XOR gates reduced to one mismatch bit per MISR. The two mismatch bits
// and TDI drive a 3-input OR gate whose output is TDO. With both signatures
// good, TDO follows TDI. Any mismatch forces TDO to 1 whatever TDI is. An
// external tester drives TDI low and then high after Done. It expects TDO
// to follow, which also shows that TDO is not stuck at the passing value.
//
// The comparators, the OR gate and the signature values in the defaults
// (Virtex-4 good signatures) are those of the document. Purely
// combinational.
module result_check
  import bist_pkg::*;
#(
  parameter word_t GOOD_ECC_SIG  = 32'h9BC9_2CDB,
  parameter word_t GOOD_ICAP_SIG = 32'hB3FF_B18B
) (
  input  logic  tdi_i,
  input  word_t ecc_sig_i,
  input  word_t icap_sig_i,
  output logic  ecc_fail_o,
  output logic  icap_fail_o,
  output logic  tdo_o
);

  assign ecc_fail_o  = |(ecc_sig_i ^ GOOD_ECC_SIG);
  assign icap_fail_o = |(icap_sig_i ^ GOOD_ICAP_SIG);
  assign tdo_o       = tdi_i | ecc_fail_o | icap_fail_o;

endmodule
