// frame_ecc_bist: built-in self-test of the ICAP and Frame ECC, together
// with the sequential Frame ECC checker that it tests.
//
// The BIST writes one configuration frame through the ICAP, reads it back
// and compacts the responses, for every test pattern of a parity tree of
// unknown structure. The patterns are all single 1s and all pairs of 1s
// over the 1312-bit frame, 861,328 of them. Data path, left to right:
//  * TPG (two shift registers, OR gates, 64-to-1 word multiplexer) and the
//    instruction block RAM, selected by a 2-to-1 multiplexer onto the
//    32-bit ICAP input;
//  * the circuits under test: the ICAP (outside this module, through the
//    icap_* ports) and the Frame ECC checker (frame_ecc, fed by the frame
//    read-back path, the cfg_word_* ports);
//  * two 32-bit MISRs. The ICAP MISR compacts ICAP_O during the read-back
//    of the test frame. The Frame ECC MISR compacts the 12-bit syndrome
//    whenever SYNDROMEVALID is high, so the pad frame's syndrome goes in
//    too. The document's block diagram connects SYNDROMEVALID to the MISR
//    enable; its read sequence compacts only while the test frame is read.
//    This design follows the block diagram.
//  * result_check: both signatures against the good-circuit signatures,
//    ORed with TDI into TDO.
// The two MISRs form one scan chain: Scan_In -> Frame ECC MISR -> ICAP
// MISR -> Scan_Out. When Scan_Mode is high, each rising edge of Scan_Clock
// shifts the chain by one bit. Scan_Clock is sampled with Clock, so it must
// be slower than half of Clock.
//
// Ports: the primary inputs and outputs of the BIST component (Clock, TDI,
// Start, Scan_In, Scan_Mode, Scan_Clock, TDO, Done, Scan_Out) follow the
// document. Reset stands for the global reset a configuration download
// gives every flip-flop. The icap_* ports connect to the ICAP primitive.
// The cfg_word_* ports carry the configuration memory words, read back one
// per cycle, into the Frame ECC checker.
//
// FAMILY selects the Virtex-4 or Virtex-5 variant. Virtex-5 byte-swaps the
// ICAP words and has its own device ID, frame address and good signatures.
// The default good signatures are the document's silicon values. A run of
// this RTL against another model of the ICAP and Frame ECC gives other
// signatures, and those must be set in GOOD_ECC_SIG and GOOD_ICAP_SIG for
// TDO to pass.
//
// The checker's ERROR output and the two comparator outputs of
// result_check are connected to named signals that nothing reads: the BIST
// observes only SYNDROME and TDO, and lint tools report those three signals
// as unused. They are left in place as probe points for simulation.
//
// Timing at the defaults: 318 Clock cycles per pattern and 3 cycles of
// preamble, 273,902,307 cycles per run. Done rises at the end of the run,
// and TDO is valid while Done is high.
module frame_ecc_bist
  import bist_pkg::*;
#(
  parameter family_e     FAMILY        = VIRTEX4,
  parameter int unsigned FRAME_WORDS   = STD_FRAME_WORDS,
  parameter int unsigned RD_WIN        = 216,
  parameter word_t       DEVICE_ID     = default_device_id(FAMILY),
  parameter word_t       FRAME_ADDR    = default_frame_addr(FAMILY),
  parameter word_t       GOOD_ECC_SIG  = (FAMILY == VIRTEX5) ? 32'h969C_47DD : 32'h9BC9_2CDB,
  parameter word_t       GOOD_ICAP_SIG = (FAMILY == VIRTEX5) ? 32'h31D9_89BD : 32'hB3FF_B18B
) (
  input  logic  Clock,
  input  logic  Reset,
  input  logic  TDI,
  input  logic  Start,
  input  logic  Scan_In,
  input  logic  Scan_Mode,
  input  logic  Scan_Clock,
  output logic  TDO,
  output logic  Done,
  output logic  Scan_Out,
  // ICAP primitive
  output word_t icap_i_o,        // ICAP I
  output logic  icap_ce_o,       // ICAP clock enable
  output logic  icap_write_o,    // ICAP WRITE: 1 write, 0 read
  input  word_t icap_o_i,        // ICAP O
  input  logic  icap_busy_i,     // ICAP BUSY
  // configuration frame read-back path into the Frame ECC
  input  word_t cfg_word_i,
  input  logic  cfg_word_valid_i
);

  localparam int unsigned ROM_DEPTH = 512;
  localparam int unsigned ROM_AW    = $clog2(ROM_DEPTH);
  localparam int unsigned SEL_W     = 6;

  logic [ROM_AW-1:0] rom_addr;
  word_t             rom_word_q;
  logic [SEL_W-1:0]  tpg_sel;
  word_t             tpg_word;
  logic              tpg_init, tpg_step, tpg_last, tpg_data_sel;
  logic              misr_clear, icap_misr_en;
  syndrome_t         syndrome;
  logic              ecc_error, syndromevalid;
  word_t             ecc_sig, icap_sig;
  logic              scan_mid;
  logic [2:0]        scan_clk_sync;
  logic              scan_shift;
  logic              ecc_fail, icap_fail;

  bist_controller #(
    .FRAME_WORDS(FRAME_WORDS), .RD_WIN(RD_WIN), .ROM_AW(ROM_AW), .SEL_W(SEL_W)
  ) u_ctrl (
    .clk(Clock), .rst(Reset), .start_i(Start),
    .tpg_last_i(tpg_last), .icap_busy_i(icap_busy_i),
    .rom_addr_o(rom_addr), .tpg_sel_o(tpg_sel),
    .tpg_init_o(tpg_init), .tpg_step_o(tpg_step), .tpg_data_sel_o(tpg_data_sel),
    .icap_ce_o(icap_ce_o), .icap_write_o(icap_write_o),
    .misr_clear_o(misr_clear), .icap_misr_en_o(icap_misr_en), .done_o(Done)
  );

  tpg #(.FRAME_WORDS(FRAME_WORDS), .SEL_W(SEL_W)) u_tpg (
    .clk(Clock), .rst(Reset), .init_i(tpg_init), .step_i(tpg_step),
    .sel_i(tpg_sel), .word_o(tpg_word), .last_o(tpg_last)
  );

  instr_rom #(
    .FRAME_WORDS(FRAME_WORDS), .DEPTH(ROM_DEPTH),
    .DEVICE_ID(DEVICE_ID), .FRAME_ADDR(FRAME_ADDR)
  ) u_rom (
    .clk(Clock), .addr_i(rom_addr), .data_o(rom_word_q)
  );

  // TPG / block RAM multiplexer onto the ICAP input
  assign icap_i_o = icap_order(FAMILY, tpg_data_sel ? tpg_word : rom_word_q);

  frame_ecc #(.FRAME_WORDS(FRAME_WORDS)) u_frame_ecc (
    .clk(Clock), .rst(Reset),
    .word_i(cfg_word_i), .word_valid_i(cfg_word_valid_i),
    .syndrome_o(syndrome), .error_o(ecc_error), .syndromevalid_o(syndromevalid)
  );

  // Scan_Clock rising-edge strobe
  always_ff @(posedge Clock) begin
    if (Reset) scan_clk_sync <= '0;
    else       scan_clk_sync <= {scan_clk_sync[1:0], Scan_Clock};
  end
  assign scan_shift = scan_clk_sync[1] && !scan_clk_sync[2];

  misr u_ecc_misr (
    .clk(Clock), .rst(Reset), .clear_i(misr_clear),
    .en_i(syndromevalid), .din_i({{(WORD_W-ECC_BITS){1'b0}}, syndrome}),
    .scan_mode_i(Scan_Mode), .scan_shift_i(scan_shift), .scan_i(Scan_In),
    .sig_o(ecc_sig), .scan_o(scan_mid)
  );

  misr u_icap_misr (
    .clk(Clock), .rst(Reset), .clear_i(misr_clear),
    .en_i(icap_misr_en), .din_i(icap_o_i),
    .scan_mode_i(Scan_Mode), .scan_shift_i(scan_shift), .scan_i(scan_mid),
    .sig_o(icap_sig), .scan_o(Scan_Out)
  );

  result_check #(.GOOD_ECC_SIG(GOOD_ECC_SIG), .GOOD_ICAP_SIG(GOOD_ICAP_SIG)) u_check (
    .tdi_i(TDI), .ecc_sig_i(ecc_sig), .icap_sig_i(icap_sig),
    .ecc_fail_o(ecc_fail), .icap_fail_o(icap_fail), .tdo_o(TDO)
  );

endmodule
