// bist_controller: sequencer of the ICAP / Frame ECC self-test.
//
// The document's BIST has a small custom processor in this role. It drives
// the ICAP read/write and clock-enable inputs, the TPG / block RAM
// multiplexer select and the TPG clock enable, and it owns three counters:
// the instruction address, the TPG multiplexer select and the frame read
// timer. This module does that job with a state machine, the simplest
// circuit with that function; the instruction set of the original processor
// is not described.
//
// Per test pattern it runs the document's four steps:
//  1. Write the frame. Block RAM words (write header) go out, then
//     FRAME_WORDS TPG words, then block RAM words again (pad frame, NOOPs,
//     CRC).
//  2. Read the frame back. Block RAM words (read header) go out, then a read
//     window of RD_WIN cycles, then two NOOPs. In the window the ICAP is in
//     read mode. Each cycle without BUSY carries one frame word: the first
//     FRAME_WORDS are the pad frame and are discarded, and the next
//     FRAME_WORDS enable the ICAP MISR.
//  3. Frame ECC responses are compacted outside this module, whenever
//     SYNDROMEVALID is high.
//  4. Step the TPG, or raise Done after the last pattern.
// With the default 41-word frame a pattern takes 9 + 41 + 45 + 5 + RD_WIN +
// 2 cycles. RD_WIN = 216 makes this the 318 cycles per pattern that the
// document reports. A preamble of 3 block RAM words (dummy, sync, NOOP)
// runs once per BIST run.
//
// Start is asynchronous. It passes a two-flop synchroniser and an edge
// detector, so it must be held for three Clock cycles. A rising edge while
// idle or done clears both MISRs, reloads the TPG and starts a run. Tying
// Start high therefore runs the BIST once after reset.
//
// Timing:
//  * rom_addr_o and tpg_sel_o are issued one cycle ahead. The block RAM and
//    the TPG word register supply the data one cycle later.
//  * icap_ce_o, icap_write_o and tpg_data_sel_o are registered so that they
//    line up with that data.
//  * icap_misr_en_o is combinational from icap_busy_i.
//  * rst is synchronous and active high.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned FRAME_WORDS = STD_FRAME_WORDS,
  parameter int unsigned RD_WIN      = 216,
  parameter int unsigned ROM_AW      = 9,
  parameter int unsigned SEL_W       = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start_i,
  input  logic              tpg_last_i,
  input  logic              icap_busy_i,
  output logic [ROM_AW-1:0] rom_addr_o,
  output logic [SEL_W-1:0]  tpg_sel_o,
  output logic              tpg_init_o,
  output logic              tpg_step_o,
  output logic              tpg_data_sel_o,   // 1: TPG word, 0: block RAM word
  output logic              icap_ce_o,
  output logic              icap_write_o,     // 1: write, 0: read
  output logic              misr_clear_o,
  output logic              icap_misr_en_o,
  output logic              done_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_PRE, S_WH, S_WPAT, S_WT, S_RH, S_RWIN, S_RT, S_DONE
  } state_e;

  localparam int unsigned RD_CNT_W  = $clog2(RD_WIN + 1);
  localparam int unsigned WH_LAST   = wt_base() - 1;
  localparam int unsigned PRE_LAST  = wh_base() - 1;
  localparam int unsigned WT_LAST   = rh_base(FRAME_WORDS) - 1;
  localparam int unsigned RH_LAST   = rt_base(FRAME_WORDS) - 1;
  localparam int unsigned RT_LAST   = rom_used(FRAME_WORDS) - 1;

  state_e               state;
  logic [ROM_AW-1:0]    addr;        // instruction address counter
  logic [SEL_W-1:0]     sel;         // TPG multiplexer counter / read word counter
  logic [RD_CNT_W-1:0]  rd_cnt;      // frame read timer
  logic                 data_half;   // read words now belong to the test frame
  logic [2:0]           start_sync;  // two synchroniser flops and the edge flop
  logic                 start_edge;
  logic                 rd_word;

  assign start_edge = start_sync[1] && !start_sync[2];
  assign rd_word    = icap_ce_o && !icap_write_o && !icap_busy_i;

  assign rom_addr_o     = addr;
  assign tpg_sel_o      = sel;
  assign icap_misr_en_o = rd_word && data_half;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_sync <= '0;
    end else begin
      start_sync <= {start_sync[1:0], start_i};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      addr           <= '0;
      sel            <= '0;
      rd_cnt         <= '0;
      data_half      <= 1'b0;
      tpg_init_o     <= 1'b0;
      tpg_step_o     <= 1'b0;
      tpg_data_sel_o <= 1'b0;
      icap_ce_o      <= 1'b0;
      icap_write_o   <= 1'b1;
      misr_clear_o   <= 1'b0;
      done_o         <= 1'b0;
    end else begin
      tpg_init_o   <= 1'b0;
      tpg_step_o   <= 1'b0;
      misr_clear_o <= 1'b0;
      // what was issued this cycle reaches the ICAP next cycle
      tpg_data_sel_o <= (state == S_WPAT);
      icap_ce_o      <= (state != S_IDLE) && (state != S_DONE);
      icap_write_o   <= (state != S_RWIN);

      // read-back word counting (pad frame first, then the test frame)
      if (rd_word) begin
        if (int'(sel) == FRAME_WORDS - 1) begin
          sel       <= '0;
          data_half <= 1'b1;
        end else begin
          sel <= sel + 1'b1;
        end
      end

      unique case (state)
        S_IDLE, S_DONE: begin
          if (start_edge) begin
            state        <= S_PRE;
            addr         <= ROM_AW'(pre_base());
            misr_clear_o <= 1'b1;
            tpg_init_o   <= 1'b1;
            done_o       <= 1'b0;
          end
        end
        S_PRE: begin
          addr <= addr + 1'b1;
          if (int'(addr) == PRE_LAST) state <= S_WH;
        end
        S_WH: begin
          if (int'(addr) == WH_LAST) begin
            state <= S_WPAT;
            sel   <= '0;
          end
          addr <= addr + 1'b1;
        end
        S_WPAT: begin
          if (int'(sel) == FRAME_WORDS - 1) begin
            state <= S_WT;
            sel   <= '0;
          end else begin
            sel <= sel + 1'b1;
          end
        end
        S_WT: begin
          addr <= addr + 1'b1;
          if (int'(addr) == WT_LAST) state <= S_RH;
        end
        S_RH: begin
          addr <= addr + 1'b1;
          if (int'(addr) == RH_LAST) begin
            state     <= S_RWIN;
            rd_cnt    <= '0;
            sel       <= '0;
            data_half <= 1'b0;
          end
        end
        S_RWIN: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (int'(rd_cnt) == RD_WIN - 1) state <= S_RT;
        end
        S_RT: begin
          if (int'(addr) == RT_LAST) begin
            if (tpg_last_i) begin
              state  <= S_DONE;
              done_o <= 1'b1;
            end else begin
              state      <= S_WH;
              addr       <= ROM_AW'(wh_base());
              tpg_step_o <= 1'b1;
            end
          end else begin
            addr <= addr + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
