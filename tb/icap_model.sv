// icap_model: behavioural model of the ICAP port with its configuration
// packet processor and one frame of configuration memory, for simulating
// the BIST. It is not synthesizable logic and stands in for the vendor's
// hard core.
//
// Behaviour:
//  * Words on I are taken while CE is high and WRITE is high. Virtex-5 words
//    are byte-swapped.
//  * Nothing is decoded until the sync word 0xAA995566.
//  * Type 1 packets write CMD, IDCODE, FAR, FDRI and CRC.
//  * FDRI data is accepted only after the correct device ID was written to
//    IDCODE and the command is WCFG. Of the two frames written, the first is
//    stored at FAR; the second is the pad frame that pushes it into the
//    array.
//  * A Type 1 read of FDRO after the RCFG command queues the read-back: a
//    pad frame of zeros, then the stored frame (zeros for any other FAR).
//  * While CE is high and WRITE is low, the queued words come out on O,
//    one per cycle, after READ_LATENCY cycles. BUSY is low exactly in the
//    cycles that carry a read word.
//  * Each read word also appears on cfg_word with cfg_word_valid. This is
//    the path through which the Frame ECC checker sees the frame data.
// The counters below are for testbenches to inspect.
module icap_model
  import bist_pkg::*;
#(
  parameter family_e     FAMILY       = VIRTEX4,
  parameter int unsigned FRAME_WORDS  = STD_FRAME_WORDS,
  parameter word_t       DEVICE_ID    = default_device_id(FAMILY),
  parameter int unsigned READ_LATENCY = 2
) (
  input  logic  clk,
  input  logic  ce,
  input  logic  write,
  input  word_t din,
  output word_t dout,
  output logic  busy,
  output word_t cfg_word,
  output logic  cfg_word_valid
);

  bit          synced = 1'b0;
  bit          id_ok = 1'b0;
  logic [4:0]  cmd = '0;
  logic [4:0]  cur_reg = '0;
  int unsigned wr_left = 0;
  int unsigned fdri_idx = 0;
  word_t       far = '0;
  word_t       fdri_buf [FRAME_WORDS];
  word_t       frame_mem [FRAME_WORDS];
  word_t       frame_far = '0;
  bit          frame_valid = 1'b0;
  word_t       rd_queue [2*FRAME_WORDS];
  int unsigned rd_left = 0;
  int unsigned rd_idx = 0;
  int unsigned rd_len = 0;
  int unsigned lat = 0;

  // statistics
  int unsigned frames_written = 0;
  int unsigned readbacks = 0;
  int unsigned words_read = 0;
  int unsigned rejected_writes = 0;
  int unsigned crc_resets = 0;
  int unsigned crc_writes = 0;
  int unsigned id_writes = 0;

  initial begin
    dout           = '0;
    busy           = 1'b1;
    cfg_word       = '0;
    cfg_word_valid = 1'b0;
    for (int i = 0; i < FRAME_WORDS; i++) begin
      fdri_buf[i]  = '0;
      frame_mem[i] = '0;
    end
  end

  task automatic reg_write(word_t w);
    case (cur_reg)
      REG_CMD: begin
        cmd = w[4:0];
        if (w[4:0] == CMD_RCRC) crc_resets++;
      end
      REG_IDCODE: begin
        id_ok = (w == DEVICE_ID);
        id_writes++;
      end
      REG_FAR: far = w;
      REG_CRC: crc_writes++;
      REG_FDRI: begin
        if (cmd == CMD_WCFG && id_ok) begin
          if (fdri_idx < FRAME_WORDS) fdri_buf[fdri_idx] = w;
          fdri_idx++;
          if (fdri_idx == 2 * FRAME_WORDS) begin
            frame_mem      = fdri_buf;
            frame_far      = far;
            frame_valid    = 1'b1;
            frames_written++;
          end
        end else begin
          rejected_writes++;
        end
      end
      default: ;
    endcase
  endtask

  task automatic header(word_t w);
    if (w[31:29] != 3'b001) return;
    case (w[28:27])
      OP_WRITE: begin
        cur_reg = w[17:13];
        wr_left = w[10:0];
        if (cur_reg == REG_FDRI) fdri_idx = 0;
      end
      OP_READ: begin
        if (w[17:13] == REG_FDRO && cmd == CMD_RCFG) begin
          rd_len = w[10:0];
          for (int i = 0; i < 2 * FRAME_WORDS; i++) begin
            if (i < FRAME_WORDS) rd_queue[i] = '0;
            else rd_queue[i] = (frame_valid && frame_far == far) ? frame_mem[i-FRAME_WORDS] : '0;
          end
          rd_left = rd_len;
          rd_idx  = 0;
          lat     = READ_LATENCY;
          readbacks++;
        end
      end
      default: ;
    endcase
  endtask

  always @(posedge clk) begin
    word_t w;
    w              = icap_order(FAMILY, din);
    cfg_word_valid <= 1'b0;
    busy           <= 1'b1;
    if (ce && write) begin
      if (!synced) begin
        if (w == SYNC_WORD) synced = 1'b1;
      end else if (wr_left > 0) begin
        reg_write(w);
        wr_left--;
      end else begin
        header(w);
      end
    end else if (ce && !write && rd_left > 0) begin
      if (lat > 0) begin
        lat--;
      end else begin
        dout           <= icap_order(FAMILY, rd_queue[rd_idx]);
        cfg_word       <= rd_queue[rd_idx];
        cfg_word_valid <= 1'b1;
        busy           <= 1'b0;
        rd_idx++;
        rd_left--;
        words_read++;
      end
    end
  end

endmodule
