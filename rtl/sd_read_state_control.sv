// sd_read_state_control: feeds WAV data from the SD card into the FIFO.
//
// Runs in the 25 MHz SD clock and drives an SD card controller that reads
// 512-byte sectors: with `ready` high, holding `rd` high starts a read at
// `address` (ready then falls), each byte is offered on `dout` with a
// rising edge of `byte_available`, and `ready` rises again after the 512th.
// Sequence:
//   1. Wait for `game_start` (already synchronised to this clock).
//   2. Read the sector at SONG_BASE, the WAV header. The four bytes that
//      follow the chunk tag "data" (64 61 74 61) are the little-endian
//      length of the sound data in bytes.
//   3. Read the sectors from SONG_BASE+512 on, writing each byte into the
//      FIFO, until `wav_len` bytes have been written.
// Flow control: the next sector read is only started while the FIFO holds
// at most HALT_LEVEL (1536) bytes; above that `rd` stays low and the
// 44 kHz reader drains the FIFO. A sector is never cut short, so the FIFO
// never holds more than HALT_LEVEL + 512 bytes and no byte is lost.
// Sound data is taken from byte 512 on, skipping the rest of the header
// sector; the song file is expected to be laid out that way.
//
// From the source description: waiting for the start byte, the WAV length after 'data', music from byte 512, 512-byte reads, halting when the FIFO holds more than 1536 bytes.
// My own choices: the state machine, the rising-edge byte strobe and following the 'more than 1536 entries' sentence over the conflicting one.
//
// Lint note: only the last three bytes of the 4-byte search window are
// compared against 'dat' before the final 'a' arrives, so its top byte is
// unread (unused-bits warning).
module sd_read_state_control #(
  parameter logic [31:0] SONG_BASE  = 32'd0,
  parameter int          SECTOR     = 512,
  parameter int          HALT_LEVEL = 1536,
  parameter int          COUNT_W    = 14
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               game_start,
  // SD controller
  input  logic               sd_ready,
  input  logic               sd_byte_available,
  input  logic [7:0]         sd_dout,
  output logic               sd_rd,
  output logic [31:0]        sd_address,
  // FIFO
  input  logic [COUNT_W-1:0] fifo_count,
  output logic               fifo_wr_en,
  output logic [7:0]         fifo_din,
  // status
  output logic               streaming,
  output logic               song_done,
  output logic               halted,
  output logic [31:0]        wav_len
);
  typedef enum logic [2:0] {
    S_WAIT_START, S_HDR_REQ, S_HDR_READ, S_PLAY_REQ, S_PLAY_READ, S_DONE
  } state_t;

  state_t      state;
  logic        avail_q, byte_strobe;
  logic [31:0] last4;        // last four header bytes, newest in [7:0]
  logic [2:0]  len_bytes;    // length bytes still to capture after "data"
  logic        tag_found;
  logic [31:0] bytes_left;

  assign byte_strobe = sd_byte_available && !avail_q;
  assign streaming   = (state == S_PLAY_REQ) || (state == S_PLAY_READ);
  assign song_done   = (state == S_DONE);
  assign halted      = (state == S_PLAY_REQ) && (32'(fifo_count) > HALT_LEVEL);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_WAIT_START;
      avail_q    <= 1'b0;
      sd_rd      <= 1'b0;
      sd_address <= SONG_BASE;
      fifo_wr_en <= 1'b0;
      fifo_din   <= '0;
      last4      <= '0;
      len_bytes  <= '0;
      tag_found  <= 1'b0;
      wav_len    <= '0;
      bytes_left <= '0;
    end else begin
      avail_q    <= sd_byte_available;
      fifo_wr_en <= 1'b0;
      unique case (state)
        S_WAIT_START: begin
          sd_address <= SONG_BASE;
          if (game_start) state <= S_HDR_REQ;
        end
        S_HDR_REQ: begin
          sd_rd <= sd_ready;
          if (sd_rd && !sd_ready) begin
            sd_rd <= 1'b0;
            state <= S_HDR_READ;
          end
        end
        S_HDR_READ: begin
          if (byte_strobe) begin
            last4 <= {last4[23:0], sd_dout};
            if (len_bytes != 0) begin
              wav_len   <= {sd_dout, wav_len[31:8]};
              len_bytes <= len_bytes - 3'd1;
            end else if (!tag_found && {last4[23:0], sd_dout} == 32'h64_61_74_61) begin
              tag_found <= 1'b1;
              len_bytes <= 3'd4;
            end
          end
          if (sd_ready) begin
            sd_address <= SONG_BASE + 32'(SECTOR);
            bytes_left <= wav_len;
            state      <= S_PLAY_REQ;
          end
        end
        S_PLAY_REQ: begin
          if (bytes_left == 0) begin
            sd_rd <= 1'b0;
            state <= S_DONE;
          end else begin
            sd_rd <= sd_ready && (32'(fifo_count) <= HALT_LEVEL);
            if (sd_rd && !sd_ready) begin
              sd_rd <= 1'b0;
              state <= S_PLAY_READ;
            end
          end
        end
        S_PLAY_READ: begin
          if (byte_strobe && bytes_left != 0) begin
            fifo_wr_en <= 1'b1;
            fifo_din   <= sd_dout;
            bytes_left <= bytes_left - 32'd1;
          end
          if (sd_ready) begin
            sd_address <= sd_address + 32'(SECTOR);
            state      <= S_PLAY_REQ;
          end
        end
        S_DONE: sd_rd <= 1'b0;
        default: state <= S_WAIT_START;
      endcase
    end
  end
endmodule
