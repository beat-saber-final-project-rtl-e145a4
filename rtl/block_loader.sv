// block_loader: streams the song's blocks into a 12-entry look-ahead window.
//
// The beat map sits in a read-only block RAM, one block_t per word, sorted
// by hit time and ended by a word whose hit time is all ones. Because blocks
// only ever come in increasing time order, the loader treats the RAM as a
// stream: it keeps the next NUM_BLOCKS blocks in a window, entry 0 being the
// block closest to being hit and the last entry the farthest. Whenever the
// window has a free entry at its tail, it reads the next word (one read in
// flight, three clocks per block). Entry 0 leaves the window, and the rest
// shift forward, when
//   * the game reports that this block was sliced (`slice_event` with a
//     matching `sliced_id`), or
//   * the game time has passed its hit time by more than MISS_TICKS; then
//     `block_missed` pulses with `missed_id`.
// A shift never happens in the clock a new block is written, so the two
// never collide. MISS_TICKS and the end-of-song marker are this design's
// choices.
//
// From the source description: a read-only BRAM streamed in time order into 12 entries, closest first.
// My own choices: the 51-bit record with an id field, removal on slice or after a 10-tick miss, and the end-of-song marker.
module block_loader
  import beat_saber_pkg::*;
#(
  parameter int    NUM       = NUM_BLOCKS,
  parameter int    MAP_DEPTH = 256,
  parameter string MAP_FILE  = "rtl/beat_map.mem",
  parameter int    MISS_TICKS = 10
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [TIME_W-1:0]        curr_time,
  input  logic                     slice_event,
  input  logic [ID_W-1:0]          sliced_id,
  output block_t                   blocks [NUM],
  output logic [NUM-1:0]           valid,
  output logic                     block_missed,
  output logic [ID_W-1:0]          missed_id,
  output logic                     song_done
);
  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_WRITE} fstate_t;

  fstate_t                       fstate;
  logic [$clog2(MAP_DEPTH)-1:0]  rd_ptr;
  logic [BLOCK_BITS-1:0]         rd_word;
  block_t                        rd_block;
  logic                          end_reached;
  logic [$clog2(NUM+1)-1:0]      n_valid;
  logic                          hit_pop, miss_pop, pop;

  bram_readonly #(.WIDTH(BLOCK_BITS), .DEPTH(MAP_DEPTH), .INIT_FILE(MAP_FILE)) u_map (
    .clk(clk), .addr(rd_ptr), .dout(rd_word)
  );
  assign rd_block = block_t'(rd_word);

  assign hit_pop  = valid[0] && slice_event && (sliced_id == blocks[0].id);
  assign miss_pop = valid[0] &&
                    ({1'b0, curr_time} > {1'b0, blocks[0].t_hit} + (TIME_W+1)'(MISS_TICKS));
  assign pop      = (fstate != F_WRITE) && (hit_pop || miss_pop);

  always_ff @(posedge clk) begin
    if (rst) begin
      fstate       <= F_IDLE;
      rd_ptr       <= '0;
      end_reached  <= 1'b0;
      n_valid      <= '0;
      valid        <= '0;
      blocks       <= '{default: block_t'('0)};
      block_missed <= 1'b0;
      missed_id    <= '0;
      song_done    <= 1'b0;
    end else begin
      block_missed <= 1'b0;
      song_done    <= end_reached && (n_valid == 0);
      if (pop) begin
        for (int i = 0; i < NUM - 1; i++) blocks[i] <= blocks[i+1];
        valid   <= {1'b0, valid[NUM-1:1]};
        n_valid <= n_valid - 1'b1;
        if (!hit_pop) begin
          block_missed <= 1'b1;
          missed_id    <= blocks[0].id;
        end
      end
      unique case (fstate)
        F_IDLE:  if (!end_reached && (n_valid < ($bits(n_valid))'(NUM)) && !pop) fstate <= F_WAIT;
        F_WAIT:  fstate <= F_WRITE;
        F_WRITE: begin
          fstate <= F_IDLE;
          if (rd_block.t_hit == END_OF_MAP) begin
            end_reached <= 1'b1;
          end else begin
            blocks[n_valid] <= rd_block;
            valid[n_valid]  <= 1'b1;
            n_valid         <= n_valid + 1'b1;
            if (rd_ptr == ($bits(rd_ptr))'(MAP_DEPTH - 1)) end_reached <= 1'b1;
            else rd_ptr <= rd_ptr + 1'b1;
          end
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end
endmodule
