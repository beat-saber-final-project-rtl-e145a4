// music_interface: the music board, playing the song and the hit sound.
//
// Three clock domains, ordered so that most crossings go from a slower to a
// faster clock, where a two flip-flop synchroniser is enough:
//   65 MHz : uart_rx receives command bytes from the game board.
//   100 MHz: serial_parse decodes them (after a 2-FF synchroniser) into a
//            sticky `game_start` and `hit_received` pulses; play_hit_note
//            makes the 740 Hz hit sound; the output mux picks hit sound or
//            song sample for the speaker PWM.
//   25 MHz : sd_read_state_control reads the WAV file from the SD card into
//            audio_fifo; sample_reader pops one byte every 568 clocks
//            (44 kHz). game_start enters this domain through a 2-FF
//            synchroniser (the one fast-to-slow crossing; it is a level).
// The song samples cross to 100 MHz through another 2-FF synchroniser.
// `audio_data` is the 8-bit sample for the speaker PWM (outside this
// module, like the SD card controller whose port is brought out here).
//
// From the source description: receiver, start/hit decoding, SD read control, FIFO, 568-cycle sample pacing, 740 Hz note for 0.1 s, 2-flop crossings between 25 and 100 MHz.
// My own choices: the clock each part runs on, the sticky start level crossing to 25 MHz, and the output mux.
//
// Lint note: rx_err, fifo_full, sample_strobe and wav_len are status outputs
// of the sub-blocks that this level has no use for (unused-signal warnings).
module music_interface #(
  parameter int ACC_W       = 14,
  parameter int INC         = 29,
  parameter int HALF_CYCLES = 282,
  parameter int FIFO_DEPTH  = 16384,
  parameter int HALT_LEVEL  = 1536,
  parameter int SAMPLE_DIV  = 568,
  parameter int HALF_PERIOD = 67_568,
  parameter int NOTE_CYCLES = 10_000_000
) (
  input  logic        clk_65,
  input  logic        clk_100,
  input  logic        clk_25,
  input  logic        rst,
  input  logic        rxd,
  // SD card controller
  input  logic        sd_ready,
  input  logic        sd_byte_available,
  input  logic [7:0]  sd_dout,
  output logic        sd_rd,
  output logic [31:0] sd_address,
  // speaker
  output logic [7:0]  audio_data,
  output logic        hit_active,
  // status
  output logic        game_start,
  output logic        streaming,
  output logic        song_done,
  output logic        sd_halted,
  output logic [$clog2(FIFO_DEPTH)-1:0] fifo_count
);
  localparam int CW = $clog2(FIFO_DEPTH);

  // ---- 65 MHz: serial receiver
  logic [7:0] rx_data;
  logic       rx_valid, rx_err;

  uart_rx #(.ACC_W(ACC_W), .INC(INC), .HALF_CYCLES(HALF_CYCLES)) u_rx (
    .clk(clk_65), .rst(rst), .rxd(rxd),
    .data(rx_data), .valid(rx_valid), .frame_error(rx_err)
  );

  // ---- 100 MHz: parse, hit note, output mux
  logic [8:0] rx_sync;
  logic       hit_received;
  logic [7:0] note_data, sample_100;

  sync_2ff #(.WIDTH(9)) u_rx_sync (
    .clk(clk_100), .rst(rst), .d({rx_valid, rx_data}), .q(rx_sync)
  );

  serial_parse u_parse (
    .clk(clk_100), .rst(rst), .rx_data(rx_sync[7:0]), .rx_ready(rx_sync[8]),
    .game_start(game_start), .hit_received(hit_received)
  );

  play_hit_note #(.HALF_PERIOD(HALF_PERIOD), .NOTE_CYCLES(NOTE_CYCLES)) u_note (
    .clk(clk_100), .rst(rst), .hit(hit_received),
    .pwm_data(note_data), .hit_active(hit_active)
  );

  always_ff @(posedge clk_100) begin
    if (rst) audio_data <= 8'h80;
    else     audio_data <= hit_active ? note_data : sample_100;
  end

  // ---- 25 MHz: SD reading, FIFO, 44 kHz sample pacing
  logic          start_25, fifo_wr, fifo_rd, fifo_full, fifo_empty;
  logic [7:0]    fifo_din, fifo_dout, sample_25;
  logic          sample_strobe;
  logic [31:0]   wav_len;

  sync_2ff #(.WIDTH(1)) u_start_sync (
    .clk(clk_25), .rst(rst), .d(game_start), .q(start_25)
  );

  sd_read_state_control #(.HALT_LEVEL(HALT_LEVEL), .COUNT_W(CW)) u_sdctl (
    .clk(clk_25), .rst(rst), .game_start(start_25),
    .sd_ready(sd_ready), .sd_byte_available(sd_byte_available), .sd_dout(sd_dout),
    .sd_rd(sd_rd), .sd_address(sd_address),
    .fifo_count(fifo_count), .fifo_wr_en(fifo_wr), .fifo_din(fifo_din),
    .streaming(streaming), .song_done(song_done), .halted(sd_halted), .wav_len(wav_len)
  );

  audio_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk_25), .rst(rst), .wr_en(fifo_wr), .din(fifo_din),
    .rd_en(fifo_rd), .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty),
    .data_count(fifo_count)
  );

  sample_reader #(.SAMPLE_DIV(SAMPLE_DIV)) u_reader (
    .clk(clk_25), .rst(rst), .enable(start_25), .fifo_empty(fifo_empty),
    .fifo_dout(fifo_dout), .fifo_rd_en(fifo_rd), .sample(sample_25),
    .sample_strobe(sample_strobe)
  );

  sync_2ff #(.WIDTH(8)) u_sample_sync (
    .clk(clk_100), .rst(rst), .d(sample_25), .q(sample_100)
  );
endmodule
