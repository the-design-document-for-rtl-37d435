// fighter_audio_wm8731: FPGA audio peripheral of the two-player fighting
// game. The game software on the HPS decides when to play which sound (menu
// music, hit and game-over effects, one-shot or looped) and streams 16-bit
// stereo samples into this peripheral over the lightweight HPS-to-FPGA
// bridge; the peripheral configures the WM8731 codec, generates the codec
// clocks and plays the samples at a steady rate.
//
// Structure (one instance of each unless noted):
//   audio_avalon_slave   Avalon-MM slave, four 32-bit registers
//   audio_ctrl_regs      control/status and FIFO-space registers
//   audio_sample_fifo x2 left and right sample FIFOs, 128 x 16 bits each
//   wm8731_i2c_init      writes the codec set-up table after reset
//   audio_clock_gen      XCK, BCLK and LRCK by division of the system clock
//   audio_serializer     one stereo pair per frame, I2S, to the DAC pin
//
// Software sequence: wait for codec-ready in the status word, read the
// FIFO-space word, write that many samples to 0x08 and 0x0C, set play enable.
// A write to 0x08 pushes writedata[15:0] into the left FIFO, a write to 0x0C
// into the right FIFO.
//
// Interface: the Avalon-MM slave (word address, read latency 1, no wait
// states) and the codec pins. The I2C data pin is split into a pull-low
// enable and an input; the board-level wrapper turns them into the
// open-drain pin. All logic is in the single system clock domain.
// Timing at the defaults (50 MHz): 48.83 kHz sample rate, 128 samples of
// buffering per channel (2.6 ms), codec ready about 3.3 ms after reset.
// The block list, the register offsets and the FIFO sizes follow the design;
// the rest is this implementation's choice, described in each block.
module fighter_audio_wm8731
  import fighter_audio_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 128,
  parameter int unsigned SAMPLE_BITS = 16,
  parameter int unsigned MCLK_DIV    = 4,
  parameter int unsigned BCLK_DIV    = 16,
  parameter int unsigned FRAME_BITS  = 64,
  parameter int unsigned SCL_QUARTER = 125,
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [1:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // WM8731 pins
  output logic        aud_xck,
  output logic        aud_bclk,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        i2c_sclk,
  output logic        i2c_sdat_oe,
  input  logic        i2c_sdat_in
);

  if (FIFO_DEPTH > 255) begin : g_bad_depth
    $error("fighter_audio_wm8731: FIFO space must fit the 8-bit fields of the FIFO-space word");
  end

  localparam int unsigned SW = $clog2(FRAME_BITS);

  reg_write_t reg_wr;
  logic [31:0] status_word, fifospace_word;
  logic play_en, fifo_flush, underrun_evt;
  logic codec_ready, i2c_nack;

  logic                   l_full, l_empty, r_full, r_empty, pop;
  logic [CW-1:0]          l_free, r_free;
  logic [SAMPLE_BITS-1:0] l_data, r_data;

  logic          shift_tick;
  logic [SW-1:0] next_slot;

  audio_avalon_slave u_slave (
    .clk, .rst_n,
    .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .reg_wr, .status_word, .fifospace_word
  );

  audio_ctrl_regs #(.CW(CW)) u_regs (
    .clk, .rst_n, .reg_wr,
    .codec_ready, .i2c_nack,
    .left_full(l_full), .right_full(r_full),
    .left_empty(l_empty), .right_empty(r_empty),
    .left_free(l_free), .right_free(r_free),
    .underrun_evt,
    .play_en, .fifo_flush,
    .status_word, .fifospace_word
  );

  audio_sample_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(SAMPLE_BITS)) u_left_fifo (
    .clk, .rst_n, .flush(fifo_flush),
    .push(reg_wr.left_wr), .wr_data(reg_wr.wdata[SAMPLE_BITS-1:0]),
    .pop, .rd_data(l_data),
    .full(l_full), .empty(l_empty), .count(), .free(l_free)
  );

  audio_sample_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(SAMPLE_BITS)) u_right_fifo (
    .clk, .rst_n, .flush(fifo_flush),
    .push(reg_wr.right_wr), .wr_data(reg_wr.wdata[SAMPLE_BITS-1:0]),
    .pop, .rd_data(r_data),
    .full(r_full), .empty(r_empty), .count(), .free(r_free)
  );

  wm8731_i2c_init #(.SCL_QUARTER(SCL_QUARTER)) u_i2c_init (
    .clk, .rst_n,
    .i2c_sclk, .i2c_sdat_oe, .i2c_sdat_in,
    .init_busy(), .init_done(codec_ready), .init_nack(i2c_nack)
  );

  audio_clock_gen #(.MCLK_DIV(MCLK_DIV), .BCLK_DIV(BCLK_DIV), .FRAME_BITS(FRAME_BITS)) u_clkgen (
    .clk, .rst_n,
    .aud_xck, .aud_bclk, .aud_lrck(aud_daclrck),
    .shift_tick, .next_slot
  );

  // Playback only starts once the codec is configured.
  audio_serializer #(.SAMPLE_BITS(SAMPLE_BITS), .FRAME_BITS(FRAME_BITS)) u_serializer (
    .clk, .rst_n,
    .play_en(play_en && codec_ready),
    .shift_tick, .next_slot,
    .left_data(l_data), .right_data(r_data),
    .left_empty(l_empty), .right_empty(r_empty),
    .pop, .underrun_evt, .aud_dacdat
  );

  // The serialiser pops both FIFOs together; they must never disagree.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> (!l_empty && !r_empty));

endmodule
