// audio_ctrl_regs: control, status and FIFO-space registers of the audio
// peripheral.
//
// Software uses these to start and stop playback, check that the codec has
// been configured, see how much room the sample FIFOs have and detect lost or
// missing samples.
//
// How it works:
//  * A write to 0x00 loads the play-enable bit; writing 1 to the flush bit
//    pulses fifo_flush for one cycle, writing 1 to the clear-flags bit clears
//    the sticky flags.
//  * The sticky overflow flag is set when a sample write finds its FIFO
//    full (the sample is dropped); the sticky underrun flag is set when the
//    serialiser had to play silence while playback was enabled.
//  * The status word carries play enable, codec ready, the I2C error flag,
//    the two sticky flags and both FIFO empty flags; the FIFO-space word has
//    the free words of the left FIFO in [31:24] and of the right FIFO in
//    [23:16].
// Bit positions are defined in fighter_audio_pkg. The registers, their
// offsets and their purpose follow the design; the bit layout, the sticky
// error flags and the flush command are this implementation's choices.
// Timing: every register updates on the clock edge after the bus strobe.
module audio_ctrl_regs
  import fighter_audio_pkg::*;
#(
  parameter int unsigned CW = 8   // width of the FIFO free counts
) (
  input  logic          clk,
  input  logic          rst_n,
  input  reg_write_t    reg_wr,
  // status inputs
  input  logic          codec_ready,
  input  logic          i2c_nack,
  input  logic          left_full,
  input  logic          right_full,
  input  logic          left_empty,
  input  logic          right_empty,
  input  logic [CW-1:0] left_free,
  input  logic [CW-1:0] right_free,
  input  logic          underrun_evt,
  // control outputs
  output logic          play_en,
  output logic          fifo_flush,
  // read words
  output logic [31:0]   status_word,
  output logic [31:0]   fifospace_word
);

  logic overflow_flag, underrun_flag;
  logic clr_flags, overflow_evt;

  assign overflow_evt = (reg_wr.left_wr && left_full) || (reg_wr.right_wr && right_full);
  assign clr_flags    = reg_wr.ctrl_wr && reg_wr.wdata[CTRL_CLR_FLAGS_BIT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play_en       <= 1'b0;
      fifo_flush    <= 1'b0;
      overflow_flag <= 1'b0;
      underrun_flag <= 1'b0;
    end else begin
      fifo_flush <= reg_wr.ctrl_wr && reg_wr.wdata[CTRL_FLUSH_BIT];
      if (reg_wr.ctrl_wr) play_en <= reg_wr.wdata[CTRL_PLAY_EN_BIT];
      if (clr_flags)         overflow_flag <= 1'b0;
      else if (overflow_evt) overflow_flag <= 1'b1;
      if (clr_flags)         underrun_flag <= 1'b0;
      else if (underrun_evt) underrun_flag <= 1'b1;
    end
  end

  always_comb begin
    status_word                       = '0;
    status_word[STAT_PLAY_EN_BIT]     = play_en;
    status_word[STAT_CODEC_READY_BIT] = codec_ready;
    status_word[STAT_I2C_NACK_BIT]    = i2c_nack;
    status_word[STAT_OVERFLOW_BIT]    = overflow_flag;
    status_word[STAT_UNDERRUN_BIT]    = underrun_flag;
    status_word[STAT_LEFT_EMPTY_BIT]  = left_empty;
    status_word[STAT_RIGHT_EMPTY_BIT] = right_empty;
    fifospace_word         = '0;
    fifospace_word[31:24]  = 8'(left_free);
    fifospace_word[23:16]  = 8'(right_free);
  end

endmodule
