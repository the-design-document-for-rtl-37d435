// fighter_audio_pkg: constants and types shared by the WM8731 audio peripheral.
//
// Register map (Avalon-MM word addresses; byte offsets relative to the
// peripheral base, which sits at 0xFF203040 on the HPS lightweight bridge):
//   0x00 control / status   0x04 FIFO space   0x08 left sample   0x0C right sample
// The four offsets and their meaning follow the design; the bit layout inside
// the control/status and FIFO-space words is this implementation's choice and
// is defined here.
//
// Also holds the WM8731 power-up register table that the I2C initialiser
// sends: a fixed list of {register[6:0], value[8:0]} words for 16-bit I2S
// playback from the DAC to the headphone output with the codec as clock slave.
package fighter_audio_pkg;

  // ---------------- register map ----------------
  typedef enum logic [1:0] {
    REG_CTRL      = 2'd0,   // byte offset 0x00
    REG_FIFOSPACE = 2'd1,   // byte offset 0x04
    REG_LEFT      = 2'd2,   // byte offset 0x08
    REG_RIGHT     = 2'd3    // byte offset 0x0C
  } reg_addr_e;

  localparam logic [31:0] AUDIO_BASE_ADDR = 32'hFF20_3040;

  // control word (written at 0x00)
  localparam int CTRL_PLAY_EN_BIT   = 0;  // 1: stream samples to the codec
  localparam int CTRL_FLUSH_BIT     = 1;  // write 1: empty both FIFOs (self-clearing)
  localparam int CTRL_CLR_FLAGS_BIT = 2;  // write 1: clear sticky overflow/underrun

  // status word (read at 0x00)
  localparam int STAT_PLAY_EN_BIT     = 0;
  localparam int STAT_CODEC_READY_BIT = 8;   // I2C initialisation finished
  localparam int STAT_I2C_NACK_BIT    = 9;   // codec did not acknowledge a byte
  localparam int STAT_OVERFLOW_BIT    = 10;  // sticky: sample written to a full FIFO
  localparam int STAT_UNDERRUN_BIT    = 11;  // sticky: frame played with a FIFO empty
  localparam int STAT_LEFT_EMPTY_BIT  = 12;
  localparam int STAT_RIGHT_EMPTY_BIT = 13;

  // decoded register access from the bus slave to the register block
  typedef struct packed {
    logic        ctrl_wr;    // write to 0x00
    logic        left_wr;    // write to 0x08
    logic        right_wr;   // write to 0x0C
    logic [31:0] wdata;
  } reg_write_t;

  // ---------------- WM8731 set-up ----------------
  localparam logic [7:0] WM8731_I2C_WADDR = 8'h34;  // 7-bit address 0x1A, R/W = 0
  localparam int         WM8731_INIT_WORDS = 11;

  // One set-up word: register address in [15:9], 9-bit value in [8:0].
  function automatic logic [15:0] wm8731_init_word(input int unsigned idx);
    logic [6:0] r;
    logic [8:0] v;
    unique case (idx)
      0: begin r = 7'h0F; v = 9'h000; end  // reset
      1: begin r = 7'h00; v = 9'h080; end  // left line in: muted
      2: begin r = 7'h01; v = 9'h080; end  // right line in: muted
      3: begin r = 7'h02; v = 9'h079; end  // left headphone out: 0 dB
      4: begin r = 7'h03; v = 9'h079; end  // right headphone out: 0 dB
      5: begin r = 7'h04; v = 9'h012; end  // analogue path: DAC selected, mic muted
      6: begin r = 7'h05; v = 9'h000; end  // digital path: DAC soft mute off
      7: begin r = 7'h06; v = 9'h000; end  // power down control: all on
      8: begin r = 7'h07; v = 9'h002; end  // interface: I2S, 16-bit, codec is slave
      9: begin r = 7'h08; v = 9'h000; end  // sampling: normal mode, 256 fs
      10: begin r = 7'h09; v = 9'h001; end  // active: start the digital interface
      default: begin r = 7'h09; v = 9'h001; end
    endcase
    return {r, v};
  endfunction

endpackage
