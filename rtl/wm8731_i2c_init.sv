// wm8731_i2c_init: codec initialisation state machine. After reset it writes
// the WM8731 set-up table (fighter_audio_pkg::wm8731_init_word) to the codec
// over its two-wire (I2C) control port, then raises init_done and stays idle.
//
// How it works: a prescaler divides the system clock into quarter periods of
// SCL. Every I2C bit takes four quarters: SDA is set up while SCL is low,
// SCL rises, SDA is sampled in the middle of the high phase and SCL falls.
// Each register write is one transaction of 27 bits: START, the device
// address byte 0x34, the byte {register[6:0], value[8]}, the byte value[7:0],
// each byte followed by an acknowledge slot in which SDA is released, then
// STOP and a one-bit bus-free gap before the next transaction. A high SDA in
// an acknowledge slot means the codec did not answer: init_nack is set and
// stays set, and the sequence still runs to the end.
//
// Pins: i2c_sclk is driven push-pull (the FPGA is the only master);
// i2c_sdat_oe = 1 pulls SDA low, 0 releases it to the pull-up; i2c_sdat_in
// is the level on the pin. A board-level wrapper builds the open-drain pin
// from these two.
// Timing at the defaults: 50 MHz / (4 x 125) = 100 kHz SCL, about 0.3 ms per
// register write and 3.3 ms for the 11 writes.
// The design names an I2C state machine that configures the WM8731; the
// register values, the bus speed and the error handling are this
// implementation's choices.
module wm8731_i2c_init
  import fighter_audio_pkg::*;
#(
  parameter int unsigned SCL_QUARTER = 125,               // system cycles per quarter SCL period
  parameter int unsigned N_WORDS     = WM8731_INIT_WORDS  // table entries to send
) (
  input  logic clk,
  input  logic rst_n,
  output logic i2c_sclk,
  output logic i2c_sdat_oe,
  input  logic i2c_sdat_in,
  output logic init_busy,
  output logic init_done,
  output logic init_nack
);

  typedef enum logic [2:0] {ST_START, ST_BITS, ST_STOP, ST_GAP, ST_DONE} state_e;

  localparam int unsigned PW = (SCL_QUARTER > 1) ? $clog2(SCL_QUARTER) : 1;
  localparam int unsigned XW = (N_WORDS > 1) ? $clog2(N_WORDS) : 1;
  localparam int unsigned FRAME_LEN = 27;

  state_e        state;
  logic [PW-1:0] pre;
  logic [1:0]    q;
  logic [4:0]    bitidx;
  logic [XW-1:0] word_idx;
  logic          tick;

  logic [15:0]          word;
  logic [FRAME_LEN-1:0] frame;
  logic                 ack_slot;

  assign tick     = (pre == PW'(SCL_QUARTER - 1));
  assign word     = wm8731_init_word(32'(word_idx));
  assign frame    = {WM8731_I2C_WADDR, 1'b1, word[15:8], 1'b1, word[7:0], 1'b1};
  assign ack_slot = (bitidx == 5'd8) || (bitidx == 5'd17) || (bitidx == 5'd26);

  assign init_done = (state == ST_DONE);
  assign init_busy = !init_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_START;
      pre         <= '0;
      q           <= '0;
      bitidx      <= '0;
      word_idx    <= '0;
      i2c_sclk    <= 1'b1;
      i2c_sdat_oe <= 1'b0;
      init_nack   <= 1'b0;
    end else if (state != ST_DONE) begin
      pre <= tick ? '0 : pre + PW'(1);
      if (tick) begin
        q <= q + 2'd1;
        unique case (state)
          ST_START: begin
            unique case (q)
              2'd0: begin i2c_sclk <= 1'b1; i2c_sdat_oe <= 1'b0; end
              2'd1: i2c_sdat_oe <= 1'b1;          // SDA falls while SCL high
              2'd2: ;
              2'd3: begin i2c_sclk <= 1'b0; state <= ST_BITS; bitidx <= '0; end
            endcase
          end
          ST_BITS: begin
            unique case (q)
              2'd0: i2c_sdat_oe <= ack_slot ? 1'b0 : !frame[FRAME_LEN - 1 - 32'(bitidx)];
              2'd1: i2c_sclk <= 1'b1;
              2'd2: if (ack_slot && i2c_sdat_in) init_nack <= 1'b1;
              2'd3: begin
                i2c_sclk <= 1'b0;
                if (bitidx == 5'(FRAME_LEN - 1)) state <= ST_STOP;
                else                              bitidx <= bitidx + 5'd1;
              end
            endcase
          end
          ST_STOP: begin
            unique case (q)
              2'd0: i2c_sdat_oe <= 1'b1;
              2'd1: i2c_sclk <= 1'b1;
              2'd2: i2c_sdat_oe <= 1'b0;          // SDA rises while SCL high
              2'd3: state <= ST_GAP;
            endcase
          end
          ST_GAP: begin
            if (q == 2'd3) begin
              if (word_idx == XW'(N_WORDS - 1)) begin
                state <= ST_DONE;
              end else begin
                word_idx <= word_idx + XW'(1);
                state    <= ST_START;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
