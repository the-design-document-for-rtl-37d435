// audio_serializer: turns the left and right sample FIFOs into the serial
// I2S data stream of the WM8731 DAC.
//
// How it works: at the start of every frame (the shift_tick whose next_slot
// is 0) it takes one word from each FIFO, popping both together so that the
// channels stay paired. If playback is disabled, or either FIFO is empty, it
// pops nothing and plays a silent frame; in the second case, with playback
// enabled, it pulses underrun_evt. During the frame each sample is sent MSB
// first, one bit per BCLK, in I2S position: the left sample in slots
// 1..SAMPLE_BITS (one bit after LRCK falls), the right sample in slots
// FRAME_BITS/2+1 onwards (one bit after LRCK rises); the remaining slots
// carry zeros. The data output changes together with the falling BCLK
// edge, so it is stable at the rising edge where the codec samples it.
//
// Interface: shift_tick/next_slot from audio_clock_gen, the FIFOs' show-ahead
// heads and empty flags, pop to both FIFOs, aud_dacdat to the codec pin.
// Timing: one stereo sample pair per frame, i.e. per FRAME_BITS bit clocks.
// The 16-bit left/right stream follows the design; I2S framing, the paired
// pop and silence on underrun are this implementation's choices.
module audio_serializer #(
  parameter int unsigned SAMPLE_BITS = 16,
  parameter int unsigned FRAME_BITS  = 64,
  localparam int unsigned SW = $clog2(FRAME_BITS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   play_en,
  input  logic                   shift_tick,
  input  logic [SW-1:0]          next_slot,
  input  logic [SAMPLE_BITS-1:0] left_data,
  input  logic [SAMPLE_BITS-1:0] right_data,
  input  logic                   left_empty,
  input  logic                   right_empty,
  output logic                   pop,
  output logic                   underrun_evt,
  output logic                   aud_dacdat
);

  if (FRAME_BITS < 2 * (SAMPLE_BITS + 1)) begin : g_bad_frame
    $error("audio_serializer: a frame must hold two samples plus the I2S delay bits");
  end

  localparam int unsigned HALF = FRAME_BITS / 2;

  logic [SAMPLE_BITS-1:0] cur_l, cur_r;
  logic frame_start, have_pair;

  assign frame_start  = shift_tick && (next_slot == '0);
  assign have_pair    = !left_empty && !right_empty;
  assign pop          = frame_start && play_en && have_pair;
  assign underrun_evt = frame_start && play_en && !have_pair;

  // bit sent in slot s (combinational in s and the current samples)
  function automatic logic slot_bit(input int unsigned s,
                                    input logic [SAMPLE_BITS-1:0] l,
                                    input logic [SAMPLE_BITS-1:0] r);
    if (s >= 1 && s <= SAMPLE_BITS)
      return l[SAMPLE_BITS - s];
    else if (s >= HALF + 1 && s <= HALF + SAMPLE_BITS)
      return r[SAMPLE_BITS - (s - HALF)];
    else
      return 1'b0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_l      <= '0;
      cur_r      <= '0;
      aud_dacdat <= 1'b0;
    end else begin
      if (frame_start) begin
        cur_l <= pop ? left_data  : '0;
        cur_r <= pop ? right_data : '0;
      end
      if (shift_tick) aud_dacdat <= slot_bit(32'(next_slot), cur_l, cur_r);
    end
  end

endmodule
