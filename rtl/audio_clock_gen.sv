// audio_clock_gen: codec clock generator. Divides the 50 MHz system clock
// into the three clocks the FPGA drives into the WM8731 (the codec runs as a
// clock slave): master clock XCK, bit clock BCLK and the left/right frame
// clock LRCK.
//
// How it works: one counter runs over BCLK_DIV system cycles per bit. BCLK is
// low in the first half of that count and high in the second, XCK repeats
// every MCLK_DIV cycles of the same counter so that the two stay in phase,
// and a slot counter advances once per bit over FRAME_BITS bits per frame.
// LRCK is low for the first half of the frame (left channel) and high for
// the second (right channel), as I2S requires. All three outputs come from
// flip-flops. These are data outputs towards the pins; nothing inside the
// FPGA is clocked by them.
//
// Interface for the serialiser: shift_tick is high for the one system cycle
// after which BCLK falls, and next_slot is the number of the bit slot that
// starts at that edge. The codec samples data on the rising BCLK edge, half a
// bit later.
// Timing at the defaults: XCK = 50 MHz / 4 = 12.5 MHz, BCLK = 50 MHz / 16 =
// 3.125 MHz, LRCK = BCLK / 64 = 48.83 kHz, so XCK = 256 x LRCK, matching the
// codec's normal-mode 256 fs setting. The design says only that the FPGA
// generates the codec clocks by clock division; the ratios are this
// implementation's choices.
module audio_clock_gen #(
  parameter int unsigned MCLK_DIV   = 4,   // system cycles per XCK period (even)
  parameter int unsigned BCLK_DIV   = 16,  // system cycles per BCLK period (multiple of MCLK_DIV)
  parameter int unsigned FRAME_BITS = 64,  // BCLK periods per LRCK period (even)
  localparam int unsigned DW = $clog2(BCLK_DIV),
  localparam int unsigned SW = $clog2(FRAME_BITS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          aud_xck,
  output logic          aud_bclk,
  output logic          aud_lrck,
  output logic          shift_tick,
  output logic [SW-1:0] next_slot
);

  if (BCLK_DIV % MCLK_DIV != 0 || MCLK_DIV % 2 != 0 || FRAME_BITS % 2 != 0) begin : g_bad_ratio
    $error("audio_clock_gen: BCLK_DIV must be a multiple of the even MCLK_DIV, FRAME_BITS even");
  end

  logic [DW-1:0] div, div_next;
  logic [SW-1:0] slot;

  assign shift_tick = (div == DW'(BCLK_DIV - 1));
  assign div_next   = shift_tick ? '0 : div + DW'(1);
  assign next_slot  = (slot == SW'(FRAME_BITS - 1)) ? '0 : slot + SW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div      <= '0;
      slot     <= '0;
      aud_xck  <= 1'b0;
      aud_bclk <= 1'b0;
      aud_lrck <= 1'b0;
    end else begin
      div      <= div_next;
      aud_xck  <= (32'(div_next) % MCLK_DIV) >= (MCLK_DIV / 2);
      aud_bclk <= 32'(div_next) >= (BCLK_DIV / 2);
      if (shift_tick) begin
        slot     <= next_slot;
        aud_lrck <= 32'(next_slot) >= (FRAME_BITS / 2);
      end
    end
  end

endmodule
