// tb_workload_refill: the peripheral at its default parameters fed the way
// the game's software could feed it, to check the buffering budget.
// One 60 FPS game frame is 833,333 cycles of the 50 MHz clock, during which
// the codec consumes 833,333 / 1024 = 813.8 stereo frames, but each FIFO
// holds only 128 samples (2.62 ms).
//  A. Refill once per game frame (write as many pairs as the FIFO-space
//     register allows, once every 833,333 cycles) for three game frames:
//     exactly 128 pairs are played per game frame and the rest, about 686
//     frames, are silent; the underrun flag is set.
//  B. Refill every 2 ms (100,000 cycles, 97.7 frames) for the same time:
//     no silent frame after playback starts, every pair played in order at
//     one pair per 1024 cycles, no underrun.
// Pair counts are compared with the arithmetic above (within one frame of
// rounding at the edges).
module tb_workload_refill;
  import fighter_audio_pkg::*;

  localparam int GAME_FRAME = 833_333;  // 50 MHz / 60
  localparam int FAST_REFILL = 100_000; // 2 ms

  logic clk = 0, rst_n = 0;
  logic [1:0]  avs_address = '0;
  logic        avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic aud_xck, aud_bclk, aud_daclrck, aud_dacdat;
  logic i2c_sclk, i2c_sdat_oe, codec_sdat_oe, sda;

  int checks = 0, failures = 0;
  logic [15:0] next_val = 16'h0001;
  logic [15:0] exp_l[$];

  always #10 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  assign sda = !(i2c_sdat_oe || codec_sdat_oe);

  fighter_audio_wm8731 dut (
    .clk, .rst_n,
    .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .aud_xck, .aud_bclk, .aud_daclrck, .aud_dacdat,
    .i2c_sclk, .i2c_sdat_oe, .i2c_sdat_in(sda)
  );

  wm8731_model codec (
    .sclk(i2c_sclk), .sdat(sda), .sdat_oe(codec_sdat_oe),
    .bclk(aud_bclk), .daclrck(aud_daclrck), .dacdat(aud_dacdat)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_chipselect = 1; avs_write = 1; avs_writedata = d;
    @(negedge clk);
    avs_chipselect = 0; avs_write = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_chipselect = 1; avs_read = 1;
    @(negedge clk);
    avs_chipselect = 0; avs_read = 0;
    d = avs_readdata;
  endtask

  // write as many pairs as there is room for; returns the number written
  task automatic refill(output int n);
    logic [31:0] sp;
    bus_read(REG_FIFOSPACE, sp);
    n = int'(sp[31:24]);
    for (int i = 0; i < n; i++) begin
      bus_write(REG_LEFT, {16'h0, next_val});
      bus_write(REG_RIGHT, {16'h0, ~next_val});
      exp_l.push_back(next_val);
      next_val = (next_val == 16'h7fff) ? 16'h0001 : next_val + 16'h1;
    end
  endtask

  // drain what the codec received: count played and silent frames
  task automatic tally(output int played, output int silent);
    played = 0; silent = 0;
    while (codec.rx_left.size() > 0) begin
      logic [15:0] l, r;
      l = codec.rx_left.pop_front();
      r = codec.rx_right.pop_front();
      if (l == 0 && r == 0) silent++;
      else begin
        played++;
        if (exp_l.size() == 0) check(0, "unexpected sample");
        else begin
          logic [15:0] e;
          e = exp_l.pop_front();
          check(l == e && r == ~e, "sample order");
        end
      end
    end
  endtask

  initial begin
    logic [31:0] st;
    int n, played, silent, tot_played, tot_silent;
    longint t_en;
    repeat (5) @(posedge clk);
    rst_n = 1;
    do begin
      repeat (1000) @(posedge clk);
      bus_read(REG_CTRL, st);
    end while (!st[STAT_CODEC_READY_BIT]);

    // ---- A: once per game frame ----
    refill(n);
    check(n == 128, "first refill fills the FIFO");
    bus_write(REG_CTRL, (32'h1 << CTRL_PLAY_EN_BIT) | (32'h1 << CTRL_CLR_FLAGS_BIT));
    codec.rx_left.delete(); codec.rx_right.delete();
    tot_played = 0; tot_silent = 0;
    for (int g = 0; g < 3; g++) begin
      repeat (GAME_FRAME - 600) @(posedge clk);
      tally(played, silent);
      $display("game frame %0d: %0d pairs played, %0d silent frames", g, played, silent);
      check(played == 128, "128 pairs per game frame");
      check(played + silent >= 812 && played + silent <= 815, "813.8 codec frames per game frame");
      tot_played += played; tot_silent += silent;
      refill(n);
    end
    bus_read(REG_CTRL, st);
    check(st[STAT_UNDERRUN_BIT], "underrun flagged with per-game-frame refill");

    // ---- B: every 2 ms ----
    repeat (GAME_FRAME) @(posedge clk);   // let A's last refill play out
    tally(played, silent);
    refill(n);
    bus_write(REG_CTRL, (32'h1 << CTRL_PLAY_EN_BIT) | (32'h1 << CTRL_CLR_FLAGS_BIT));
    codec.rx_left.delete(); codec.rx_right.delete();
    t_en = cyc;
    tot_played = 0; tot_silent = 0;
    for (int k = 0; k < 3 * GAME_FRAME / FAST_REFILL; k++) begin
      repeat (FAST_REFILL - 600) @(posedge clk);
      refill(n);
      tally(played, silent);
      tot_played += played; tot_silent += silent;
    end
    $display("2 ms refill: %0d pairs played, %0d silent frames", tot_played, tot_silent);
    check(tot_silent <= 1, "no silent frames with 2 ms refill (one at the enable edge)");
    // with no gap, one pair per 1024 cycles since playback was enabled
    check(tot_played >= int'((cyc - t_en) / 1024) - 2 && tot_played <= int'((cyc - t_en) / 1024) + 1,
          $sformatf("one pair per frame: %0d pairs in %0d cycles", tot_played, cyc - t_en));
    bus_read(REG_CTRL, st);
    check(!st[STAT_UNDERRUN_BIT], "no underrun with 2 ms refill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
