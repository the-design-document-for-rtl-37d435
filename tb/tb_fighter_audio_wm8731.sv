// tb_fighter_audio_wm8731: end-to-end test of the audio peripheral at its
// default parameters (128-word FIFOs, 50 MHz system clock, 100 kHz I2C,
// 48.83 kHz frames), with a WM8731 codec model on the I2C and I2S pins and
// the HPS side played by Avalon-MM read and write tasks.
//
// Sequence, as the game software would drive it:
//  1. poll the status word until codec-ready; the codec model must have
//     received the 11 set-up writes, listed here, in order;
//  2. read FIFO space (128/128), write 128 left and 128 right samples,
//     read FIFO space (0/0), write one more pair: overflow flag set;
//  3. clear flags, enable playback: the model must receive the 128 pairs
//     in order, one per LRCK period of 1024 system cycles (XCK 4 cycles),
//     then the FIFOs run dry: underrun flag set;
//  4. disable playback, write 20 pairs, flush: FIFO space back to 128 and
//     none of the flushed samples reaches the codec;
//  5. stream 300 pairs by topping the FIFOs up from the FIFO-space word
//     while playback runs (a looped sound): all 300 arrive in order with no
//     underrun while data was available.
// Every sample written is non-zero so that silent frames can be told apart.
// Each mechanism (codec init, overflow, underrun, flush, enable/disable,
// streaming top-up) is counted and a mechanism that never happened fails.
module tb_fighter_audio_wm8731;
  import fighter_audio_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0]  avs_address = '0;
  logic        avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic aud_xck, aud_bclk, aud_daclrck, aud_dacdat;
  logic i2c_sclk, i2c_sdat_oe, codec_sdat_oe, sda;

  int checks = 0, failures = 0;
  int n_init = 0, n_overflow = 0, n_underrun = 0, n_flush = 0, n_mode = 0, n_topup = 0;
  longint cyc = 0;

  logic [15:0] exp_l[$], exp_r[$];
  logic [15:0] sent_cnt = 16'd1;

  always #10 clk = ~clk;   // 50 MHz
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- Avalon-MM master ----------------
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
    d = avs_readdata;          // read latency 1
  endtask

  task automatic write_pair();
    logic [15:0] l, r;
    l = {1'b1, sent_cnt[14:0]};   // never zero
    r = ~sent_cnt;
    if (r == 16'h0) r = 16'h1234;
    sent_cnt++;
    bus_write(REG_LEFT, {16'hdead, l});
    bus_write(REG_RIGHT, {16'hbeef, r});
    exp_l.push_back(l);
    exp_r.push_back(r);
  endtask

  // ---------------- clock measurements ----------------
  longint last_lrck = -1, last_xck = -1;
  int lrck_periods = 0, lrck_bad = 0, xck_bad = 0;
  always @(posedge aud_daclrck) begin
    if (last_lrck >= 0) begin
      lrck_periods++;
      if (cyc - last_lrck != 1024) lrck_bad++;
    end
    last_lrck = cyc;
  end
  always @(posedge aud_xck) begin
    if (last_xck >= 0 && cyc - last_xck != 4) xck_bad++;
    last_xck = cyc;
  end

  // non-silent pairs received by the codec, compared in order
  int rx_seen = 0, rx_ok = 0;
  task automatic collect_rx();
    while (codec.rx_left.size() > 0) begin
      logic [15:0] l, r;
      l = codec.rx_left.pop_front();
      r = codec.rx_right.pop_front();
      if (l != 0 || r != 0) begin
        rx_seen++;
        if (exp_l.size() == 0) check(0, "unexpected sample");
        else begin
          logic [15:0] el, er;
          el = exp_l.pop_front();
          er = exp_r.pop_front();
          check(l == el && r == er, $sformatf("sample pair %0d: got %h/%h want %h/%h", rx_seen, l, r, el, er));
          if (l == el && r == er) rx_ok++;
        end
      end
    end
  endtask

  logic [15:0] setup [WM8731_INIT_WORDS] = '{
    {7'h0F, 9'h000}, {7'h00, 9'h080}, {7'h01, 9'h080}, {7'h02, 9'h079},
    {7'h03, 9'h079}, {7'h04, 9'h012}, {7'h05, 9'h000}, {7'h06, 9'h000},
    {7'h07, 9'h002}, {7'h08, 9'h000}, {7'h09, 9'h001}};

  initial begin
    logic [31:0] st, sp;
    longint t0;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // 1. codec initialisation
    bus_read(REG_CTRL, st);
    check(!st[STAT_CODEC_READY_BIT], "not ready right after reset");
    do begin
      repeat (1000) @(posedge clk);
      bus_read(REG_CTRL, st);
    end while (!st[STAT_CODEC_READY_BIT]);
    n_init++;
    $display("codec ready after %0d cycles", cyc);
    check(cyc > 11 * 120 * 125 && cyc < 11 * 120 * 125 + 2000, "init time about 3.3 ms");
    check(!st[STAT_I2C_NACK_BIT], "codec acknowledged");
    check(codec.wr_log.size() == WM8731_INIT_WORDS, "set-up write count");
    for (int i = 0; i < WM8731_INIT_WORDS && i < codec.wr_log.size(); i++)
      check(codec.wr_log[i] == setup[i], $sformatf("set-up write %0d", i));

    // 2. fill and overflow
    bus_read(REG_FIFOSPACE, sp);
    check(sp == {8'd128, 8'd128, 16'h0}, "FIFO space empty");
    for (int i = 0; i < 128; i++) write_pair();
    bus_read(REG_FIFOSPACE, sp);
    check(sp == 32'h0, "FIFO space full");
    bus_read(REG_CTRL, st);
    check(!st[STAT_OVERFLOW_BIT] && !st[STAT_LEFT_EMPTY_BIT], "no overflow yet");
    bus_write(REG_LEFT, 32'h7777);            // dropped
    bus_write(REG_RIGHT, 32'h7777);           // dropped
    bus_read(REG_CTRL, st);
    check(st[STAT_OVERFLOW_BIT], "overflow flag");
    if (st[STAT_OVERFLOW_BIT]) n_overflow++;
    bus_write(REG_CTRL, 32'h1 << CTRL_CLR_FLAGS_BIT);
    bus_read(REG_CTRL, st);
    check(!st[STAT_OVERFLOW_BIT] && !st[STAT_UNDERRUN_BIT], "flags cleared");

    // 3. play 128 pairs, then run dry
    codec.rx_left.delete(); codec.rx_right.delete();
    bus_write(REG_CTRL, 32'h1 << CTRL_PLAY_EN_BIT);
    n_mode++;
    t0 = cyc;
    lrck_periods = 0; lrck_bad = 0; xck_bad = 0;
    repeat (140 * 1024) @(posedge clk);
    collect_rx();
    check(rx_ok == 128 && exp_l.size() == 0, $sformatf("128 pairs played, got %0d", rx_ok));
    check(lrck_periods >= 138 && lrck_bad == 0, "LRCK period 1024 cycles");
    check(xck_bad == 0, "XCK period 4 cycles");
    bus_read(REG_CTRL, st);
    check(st[STAT_UNDERRUN_BIT] && st[STAT_LEFT_EMPTY_BIT] && st[STAT_RIGHT_EMPTY_BIT], "underrun after draining");
    if (st[STAT_UNDERRUN_BIT]) n_underrun++;

    // 4. disable, write, flush
    bus_write(REG_CTRL, 32'h0);
    n_mode++;
    for (int i = 0; i < 20; i++) write_pair();
    bus_read(REG_FIFOSPACE, sp);
    check(sp == {8'd108, 8'd108, 16'h0}, "FIFO space after 20 pairs");
    repeat (5 * 1024) @(posedge clk);
    collect_rx();
    check(exp_l.size() == 20, "disabled: nothing played");
    bus_write(REG_CTRL, (32'h1 << CTRL_FLUSH_BIT) | (32'h1 << CTRL_CLR_FLAGS_BIT));
    bus_read(REG_FIFOSPACE, sp);
    check(sp == {8'd128, 8'd128, 16'h0}, "flush empties FIFOs");
    if (sp == {8'd128, 8'd128, 16'h0}) n_flush++;
    exp_l.delete(); exp_r.delete();

    // 5. streaming with top-up while playing
    bus_write(REG_CTRL, 32'h1 << CTRL_PLAY_EN_BIT);
    n_mode++;
    begin
      int sent;
      sent = 0;
      while (sent < 300) begin
        bus_read(REG_FIFOSPACE, sp);
        for (int k = 0; k < int'(sp[31:24]) && sent < 300 && k < 40; k++) begin
          write_pair();
          sent++;
        end
        n_topup++;
        repeat (20 * 1024) @(posedge clk);
        collect_rx();
        if (sent < 300) begin
          bus_read(REG_CTRL, st);
          check(!st[STAT_UNDERRUN_BIT], "no underrun while topped up");
        end
      end
    end
    repeat (140 * 1024) @(posedge clk);
    collect_rx();
    check(exp_l.size() == 0, $sformatf("all streamed pairs played, %0d left", exp_l.size()));

    check(n_init > 0 && n_overflow > 0 && n_underrun > 0 && n_flush > 0 && n_mode >= 3 && n_topup > 1,
          "every mechanism exercised");
    $display("init=%0d overflow=%0d underrun=%0d flush=%0d mode-switches=%0d top-ups=%0d pairs-ok=%0d",
             n_init, n_overflow, n_underrun, n_flush, n_mode, n_topup, rx_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
