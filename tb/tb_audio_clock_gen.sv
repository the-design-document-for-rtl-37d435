// tb_audio_clock_gen: self-checking test of the codec clock generator at its
// default ratios. Over 20 frames it measures, in system cycles, the high and
// low times of XCK (2 + 2), BCLK (8 + 8) and LRCK (512 + 512), giving
// 12.5 MHz, 3.125 MHz and 48.83 kHz from 50 MHz and XCK = 256 x LRCK. It
// also checks that LRCK only changes where BCLK falls, that shift_tick is
// high exactly in the cycle before each falling BCLK edge, and that
// next_slot counts 0..63 around the frame with slot 0 starting the low
// (left) half of LRCK.
module tb_audio_clock_gen;
  localparam int MCLK_DIV = 4, BCLK_DIV = 16, FRAME_BITS = 64;

  logic clk = 0, rst_n = 0;
  logic aud_xck, aud_bclk, aud_lrck, shift_tick;
  logic [5:0] next_slot;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  audio_clock_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p_xck, p_bclk, p_lrck, p_tick;
    logic [5:0] p_slot;
    int run_x, run_b, run_l, ticks, lrck_edges;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    p_xck = aud_xck; p_bclk = aud_bclk; p_lrck = aud_lrck; p_tick = shift_tick; p_slot = next_slot;
    run_x = 0; run_b = 0; run_l = 0; ticks = 0; lrck_edges = 0;
    for (int cyc = 0; cyc < 20 * BCLK_DIV * FRAME_BITS; cyc++) begin
      @(negedge clk);
      run_x++; run_b++; run_l++;
      if (aud_xck != p_xck) begin
        check(run_x == MCLK_DIV / 2 || cyc < MCLK_DIV, "XCK half period");
        run_x = 0;
      end
      if (aud_bclk != p_bclk) begin
        check(run_b == BCLK_DIV / 2 || cyc < BCLK_DIV, "BCLK half period");
        run_b = 0;
      end
      // falling BCLK exactly after a shift_tick cycle
      check((p_bclk && !aud_bclk) == p_tick, "shift_tick precedes falling BCLK");
      if (aud_lrck != p_lrck) begin
        check(p_bclk && !aud_bclk, "LRCK changes with falling BCLK");
        if (lrck_edges > 0) check(run_l == BCLK_DIV * FRAME_BITS / 2, "LRCK half period");
        check(aud_lrck == (p_slot >= 6'(FRAME_BITS / 2)), "LRCK level follows slot");
        lrck_edges++;
        run_l = 0;
      end
      if (p_tick) begin
        ticks++;
        check(next_slot == ((p_slot == 6'(FRAME_BITS - 1)) ? 6'd0 : p_slot + 6'd1), "slot counts");
        if (p_slot == 6'd0) check(aud_lrck == 1'b0, "slot 0 is left half");
      end
      p_xck = aud_xck; p_bclk = aud_bclk; p_lrck = aud_lrck; p_tick = shift_tick; p_slot = next_slot;
    end
    check(ticks == 20 * FRAME_BITS, $sformatf("bit clocks in 20 frames: %0d", ticks));
    check(lrck_edges == 40 || lrck_edges == 39, $sformatf("LRCK edges: %0d", lrck_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
