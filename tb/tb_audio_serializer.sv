// tb_audio_serializer: self-checking test of the I2S serialiser. The bit
// clock ticks come from a counter here (one every 4 cycles, 64 slots a
// frame) and the two FIFOs are modelled by queues with show-ahead heads.
// Every bit placed on aud_dacdat is compared with the I2S slot layout
// worked out here from the sample pair the frame should carry: left MSB in
// slot 1, right MSB in slot 33, zeros elsewhere. Pops must occur once per
// frame, only at its start, only with playback enabled and both queues
// non-empty; otherwise the frame is silent, with underrun_evt when enabled.
// The test runs played, underrun (one queue empty) and disabled frames and
// fails if any kind never occurred.
module tb_audio_serializer;
  localparam int SB = 16, FB = 64, TICK = 4;

  logic clk = 0, rst_n = 0;
  logic play_en = 0, shift_tick = 0;
  logic [5:0] next_slot = '0;
  logic [SB-1:0] left_data, right_data;
  logic left_empty, right_empty;
  logic pop, underrun_evt, aud_dacdat;

  logic [SB-1:0] lq[$], rq[$];
  logic [SB-1:0] exp_l = '0, exp_r = '0;
  int checks = 0, failures = 0;
  int n_play = 0, n_under = 0, n_idle = 0;

  always #5 clk = ~clk;

  // FIFO heads, refreshed whenever a queue changes
  task automatic refresh();
    left_empty  = (lq.size() == 0);
    right_empty = (rq.size() == 0);
    left_data   = left_empty  ? '0 : lq[0];
    right_data  = right_empty ? '0 : rq[0];
  endtask

  audio_serializer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic exp_bit(int s);
    if (s >= 1 && s <= SB)               return exp_l[SB - s];
    if (s >= FB/2 + 1 && s <= FB/2 + SB) return exp_r[SB - (s - FB/2)];
    return 1'b0;
  endfunction

  initial begin
    int slot;
    slot = FB - 1;
    refresh();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 60; frame++) begin
      // scenario for this frame, set before its first tick
      @(negedge clk);
      play_en = (frame % 10) != 9;
      if (frame % 7 == 3) begin
        // starve the left channel: right keeps data, left is empty
        lq.delete();
        if (rq.size() == 0) rq.push_back(SB'($urandom));
      end else begin
        while (lq.size() < 3) lq.push_back(SB'($urandom));
        while (rq.size() < lq.size()) rq.push_back(SB'($urandom));
      end
      refresh();
      for (int b = 0; b < FB; b++) begin
        for (int t = 0; t < TICK; t++) begin
          bit is_tick, start, exp_pop;
          @(negedge clk);
          is_tick    = (t == TICK - 1);
          slot       = is_tick ? (slot + 1) % FB : slot;
          shift_tick = is_tick;
          next_slot  = 6'(slot);
          start      = is_tick && (slot == 0);
          exp_pop    = start && play_en && lq.size() > 0 && rq.size() > 0;
          #1;
          check(pop == exp_pop, "pop");
          check(underrun_evt == (start && play_en && !exp_pop), "underrun_evt");
          if (start) begin
            if (exp_pop) begin
              exp_l = lq[0]; exp_r = rq[0]; n_play++;
            end else begin
              exp_l = '0; exp_r = '0;
              if (play_en) n_under++; else n_idle++;
            end
          end
          @(posedge clk);
          #1;
          if (exp_pop) begin
            void'(lq.pop_front());
            void'(rq.pop_front());
            refresh();
          end
          if (is_tick) check(aud_dacdat == exp_bit(slot), $sformatf("DACDAT slot %0d", slot));
        end
      end
    end
    check(n_play > 0,  "played frames");
    check(n_under > 0, "underrun frames");
    check(n_idle > 0,  "disabled frames");
    $display("played=%0d underrun=%0d disabled=%0d", n_play, n_under, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
