// tb_audio_ctrl_regs: self-checking test of the control/status and
// FIFO-space registers. Random register writes, FIFO states and underrun
// pulses are applied; a model kept here tracks play enable, the flush pulse
// and the sticky overflow/underrun flags, and the status and FIFO-space
// words are compared bit by bit with the layout in fighter_audio_pkg every
// cycle. Counts flag sets, flag clears and flushes and fails if one never
// happened.
module tb_audio_ctrl_regs;
  import fighter_audio_pkg::*;
  localparam int CW = 8;

  logic clk = 0, rst_n = 0;
  reg_write_t reg_wr = '0;
  logic codec_ready = 0, i2c_nack = 0;
  logic left_full = 0, right_full = 0, left_empty = 1, right_empty = 1;
  logic [CW-1:0] left_free = '0, right_free = '0;
  logic underrun_evt = 0;
  logic play_en, fifo_flush;
  logic [31:0] status_word, fifospace_word;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_clr = 0, n_flush = 0;
  bit m_play, m_flush, m_ovf, m_unf;

  always #5 clk = ~clk;

  audio_ctrl_regs dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_stat, exp_space;
    int sel;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // random inputs for this cycle
      reg_wr          = '0;
      reg_wr.wdata    = $urandom;
      sel = $urandom_range(7);
      unique case (sel)
        0: reg_wr.ctrl_wr  = 1;
        1: reg_wr.left_wr  = 1;
        2: reg_wr.right_wr = 1;
        default: ;
      endcase
      // flag-clear and flush bits set only now and then
      if ($urandom_range(3) != 0) reg_wr.wdata[CTRL_CLR_FLAGS_BIT] = 0;
      codec_ready  = $urandom;
      i2c_nack     = $urandom;
      left_full    = ($urandom_range(3) == 0);
      right_full   = ($urandom_range(3) == 0);
      left_empty   = $urandom;
      right_empty  = $urandom;
      left_free    = CW'($urandom);
      right_free   = CW'($urandom);
      underrun_evt = ($urandom_range(15) == 0);
      #1;
      exp_stat = '0;
      exp_stat[STAT_PLAY_EN_BIT]     = m_play;
      exp_stat[STAT_CODEC_READY_BIT] = codec_ready;
      exp_stat[STAT_I2C_NACK_BIT]    = i2c_nack;
      exp_stat[STAT_OVERFLOW_BIT]    = m_ovf;
      exp_stat[STAT_UNDERRUN_BIT]    = m_unf;
      exp_stat[STAT_LEFT_EMPTY_BIT]  = left_empty;
      exp_stat[STAT_RIGHT_EMPTY_BIT] = right_empty;
      exp_space = {left_free, right_free, 16'h0};
      check(status_word == exp_stat, "status word");
      check(fifospace_word == exp_space, "fifospace word");
      check(play_en == m_play, "play_en");
      check(fifo_flush == m_flush, "fifo_flush");
      // model update for the coming edge
      @(posedge clk);
      m_flush = reg_wr.ctrl_wr && reg_wr.wdata[CTRL_FLUSH_BIT];
      if (m_flush) n_flush++;
      if (reg_wr.ctrl_wr) m_play = reg_wr.wdata[CTRL_PLAY_EN_BIT];
      if (reg_wr.ctrl_wr && reg_wr.wdata[CTRL_CLR_FLAGS_BIT]) begin
        if (m_ovf || m_unf) n_clr++;
        m_ovf = 0;
        m_unf = 0;
      end else begin
        if ((reg_wr.left_wr && left_full) || (reg_wr.right_wr && right_full)) begin
          m_ovf = 1;
          n_ovf++;
        end
        if (underrun_evt) begin
          m_unf = 1;
          n_unf++;
        end
      end
    end
    check(n_ovf > 0,   "overflow happened");
    check(n_unf > 0,   "underrun happened");
    check(n_clr > 0,   "flags cleared");
    check(n_flush > 0, "flush issued");
    $display("overflows=%0d underruns=%0d clears=%0d flushes=%0d", n_ovf, n_unf, n_clr, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
