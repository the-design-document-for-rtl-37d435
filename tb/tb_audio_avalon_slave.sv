// tb_audio_avalon_slave: self-checking test of the Avalon-MM front end.
// Random bus cycles (reads, writes, idle, chipselect low) go to all four
// word addresses. Each cycle the write strobes are compared with the
// address decode worked out here, and each read's data is compared one
// cycle later with the word the register block offered (read latency 1):
// the status word at 0x00, the FIFO-space word at 0x04, zero for the
// write-only sample registers.
module tb_audio_avalon_slave;
  import fighter_audio_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0]  avs_address = '0;
  logic        avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  reg_write_t  reg_wr;
  logic [31:0] status_word = '0, fifospace_word = '0;

  int checks = 0, failures = 0;
  int n_reads [4] = '{default: 0};
  int n_writes[4] = '{default: 0};

  always #5 clk = ~clk;

  audio_avalon_slave dut (.*);

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
    bit          pend_rd;
    logic [31:0] pend_val;
    pend_rd = 0;
    pend_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int op;
      @(negedge clk);
      // read data of the previous cycle's read
      if (pend_rd) check(avs_readdata == pend_val, "readdata");
      op = $urandom_range(3);           // 0 idle, 1 read, 2 write, 3 no chipselect
      avs_address    = 2'($urandom);
      avs_chipselect = (op != 3);
      avs_read       = (op == 1) || (op == 3 && $urandom_range(1) == 1);
      avs_write      = (op == 2);
      avs_writedata  = $urandom;
      status_word    = $urandom;
      fifospace_word = $urandom;
      #1;
      check(reg_wr.wdata == avs_writedata, "wdata");
      check(reg_wr.ctrl_wr  == (op == 2 && avs_address == 2'd0), "ctrl_wr");
      check(reg_wr.left_wr  == (op == 2 && avs_address == 2'd2), "left_wr");
      check(reg_wr.right_wr == (op == 2 && avs_address == 2'd3), "right_wr");
      pend_rd  = (op == 1);
      pend_val = (avs_address == 2'd0) ? status_word :
                 (avs_address == 2'd1) ? fifospace_word : 32'h0;
      if (op == 1) n_reads[avs_address]++;
      if (op == 2) n_writes[avs_address]++;
    end
    for (int a = 0; a < 4; a++) begin
      check(n_reads[a] > 0,  "every address read");
      check(n_writes[a] > 0, "every address written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
