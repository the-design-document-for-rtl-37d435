// tb_audio_sample_fifo: self-checking test of the 128 x 16 sample FIFO at
// its default size. A queue model predicts rd_data, empty, full, count and
// free every cycle while random pushes, pops and occasional flushes run;
// phases of push-only and pop-only traffic drive it to full (pushes then
// dropped) and to empty (pops then ignored). It counts each of these
// situations and fails if one never happened.
module tb_audio_sample_fifo;
  localparam int DEPTH = 128;
  localparam int WIDTH = 16;
  localparam int CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic flush = 0, push = 0, pop = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [CW-1:0] count, free;

  int checks = 0, failures = 0;
  int n_full_push = 0, n_empty_pop = 0, n_flush = 0;
  logic [WIDTH-1:0] model[$];

  always #5 clk = ~clk;

  audio_sample_fifo dut (.*);

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

  initial begin
    int p_push, p_pop;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // traffic mix changes every 500 cycles: fill, drain, balanced
      unique case ((cyc / 500) % 3)
        0: begin p_push = 90; p_pop = 10; end
        1: begin p_push = 10; p_pop = 90; end
        default: begin p_push = 50; p_pop = 50; end
      endcase
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full  == (model.size() == DEPTH), "full");
      check(count == CW'(model.size()), "count");
      check(free  == CW'(DEPTH - model.size()), "free");
      if (model.size() > 0) check(rd_data == model[0], "rd_data");
      push    = ($urandom_range(99) < p_push);
      pop     = ($urandom_range(99) < p_pop);
      flush   = ($urandom_range(2999) == 0);
      wr_data = WIDTH'($urandom);
      @(posedge clk);
      if (flush) begin
        model.delete();
        n_flush++;
      end else begin
        int size_before;
        size_before = model.size();
        if (push && size_before == DEPTH) n_full_push++;
        if (pop && size_before == 0) n_empty_pop++;
        if (pop && size_before > 0) void'(model.pop_front());
        if (push && size_before < DEPTH) model.push_back(wr_data);
      end
    end
    check(n_full_push > 0, "push to a full FIFO happened");
    check(n_empty_pop > 0, "pop from an empty FIFO happened");
    check(n_flush > 0,     "flush happened");
    $display("full-pushes=%0d empty-pops=%0d flushes=%0d", n_full_push, n_empty_pop, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
