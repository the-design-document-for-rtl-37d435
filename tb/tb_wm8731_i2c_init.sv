// tb_wm8731_i2c_init: self-checking test of the codec initialisation FSM.
// Two initialisers run side by side at the default 100 kHz SCL (125 system
// cycles per quarter period), each on its own bus with a codec model: one model
// acknowledges every byte, the other never does. For the first, the
// register writes the model received are compared with the WM8731 set-up
// list written out here, the bus must have seen one START and one STOP per
// write, init_done must rise exactly 11 x 120 quarter periods after reset
// (27 bits plus START, STOP and gap of one bit each per write) and the
// error flag must stay low. For the second, the error flag must be set and
// the sequence must still finish.
module tb_wm8731_i2c_init;
  localparam int Q = 125;   // default: 100 kHz SCL from 50 MHz
  localparam int N = 11;

  logic clk = 0, rst_n = 0;
  logic scl_a, oe_a, codec_oe_a, sda_a, busy_a, done_a, nack_a;
  logic scl_b, oe_b, codec_oe_b, sda_b, busy_b, done_b, nack_b;

  int checks = 0, failures = 0;
  int done_cycle = -1, cyc = 0;

  // expected set-up: {register[6:0], value[8:0]}
  logic [15:0] expected [N] = '{
    {7'h0F, 9'h000}, {7'h00, 9'h080}, {7'h01, 9'h080}, {7'h02, 9'h079},
    {7'h03, 9'h079}, {7'h04, 9'h012}, {7'h05, 9'h000}, {7'h06, 9'h000},
    {7'h07, 9'h002}, {7'h08, 9'h000}, {7'h09, 9'h001}};

  always #5 clk = ~clk;

  assign sda_a = !(oe_a || codec_oe_a);
  assign sda_b = !(oe_b || codec_oe_b);

  wm8731_i2c_init dut_a (
    .clk, .rst_n, .i2c_sclk(scl_a), .i2c_sdat_oe(oe_a), .i2c_sdat_in(sda_a),
    .init_busy(busy_a), .init_done(done_a), .init_nack(nack_a));
  wm8731_i2c_init dut_b (
    .clk, .rst_n, .i2c_sclk(scl_b), .i2c_sdat_oe(oe_b), .i2c_sdat_in(sda_b),
    .init_busy(busy_b), .init_done(done_b), .init_nack(nack_b));

  wm8731_model #(.ACK(1'b1)) codec_a (.sclk(scl_a), .sdat(sda_a), .sdat_oe(codec_oe_a),
                                      .bclk(1'b0), .daclrck(1'b0), .dacdat(1'b0));
  wm8731_model #(.ACK(1'b0)) codec_b (.sclk(scl_b), .sdat(sda_b), .sdat_oe(codec_oe_b),
                                      .bclk(1'b0), .daclrck(1'b0), .dacdat(1'b0));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20 * N * 120 * Q) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles counted from the first edge with reset released
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (done_a && done_cycle < 0) done_cycle = cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(busy_a && !done_a, "busy after reset");
    wait (done_a && done_b);
    repeat (10) @(posedge clk);
    check(codec_a.wr_log.size() == N, "number of register writes");
    for (int i = 0; i < N && i < codec_a.wr_log.size(); i++)
      check(codec_a.wr_log[i] == expected[i], $sformatf("register write %0d", i));
    check(codec_a.regs[9] == 9'h001, "codec activated");
    check(codec_a.regs[7] == 9'h002, "interface format");
    check(codec_a.n_starts == N && codec_a.n_stops == N, "one START and STOP per write");
    check(!nack_a, "no error with acknowledging codec");
    // the counter samples done_a on the edge after the one that sets it
    check(done_cycle == N * 120 * Q + 1, $sformatf("init time %0d cycles", done_cycle));
    check(nack_b, "error flag without acknowledge");
    check(done_b && codec_b.wr_log.size() == 0, "unacknowledged run finishes, stores nothing");
    check(scl_a && sda_a, "bus idle high after init");
    $display("init done after %0d cycles, %0d writes", done_cycle, codec_a.wr_log.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
