// wm8731_model: behavioural model of the WM8731 audio codec, for testbenches
// only (not synthesizable). It models the two digital ports the FPGA drives:
//  * the two-wire control port as a write-only I2C slave at address 0x34:
//    it acknowledges its address and both data bytes (unless ACK is 0),
//    and on STOP after three bytes stores the 9-bit value in its register
//    file and appends {register, value} to wr_log;
//  * the DAC half of the digital audio interface in I2S slave mode, 16-bit:
//    it samples DACDAT on rising BCLK, takes the MSB in the second bit clock
//    after each LRCK edge, and appends each completed left/right pair to
//    rx_left/rx_right.
// sdat_oe = 1 means the model pulls SDA low; the testbench combines it with
// the master's pull-down into the bus level.
module wm8731_model #(
  parameter bit ACK = 1'b1
) (
  input  logic sclk,
  input  logic sdat,
  output logic sdat_oe,
  input  logic bclk,
  input  logic daclrck,
  input  logic dacdat
);

  logic [8:0]  regs [16];
  logic [15:0] wr_log [$];
  logic [15:0] rx_left [$];
  logic [15:0] rx_right [$];
  int          n_starts = 0, n_stops = 0;

  // ---------------- I2C slave ----------------
  bit         active = 0, in_ack = 0;
  int         bitcnt = 0, byte_idx = 0;
  logic [7:0] shreg = '0;
  logic [7:0] bytes [3];

  initial sdat_oe = 1'b0;

  always @(negedge sdat) if (sclk) begin     // START
    active   = 1;
    in_ack   = 0;
    bitcnt   = 0;
    byte_idx = 0;
    n_starts++;
  end

  always @(posedge sdat) if (sclk) begin     // STOP
    if (active && byte_idx == 3 && ACK && bytes[0] == 8'h34) begin
      regs[bytes[1][7:1]] = {bytes[1][0], bytes[2]};
      wr_log.push_back({bytes[1], bytes[2]});
    end
    active = 0;
    n_stops++;
  end

  always @(posedge sclk) if (active && !in_ack) begin
    shreg = {shreg[6:0], sdat};
    bitcnt++;
  end

  always @(negedge sclk) if (active) begin
    if (in_ack) begin
      sdat_oe <= 1'b0;
      in_ack  = 0;
      bitcnt  = 0;
    end else if (bitcnt == 8) begin
      if (byte_idx < 3) bytes[byte_idx] = shreg;
      in_ack = 1;
      sdat_oe <= ACK && (byte_idx != 0 || shreg == 8'h34);
      byte_idx++;
    end
  end

  // ---------------- I2S receiver ----------------
  logic        prev_lrck = 1'b0;
  int          bitpos = 0;
  logic [15:0] rx_sh = '0, held_left = '0;

  always @(posedge bclk) begin
    if (daclrck != prev_lrck) bitpos = 0;
    else                      bitpos++;
    if (bitpos >= 1 && bitpos <= 16) rx_sh = {rx_sh[14:0], dacdat};
    if (bitpos == 16) begin
      if (!daclrck) held_left = rx_sh;
      else begin
        rx_left.push_back(held_left);
        rx_right.push_back(rx_sh);
      end
    end
    prev_lrck = daclrck;
  end

endmodule
