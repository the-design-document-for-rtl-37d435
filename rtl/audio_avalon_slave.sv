// audio_avalon_slave: Avalon-MM slave front end of the audio peripheral.
//
// The HPS reaches the peripheral over the lightweight HPS-to-FPGA bridge
// with a 32-bit data bus and four word registers (byte offsets 0x00, 0x04,
// 0x08, 0x0C; see fighter_audio_pkg). This block turns bus cycles into
// one-cycle register strobes and returns read data.
//
// How it works: a write with chipselect becomes exactly one of ctrl_wr,
// left_wr or right_wr, together with the write data, in the same cycle. A
// write to the FIFO-space register (read only) is ignored. A read with
// chipselect selects the status word, the FIFO-space word or zero (the
// sample registers are write only) and registers it, so readdata is valid
// the cycle after the read: fixed read latency 1, no wait states.
// The address map and the 32-bit bus follow the design; the read latency,
// the absence of waitrequest and the write-only sample registers are this
// implementation's choices.
module audio_avalon_slave
  import fighter_audio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [1:0]  avs_address,
  input  logic        avs_chipselect,
  input  logic        avs_read,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  output logic [31:0] avs_readdata,
  // towards the register block
  output reg_write_t  reg_wr,
  input  logic [31:0] status_word,
  input  logic [31:0] fifospace_word
);

  reg_addr_e addr;
  assign addr = reg_addr_e'(avs_address);

  logic wr_en, rd_en;
  assign wr_en = avs_chipselect && avs_write;
  assign rd_en = avs_chipselect && avs_read;

  always_comb begin
    reg_wr          = '0;
    reg_wr.wdata    = avs_writedata;
    reg_wr.ctrl_wr  = wr_en && (addr == REG_CTRL);
    reg_wr.left_wr  = wr_en && (addr == REG_LEFT);
    reg_wr.right_wr = wr_en && (addr == REG_RIGHT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata <= '0;
    end else if (rd_en) begin
      unique case (addr)
        REG_CTRL:      avs_readdata <= status_word;
        REG_FIFOSPACE: avs_readdata <= fifospace_word;
        default:       avs_readdata <= '0;
      endcase
    end
  end

  // Avalon rule for this slave: one transfer per cycle, never a read and a
  // write together.
  a_no_rd_wr_together: assert property (@(posedge clk) disable iff (!rst_n)
    avs_chipselect |-> !(avs_read && avs_write));

endmodule
