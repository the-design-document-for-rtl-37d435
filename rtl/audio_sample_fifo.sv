// audio_sample_fifo: synchronous first-in first-out buffer for one audio
// channel. The peripheral has two of them, left and right, each 128 words of
// 16 bits, filled by the bus writes to the sample registers and drained by
// the serialiser once per audio frame.
//
// How it works: a RAM array with a write and a read pointer and an occupancy
// counter. The head word is presented on rd_data before it is popped
// (show-ahead), so the consumer reads and pops in the same cycle. A push to a
// full FIFO and a pop from an empty one are ignored; the register block
// reports the lost write as an overflow. flush empties the FIFO in one cycle
// and wins over a simultaneous push or pop.
//
// Interface: push/wr_data, pop/rd_data, full, empty, count (words held) and
// free (words that can still be written), all in the clk domain.
// Timing: a pushed word is visible on rd_data the cycle after the push.
// Depth and width follow the design (128 x 16); the show-ahead read and the
// flush input are this implementation's choices.
module audio_sample_fifo #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count,
  output logic [CW-1:0]    free
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] ptr_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (flush) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= ptr_inc(wptr);
      if (do_pop)  rptr <= ptr_inc(rptr);
      unique case ({do_push, do_pop})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  assign rd_data = mem[rptr];
  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign free    = CW'(DEPTH) - count;

endmodule
