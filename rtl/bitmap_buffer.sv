// bitmap_buffer: storage for a bitmap that is written one memory word at a
// time and read as a whole bit vector.
//
// Used for the first-step (block) bitmap, the second-step (element) bitmaps
// of the kept blocks, and the bitmap of the current activation row.  The
// bitmap decoder reads all bits in parallel every cycle, so the buffer is a
// register vector rather than an addressed RAM.
//
// Interface: `clr` zeroes every bit; `we` writes `wdata` to word `waddr`
// (bits waddr*WORD_W .. waddr*WORD_W+WORD_W-1).  `bits` shows the stored
// bitmap, bit 0 first.  Both writes and clears take effect at the next
// rising edge; `clr` wins over `we`.  Reset clears the buffer.
// The bitmap buffers are named in the source design; their organisation is
// this implementation's choice.
module bitmap_buffer #(
  parameter int unsigned BITS   = 16,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned NWORDS = (BITS + WORD_W - 1) / WORD_W,
  localparam int unsigned WA_W   = (NWORDS > 1) ? $clog2(NWORDS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              we,
  input  logic [WA_W-1:0]   waddr,
  input  logic [WORD_W-1:0] wdata,
  output logic [BITS-1:0]   bits
);

  logic [NWORDS*WORD_W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (clr) begin
      mem <= '0;
    end else if (we && (32'(waddr) < NWORDS)) begin
      mem[waddr*WORD_W +: WORD_W] <= wdata;
    end
  end

  assign bits = mem[BITS-1:0];

endmodule
