// line_fifo: the line buffer behind the 7x7 shift window (the block-RAM FIFO
// of the original system).
//
// Every shift-window row except the last hands its right-most pixel to this
// buffer, which returns it, one line later, at the left end of the next row.
// All LANES rows share one memory of LANES*PIX_W-bit words, accessed strictly
// in order, never at random: a circular buffer whose read and write pointer is
// the same address. On each enabled clock the word at the pointer is read out
// (read-first) and overwritten with the new input, then the pointer advances,
// wrapping after `depth` words (or MAX_DEPTH, whichever is smaller). The read
// data is registered, as in a block RAM, so a word presented on din at one
// enabled clock appears on dout after the depth-th following enabled clock.
//
// The buffer is built as a fixed-delay circular buffer rather than a FIFO with
// full/empty flags; the delay is a run-time input so that one build serves any
// image width up to MAX_DEPTH+8 (the detector sets depth = width-8:
// 7 window stages, this buffer and the read register make one line).
// Changing depth takes effect at once; words written under the old depth are
// stale until one full line has passed. Reset clears the pointer and output
// register, not the memory.
module line_fifo #(
  parameter int unsigned LANES     = 6,
  parameter int unsigned PIX_W     = 8,
  parameter int unsigned MAX_DEPTH = 632,
  localparam int unsigned AW       = $clog2(MAX_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,        // one step per accepted pixel
  input  logic [AW-1:0]          depth,     // words in the loop, 2..MAX_DEPTH
  input  logic [LANES*PIX_W-1:0] din,
  output logic [LANES*PIX_W-1:0] dout
);

  logic [LANES*PIX_W-1:0] mem [MAX_DEPTH];
  logic [AW-1:0]          ptr;

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      dout <= '0;
    end else if (en) begin
      dout <= mem[ptr];
      if (ptr >= depth - 1'b1 || ptr == AW'(MAX_DEPTH - 1)) ptr <= '0;
      else                     ptr <= ptr + 1'b1;
    end
  end

endmodule
