// dcu_wsm_history: programmable-depth history FIFO of the WSM personality.
//
// Keeps the last MAX_DEPTH corrected words so that a record can begin n words
// before the word that triggered it, n = `depth` in 0..MAX_DEPTH (the
// document gives a maximum depth of 64). It is a circular buffer: each
// `in_valid` writes `in_word` at the write pointer, and `del_word` shows, in
// the same clock, the word written `depth` samples earlier (for depth 0 it is
// `in_word` itself). `del_valid` is low until `depth` words have been written
// since reset or `clear`, so that no stale word is ever presented as data.
// Implementing the FIFO as a circular buffer with a moving read offset, and
// the `del_valid` flag, are this design's choices.
module dcu_wsm_history
  import dcu_pkg::*;
#(
  parameter int unsigned MAX_DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  word_t in_word,
  input  logic [$clog2(MAX_DEPTH+1)-1:0] depth,
  output word_t del_word,
  output logic  del_valid
);

  localparam int unsigned AW = $clog2(MAX_DEPTH);
  localparam int unsigned DW = $clog2(MAX_DEPTH+1);

  word_t          mem [MAX_DEPTH];
  logic [AW-1:0]  wptr;
  logic [DW-1:0]  filled;   // words written, saturating at MAX_DEPTH
  logic [AW:0]    rsum;
  logic [AW-1:0]  rptr;

  // rptr = (wptr - depth) mod MAX_DEPTH
  always_comb begin
    rsum = (AW+1)'(wptr) + (AW+1)'(MAX_DEPTH) - (AW+1)'(depth);
    rptr = (rsum >= (AW+1)'(MAX_DEPTH)) ? AW'(rsum - (AW+1)'(MAX_DEPTH)) : AW'(rsum);
  end

  assign del_word  = (depth == '0) ? in_word : mem[rptr];
  assign del_valid = (filled >= depth);

  always_ff @(posedge clk) begin
    if (in_valid) mem[wptr] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      filled <= '0;
    end else if (clear) begin
      wptr   <= '0;
      filled <= '0;
    end else if (in_valid) begin
      wptr   <= (wptr == AW'(MAX_DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (filled != DW'(MAX_DEPTH)) filled <= filled + 1'b1;
    end
  end

endmodule
