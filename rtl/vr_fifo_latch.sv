// vr_fifo_latch: the latch of the feedback path, built as a FIFO so that
// each of several interleaved vectors has its own latched group.
//
// When e (push) is high the feedback value B(t) is written at the tail.
// The head is always visible on dout (first-word fall-through) and is
// removed when the operand multiplexer takes it (pop, i.e. c0 = 1). With a
// single vector the FIFO never holds more than one word and behaves as the
// plain latch of the single-vector processor. Its depth is K-1 words, which
// covers the largest number of vectors that still need a merging phase.
// Writes and reads take effect at the clock edge; push and pop in the same
// cycle are allowed. Pushing when full and popping when empty are errors.
// The depth of K-1 is that of the published method; the circular-buffer
// organisation is this design's choice.
module vr_fifo_latch #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 5    // K-1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,      // empty the FIFO (start of an operation)
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !clr) mem[wr_ptr] <= din;
  end

  assign dout  = mem[rd_ptr];
  assign empty = (count == '0);
  assign full  = (32'(count) == DEPTH);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clr) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clr) pop |-> !empty);

endmodule
