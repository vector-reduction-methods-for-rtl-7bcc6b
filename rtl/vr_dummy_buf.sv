// vr_dummy_buf: the dummy segment buffer, a delay line placed after
// segment K in the feedback loop.
//
// The output of the last pipeline segment enters the buffer every cycle.
// The feedback taken from the buffer is the word that entered it D cycles
// earlier, D being set by program (0 to DMAX); with D = 0 the pipeline
// output is fed back directly. The loop then behaves as a pipeline of K+D
// segments, so that K+D can be made a multiple of the number of interleaved
// vectors. The buffer is a shift register; D is a run-time tap select.
// The buffer and its programmable length follow the published method; the
// maximum length DMAX (K by default, for up to 2K vectors) is this design's.
module vr_dummy_buf #(
  parameter int unsigned W    = 32,
  parameter int unsigned DMAX = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [$clog2(DMAX+1)-1:0] d_len,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] sr [DMAX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DMAX; i++) sr[i] <= '0;
    end else begin
      sr[0] <= din;
      for (int i = 1; i < DMAX; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    dout = din;
    for (int i = 1; i <= DMAX; i++)
      if (32'(d_len) == i) dout = sr[i-1];
  end

  a_len_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(d_len) <= DMAX);

endmodule
