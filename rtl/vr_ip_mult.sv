// vr_ip_mult: element multiplier cascaded in front of the reduction
// pipeline, so that a summation over its products gives the inner product
// of two vectors, S = sum A[i]*B[i].
//
// With ip_en high the element passed on is the low W bits of the signed
// product a*b; with ip_en low a is passed on unchanged and the processor
// reduces a single vector. Purely combinational, so the element stream
// keeps its one-element-per-cycle rate and timing.
module vr_ip_mult #(
  parameter int unsigned W = 32
) (
  input  logic         ip_en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);

  always_comb begin
    if (ip_en) x = W'($signed(a) * $signed(b));
    else       x = a;
  end

endmodule
