// vr_mean_div: output stage for the mean value, M = (sum of X[i]) / N.
//
// The processor reduces the vector with a summation; when mean_en is high
// this stage divides each final sum by the vector length N on its way out
// (signed division, quotient rounded toward zero). With mean_en low the
// sum passes unchanged. Purely combinational, so results keep their
// one-per-cycle rate. The mean value as a reduction is part of the
// published set of operations; how the division is done is this design's
// choice.
module vr_mean_div #(
  parameter int unsigned W  = 32,
  parameter int unsigned NW = 16
) (
  input  logic          mean_en,
  input  logic [W-1:0]  sum,
  input  logic [NW-1:0] n,       // vector length, >= 1
  output logic [W-1:0]  z
);

  localparam int unsigned DW = (W > NW) ? W : NW + 1;

  logic signed [DW-1:0] num, den, quo;

  always_comb begin
    num = DW'($signed(sum));
    den = $signed({{(DW-NW){1'b0}}, n});
    // kept apart from any unsigned operand so that the division is signed
    quo = num / den;
    if (n == '0) quo = '0;
    z   = mean_en ? quo[W-1:0] : sum;
  end

endmodule
