// vr_seg_pipe: the K-segment arithmetic pipeline that evaluates the
// reduction operator f.
//
// The two operands a and b enter segment 1 every cycle; the result leaves
// segment K exactly K cycles later (one cycle per segment, common clock),
// so the pipeline accepts a new pair each cycle and holds K operations in
// flight. f (sum, max, min or low-word product, chosen by op) is evaluated
// in full when the operands enter; segments 2..K carry the result on. The
// division of f into K equal stages is left to the arithmetic unit that is
// put in its place: only the K-cycle latency and the one-pair-per-cycle rate
// matter to the reduction schedules.
// A one-bit tag travels with each operation (the sequencer marks the
// operation that produces a final scalar), and op may change at any time:
// the operator is chosen per operation.
module vr_seg_pipe
  import vr_pkg::*;
#(
  parameter int unsigned K = 6,   // number of pipeline segments
  parameter int unsigned W = 32   // data word width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  vr_op_e       op,
  input  logic [W-1:0] a,        // left operand (C or B(t))
  input  logic [W-1:0] b,        // right operand (X[i] or B(t-j))
  input  logic         tag_in,
  output logic [W-1:0] y,        // output of segment K, B(t)
  output logic         tag_out
);

  logic [W-1:0] seg_d [K];
  logic         seg_t [K];
  logic [W-1:0] f_ab;

  always_comb begin
    unique case (op)
      OP_SUM:  f_ab = a + b;
      OP_MAX:  f_ab = ($signed(a) > $signed(b)) ? a : b;
      OP_MIN:  f_ab = ($signed(a) < $signed(b)) ? a : b;
      default: f_ab = W'($signed(a) * $signed(b));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        seg_d[i] <= '0;
        seg_t[i] <= 1'b0;
      end
    end else begin
      seg_d[0] <= f_ab;
      seg_t[0] <= tag_in;
      for (int i = 1; i < K; i++) begin
        seg_d[i] <= seg_d[i-1];
        seg_t[i] <= seg_t[i-1];
      end
    end
  end

  assign y       = seg_d[K-1];
  assign tag_out = seg_t[K-1];

endmodule
