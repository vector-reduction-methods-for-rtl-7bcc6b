// vr_operand_mux: the two operand multiplexers in front of the pipeline.
//
// The left multiplexer, steered by c1, offers the constant C (0) or the
// feedback B(t) (1); the right one, steered by c0, offers the new element
// X[i] (0) or the latched feedback B(t-j) (1). Outside the input phase
// (x_en low) no element is supplied and C takes the place of X[i], so the
// pair (0,0) becomes the dummy pair (C,C) of the merging phase. This gives the four input
// pairs (C,X), (C,B(t-j)), (B(t),X) and (B(t),B(t-j)). C is the identity of
// the current operator f, so a pair that carries C passes its other operand
// unchanged and (C,C) makes an unproductive, harmless operation.
// Purely combinational.
module vr_operand_mux
  import vr_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  vr_op_e       op,
  input  vr_ctl_t      ctl,
  input  logic [W-1:0] fb,       // B(t), feedback from the end of the loop
  input  logic [W-1:0] lat,      // B(t-j), output of the latch / FIFO
  input  logic [W-1:0] x,        // X[i], element from memory
  input  logic         x_en,     // an element is supplied this cycle
  output logic [W-1:0] a,
  output logic [W-1:0] b
);

  logic [W-1:0] c_const;

  always_comb begin
    c_const = vr_identity(op, W)[W-1:0];
    a = ctl.c1 ? fb  : c_const;
    b = ctl.c0 ? lat : (x_en ? x : c_const);
  end

endmodule
