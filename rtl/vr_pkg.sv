// vr_pkg: types and functions shared by the vector reduction processor.
//
// The reduction operator f is one of the common vector reductions:
// vector summation, search for the maximum, search
// for the minimum and vector chain product (the inner product is a
// summation fed by the multiplier in front of the processor). Each operator
// has an identity element, used as the constant input C of the pipeline:
// f(C, x) = x, so that C can stand for an empty (unproductive) operand.
// Data are signed two's-complement words; the product keeps the low word.
// The mean value is a summation whose results are divided by N at the
// output of the processor.
package vr_pkg;

  // reduction operator f
  typedef enum logic [1:0] {
    OP_SUM  = 2'd0,
    OP_MAX  = 2'd1,
    OP_MIN  = 2'd2,
    OP_PROD = 2'd3
  } vr_op_e;

  // group-merging method
  typedef enum logic {
    METH_SR = 1'b0,   // symmetric reduction
    METH_AR = 1'b1    // asymmetric reduction
  } vr_meth_e;

  // control word of the operand multiplexers and the latch, as in the
  // mux table: c1 picks C / B(t), c0 picks X[i] / latched B(t-j), e latches
  typedef struct packed {
    logic c1;
    logic c0;
    logic e;
  } vr_ctl_t;

  localparam vr_ctl_t CTL_CC    = '{c1: 1'b0, c0: 1'b0, e: 1'b0}; // (C, X) or idle
  localparam vr_ctl_t CTL_LATCH = '{c1: 1'b0, c0: 1'b0, e: 1'b1}; // (C, C) and latch B(t)
  localparam vr_ctl_t CTL_MERGE = '{c1: 1'b1, c0: 1'b1, e: 1'b0}; // (B(t), B(t-j))
  localparam vr_ctl_t CTL_PART  = '{c1: 1'b1, c0: 1'b0, e: 1'b0}; // (B(t), X[i])
  localparam vr_ctl_t CTL_PASS  = '{c1: 1'b0, c0: 1'b1, e: 1'b0}; // (C, B(t-j))

  // identity element of f for a W-bit signed word
  function automatic logic [63:0] vr_identity(vr_op_e op, int unsigned w);
    logic [63:0] v;
    unique case (op)
      OP_SUM:  v = '0;
      OP_MAX:  v = 64'(1) << (w - 1);               // most negative
      OP_MIN:  v = (64'(1) << (w - 1)) - 64'(1);    // most positive
      default: v = 64'(1);
    endcase
    return v;
  endfunction

endpackage
