// vr_processor: pipelined vector reduction processor with a feedback loop.
//
// A reduction f (sum, max, min, product; with the front multiplier also the
// inner product, with the output divider also the mean value) turns each of M vectors of N elements into one scalar on a
// single K-segment arithmetic pipeline. The pipeline output B(t) is fed
// back, through a dummy segment buffer of D segments, to one operand input;
// a FIFO latch holds fed-back groups that wait for their partner. Two
// multiplexers choose the operands: (C or B(t)) and (X[i] or the latched
// group), C being the identity of f. The sequencer first streams the
// elements in, one per cycle, folding them into Q partial groups per vector
// (Q = K for one vector), then merges the groups pairwise, using either the
// symmetric (SR) or the asymmetric (AR) schedule, and finally drains the
// pipeline. No intermediate vector buffer is needed.
// Interface:
//   start with cfg_* (sampled while idle): cfg_n elements per vector,
//   cfg_m vectors (1..2K), cfg_op operator, cfg_meth SR/AR, cfg_ip inner
//   product mode, cfg_mean mean value (use with the summation: each result
//   is divided by N). cfg_op and cfg_ip must stay steady while busy;
//   cfg_n and cfg_mean are sampled at start.
//   Memory side: when x_ready is high, the element x_elem of vector x_vec
//   (both from 0) must be on x_a (and its partner on x_b for the inner
//   product) in the same cycle; there is no back-pressure.
//   Results: z_valid with z_data for vector z_vec, in vector order.
// Timing, from the cycle of the first element to that of the last result:
// M*N + M*Tm + K cycles, Tm the number of merge steps (for one vector and
// N >= K, Tm = K*ceil(log2 K) + 2^ceil(log2 K) - K for SR and
// K*ceil(log2 K) - 2^ceil(log2 K) + K for AR).
// The loop structure, the control words and both schedules follow the
// published method. Word width, reset, the memory handshake, the result tag,
// the 2K-vector limit and the combinational multiplier are own choices.
module vr_processor
  import vr_pkg::*;
#(
  parameter int unsigned K    = 6,     // pipeline segments
  parameter int unsigned W    = 32,    // data word width
  parameter int unsigned NW   = 16,    // width of the vector length
  parameter int unsigned MMAX = 2*K,   // most interleaved vectors
  parameter int unsigned DMAX = MMAX - K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] cfg_n,
  input  logic [$clog2(MMAX+1)-1:0] cfg_m,
  input  vr_op_e        cfg_op,
  input  vr_meth_e      cfg_meth,
  input  logic          cfg_ip,
  input  logic          cfg_mean,
  output logic          x_ready,
  output logic [$clog2(MMAX+1)-1:0] x_vec,
  output logic [NW-1:0] x_elem,
  input  logic [W-1:0]  x_a,
  input  logic [W-1:0]  x_b,
  output logic          z_valid,
  output logic [$clog2(MMAX+1)-1:0] z_vec,
  output logic [W-1:0]  z_data,
  output logic          busy,
  output logic          done
);

  localparam int unsigned MW = $clog2(MMAX+1);

  vr_ctl_t      ctl;
  logic [W-1:0] x, fb, lat, op_a, op_b, pipe_y;
  logic         tag, tag_out, fifo_clr, fifo_empty, fifo_full;
  logic [$clog2(K)-1:0] fifo_count;   // observed by testbenches
  logic [$clog2(DMAX+1)-1:0] d_len;
  logic [NW-1:0] n_reg;
  logic          mean_reg;

  vr_ip_mult #(.W(W)) u_mult (.ip_en(cfg_ip), .a(x_a), .b(x_b), .x(x));

  vr_seq #(.K(K), .MMAX(MMAX), .DMAX(DMAX), .NW(NW)) u_seq (
    .clk, .rst_n, .start, .cfg_n, .cfg_m, .cfg_meth,
    .ctl, .x_en(x_ready), .x_vec, .x_elem, .tag, .tag_out,
    .d_len, .fifo_clr, .busy, .done
  );

  vr_operand_mux #(.W(W)) u_mux (
    .op(cfg_op), .ctl, .fb, .lat, .x, .x_en(x_ready), .a(op_a), .b(op_b)
  );

  vr_seg_pipe #(.K(K), .W(W)) u_pipe (
    .clk, .rst_n, .op(cfg_op), .a(op_a), .b(op_b),
    .tag_in(tag), .y(pipe_y), .tag_out
  );

  vr_dummy_buf #(.W(W), .DMAX(DMAX)) u_dummy (
    .clk, .rst_n, .d_len, .din(pipe_y), .dout(fb)
  );

  vr_fifo_latch #(.W(W), .DEPTH(K-1)) u_fifo (
    .clk, .rst_n, .clr(fifo_clr), .push(ctl.e), .din(fb),
    .pop(ctl.c0), .dout(lat), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  vr_mean_div #(.W(W), .NW(NW)) u_mean (
    .mean_en(mean_reg), .sum(pipe_y), .n(n_reg), .z(z_data)
  );

  assign z_valid = tag_out && busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_vec    <= '0;
      n_reg    <= '0;
      mean_reg <= 1'b0;
    end else if (start && !busy) begin
      z_vec    <= '0;
      n_reg    <= cfg_n;
      mean_reg <= cfg_mean;
    end else if (z_valid) begin
      z_vec <= (z_vec == MW'(MMAX - 1)) ? '0 : z_vec + 1'b1;
    end
  end

  // a merge or pass always finds its partner in the FIFO, and a latch step
  // always finds room
  a_partner: assert property (@(posedge clk) disable iff (!rst_n) ctl.c0 |-> !fifo_empty);
  a_room:    assert property (@(posedge clk) disable iff (!rst_n) ctl.e  |-> !fifo_full);

endmodule
