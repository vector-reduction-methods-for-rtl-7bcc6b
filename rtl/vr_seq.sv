// vr_seq: phase sequencer of the vector reduction processor.
//
// One operation reduces M vectors of N elements each (M = 1 for a single
// vector). At start the sequencer sizes the feedback loop: when M < K each
// vector gets Q = ceil(K/M) segments and the dummy segment buffer is set to
// D = Q*M - K, so the loop of K+D segments is Q*M long; when M >= K each
// vector gets one segment (Q = 1) and D = M - K. The phases are then
//   input:  M*N cycles, elements arrive interleaved (X[1,1], X[2,1], ...,
//           X[M,1], X[1,2], ...). During the first Q*M cycles the loop fills
//           with (C, X); after that each element is combined with the
//           feedback B(t) of its own vector (B(t), X), so the elements of
//           each vector collect into min(N,Q) partial groups.
//   merge:  the symmetric (SR) or asymmetric (AR) controller runs on a
//           virtual pipeline of Q steps; each of its control words is held
//           for M cycles, once for every interleaved vector. Skipped when
//           one group per vector is left after the input phase.
//   drain:  idle pairs are issued until the M final results have left
//           segment K. Results leave in vector order, one per cycle.
// The operation that produces a final result is tagged; the tag rides in
// the pipeline and marks the result on the way out.
// Interface: start (one cycle, while idle) with cfg_n >= 1, 1 <= cfg_m <=
// MMAX and cfg_meth; x_en is high in each cycle in which an element must
// be supplied, with x_vec and x_elem (from 0) naming it. busy covers the
// operation, done pulses in the cycle after the last result.
// Total cycles from the first element to the last result:
// M*N + M*Tm + K, Tm being the merging steps of the chosen method for
// min(N,Q) groups on a Q-step loop (see the controllers).
// The phases, their control words and the choice of Q and D follow the
// published method; the start/busy/done handshake, the result tag and the
// limit of 2K vectors are this design's own.
module vr_seq
  import vr_pkg::*;
#(
  parameter int unsigned K    = 6,
  parameter int unsigned MMAX = 2*K,   // most interleaved vectors
  parameter int unsigned DMAX = K,     // dummy segments, MMAX - K
  parameter int unsigned NW   = 16     // width of the vector length
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] cfg_n,
  input  logic [$clog2(MMAX+1)-1:0] cfg_m,
  input  vr_meth_e      cfg_meth,
  output vr_ctl_t       ctl,
  output logic          x_en,
  output logic [$clog2(MMAX+1)-1:0] x_vec,
  output logic [NW-1:0] x_elem,
  output logic          tag,         // this operation yields a final result
  input  logic          tag_out,     // a tagged result leaves segment K
  output logic [$clog2(DMAX+1)-1:0] d_len,
  output logic          fifo_clr,
  output logic          busy,
  output logic          done
);

  localparam int unsigned MW = $clog2(MMAX+1);
  localparam int unsigned QW = $clog2(K+1);
  localparam int unsigned DW = $clog2(DMAX+1);
  localparam int unsigned RW = $clog2(K+DMAX+1);

  typedef enum logic [1:0] {S_IDLE, S_INPUT, S_MERGE, S_DRAIN} phase_e;

  phase_e        phase;
  logic [NW-1:0] n_len;
  logic [MW-1:0] m_num;
  vr_meth_e      meth;
  logic [QW-1:0] q_seg, q_new, kp_new;
  logic [DW-1:0] d_new;
  logic [RW-1:0] fill_cnt;     // loop positions filled so far, up to Q*M
  logic [RW-1:0] ring_len;
  logic [MW-1:0] rep;          // repetition of the current merge step
  logic [MW-1:0] res_cnt;
  logic          kp_one;       // a single group per vector after input
  logic          last_in, step_end;

  // merge controllers
  vr_ctl_t sr_ctl, ar_ctl, m_ctl;
  logic    sr_fin, ar_fin, sr_done, ar_done, m_fin;
  logic    m_init, m_adv;

  // loop sizing for cfg_m vectors
  always_comb begin
    q_new = QW'(1);
    d_new = '0;
    if (32'(cfg_m) >= K) begin
      d_new = DW'(32'(cfg_m) - K);
    end else begin
      for (int i = 1; i < K; i++)
        if (i * 32'(cfg_m) < K) q_new = QW'(i + 1);
      d_new = DW'(32'(q_new) * 32'(cfg_m) - K);
    end
    kp_new = (32'(cfg_n) < 32'(q_new)) ? QW'(cfg_n) : q_new;
  end

  assign m_init = (phase == S_IDLE) && start;

  vr_sr_ctrl #(.K(K)) u_sr (
    .clk, .rst_n, .init(m_init), .q(q_new), .kp(kp_new),
    .adv(m_adv && meth == METH_SR), .ctl(sr_ctl), .fin(sr_fin), .done(sr_done)
  );

  vr_ar_ctrl #(.K(K)) u_ar (
    .clk, .rst_n, .init(m_init), .q(q_new), .kp(kp_new),
    .adv(m_adv && meth == METH_AR), .ctl(ar_ctl), .fin(ar_fin), .done(ar_done)
  );

  always_comb begin
    m_ctl = (meth == METH_AR) ? ar_ctl : sr_ctl;
    m_fin = (meth == METH_AR) ? ar_fin : sr_fin;
  end

  assign ring_len = RW'(32'(q_seg) * 32'(m_num));
  assign last_in  = (x_vec == m_num - 1'b1) && (x_elem == n_len - 1'b1);
  assign step_end = (rep == m_num - 1'b1);
  assign m_adv    = (phase == S_MERGE) && step_end;
  assign busy     = (phase != S_IDLE);
  assign fifo_clr = m_init;

  always_comb begin
    ctl  = CTL_CC;
    x_en = 1'b0;
    tag  = 1'b0;
    unique case (phase)
      S_INPUT: begin
        x_en = 1'b1;
        ctl  = (fill_cnt < ring_len) ? CTL_CC : CTL_PART;
        tag  = kp_one && (x_elem == n_len - 1'b1);
      end
      S_MERGE: begin
        ctl = m_ctl;
        tag = m_fin;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= S_IDLE;
      n_len    <= '0;
      m_num    <= '0;
      meth     <= METH_SR;
      q_seg    <= '0;
      d_len    <= '0;
      kp_one   <= 1'b0;
      fill_cnt <= '0;
      rep      <= '0;
      x_vec    <= '0;
      x_elem   <= '0;
      res_cnt  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (tag_out && busy) res_cnt <= res_cnt + 1'b1;
      unique case (phase)
        S_IDLE: if (start) begin
          phase    <= S_INPUT;
          n_len    <= cfg_n;
          m_num    <= cfg_m;
          meth     <= cfg_meth;
          q_seg    <= q_new;
          d_len    <= d_new;
          kp_one   <= (kp_new == QW'(1));
          fill_cnt <= '0;
          rep      <= '0;
          x_vec    <= '0;
          x_elem   <= '0;
          res_cnt  <= '0;
        end
        S_INPUT: begin
          if (fill_cnt < ring_len) fill_cnt <= fill_cnt + 1'b1;
          if (x_vec == m_num - 1'b1) begin
            x_vec  <= '0;
            x_elem <= x_elem + 1'b1;
          end else begin
            x_vec <= x_vec + 1'b1;
          end
          if (last_in) phase <= kp_one ? S_DRAIN : S_MERGE;
        end
        S_MERGE: begin
          rep <= step_end ? '0 : rep + 1'b1;
          if (step_end && m_fin) phase <= S_DRAIN;
        end
        S_DRAIN: begin
          if (tag_out && res_cnt == m_num - 1'b1) begin
            phase <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: phase <= S_IDLE;
      endcase
    end
  end

  // the merge controller reports a single group left right after the
  // step that produced it
  a_merge_done: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == S_MERGE && m_adv && m_fin) |=> (meth == METH_AR ? ar_done : sr_done));

  a_cfg_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (start && phase == S_IDLE) |-> (cfg_n != '0 && cfg_m != '0 && 32'(cfg_m) <= MMAX));

endmodule
