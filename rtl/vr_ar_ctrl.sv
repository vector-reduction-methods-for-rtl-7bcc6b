// vr_ar_ctrl: group-merging controller for the asymmetric reduction (AR)
// method.
//
// It tracks which segments of the loop hold a productive group: S0 for the
// latch and S1..SQ for the segments, Q being the number of (virtual)
// segments of the loop at run time (K for one vector). On every step the
// group leaving segment Q is either latched, when the latch is empty, or
// merged with the latched group, when the latch is full; the merged group
// re-enters segment 1. The next-state and output equations are
//   S0' = S0 xor SQ,  S1' = S0 and SQ,  Si' = S(i-1) for 2 <= i <= Q,
//   c1 = c0 = S0 and SQ,  e = (not S0) and SQ,
// so that a group is latched or merged as soon as it comes out and no cycle
// is spent waiting for a symmetric pattern. Merging ends when only S1 is
// set.
// Interface: init loads the state for kp initial groups in segments 1..kp;
// adv advances one step at the clock edge (the sequencer holds a step for
// one cycle per interleaved vector). ctl is the control word of the current
// step, fin marks the step whose merge yields the last group, done is high
// once a single group is left.
module vr_ar_ctrl
  import vr_pkg::*;
#(
  parameter int unsigned K = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic [$clog2(K+1)-1:0] q,    // loop length in steps, 1..K
  input  logic [$clog2(K+1)-1:0] kp,   // initial groups, 1..q
  input  logic    adv,
  output vr_ctl_t ctl,
  output logic    fin,
  output logic    done
);

  logic         s0;
  logic [K:1]   s;      // s[i]: segment i productive
  logic         sq;     // S_Q
  logic [K:1]   low_mask, tail_mask;

  always_comb begin
    sq = 1'b0;
    for (int i = 1; i <= K; i++) begin
      if (32'(q) == i) sq = s[i];
      low_mask[i]  = (i <  32'(q));       // segments 1..Q-1
      tail_mask[i] = (i >= 2) && (i <= 32'(q));
    end
    ctl.c1 = s0 & sq;
    ctl.c0 = s0 & sq;
    ctl.e  = ~s0 & sq;
    done   = !s0 && s[1] && ((s & tail_mask) == '0);
    fin    = s0 && sq && ((s & low_mask) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= 1'b0;
      s  <= '0;
    end else if (init) begin
      s0 <= 1'b0;
      for (int i = 1; i <= K; i++) s[i] <= (i <= 32'(kp));
    end else if (adv && !done) begin
      s0   <= s0 ^ sq;
      s[1] <= s0 & sq;
      for (int i = 2; i <= K; i++) s[i] <= (i <= 32'(q)) ? s[i-1] : 1'b0;
    end
  end

  // the latch and segment 1 are never productive together
  a_never_s0_s1: assert property (@(posedge clk) disable iff (!rst_n || init) !(s0 && s[1]));

endmodule
