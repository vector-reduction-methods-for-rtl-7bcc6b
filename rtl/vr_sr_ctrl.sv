// vr_sr_ctrl: group-merging controller for the symmetric reduction (SR)
// method.
//
// Merging runs in iterations. Before iteration i the n productive groups sit
// 2^(i-1) (virtual) segments apart, starting at segment 1, which always
// carries the group of the first partition. In one pass around the loop
// (Q steps) the groups come out of segment Q from the highest position down
// and are paired: the first of a pair is latched (e=1) and the second is
// merged with it (c1=c0=1), the result re-entering segment 1 so that it
// ends the pass at the position of its lower member. With n even the pairs
// are (2m+1, 2m) counting from segment 1 as 0; with n odd they are
// (2m+2, 2m+1) and the group at segment 1 is left over: it is latched when
// it comes out and put back, merged with C (c1=0, c0=1), 2^(i-1) steps
// later, which shifts the whole pattern so that after the iteration the
// groups are again evenly spaced, now 2^i apart, from segment 1. An
// iteration thus takes Q steps, plus 2^(i-1) when n is odd, and n becomes
// ceil(n/2); merging ends when n = 1.
// Interface as vr_ar_ctrl: init (with loop length q and kp initial groups
// in segments 1..kp), adv steps, ctl is the control word of the current
// step, fin marks the merge that yields the last group, done ends merging.
module vr_sr_ctrl
  import vr_pkg::*;
#(
  parameter int unsigned K = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic [$clog2(K+1)-1:0] q,
  input  logic [$clog2(K+1)-1:0] kp,
  input  logic    adv,
  output vr_ctl_t ctl,
  output logic    fin,
  output logic    done
);

  localparam int unsigned QW = $clog2(K+1);
  localparam int unsigned LW = $clog2(QW+1);     // iteration index width
  localparam int unsigned CW = $clog2(3*K+1);    // step counter, up to q + 2^(i-1)

  logic [QW-1:0] n;        // productive groups before this iteration
  logic [LW-1:0] lg;       // i-1
  logic [CW-1:0] c;        // step within the iteration, from 1
  logic [CW-1:0] d;        // spacing 2^(i-1)
  logic [CW-1:0] p0;       // (emerging segment) - 1
  logic [CW-1:0] r;        // rank of the emerging group, 0 = segment 1
  logic          prod;     // emerging segment is productive
  logic          in_pass;  // step within the first Q steps
  logic          last_step;

  always_comb begin
    d         = CW'(1) << lg;
    in_pass   = (c <= CW'(q));
    p0        = CW'(q) - c;                 // segment q-c+1, minus 1
    r         = p0 >> lg;
    prod      = in_pass && ((p0 & (d - 1'b1)) == '0) && (r < CW'(n));
    last_step = n[0] ? (c == CW'(q) + d) : (c == CW'(q));
    done      = (n == QW'(1));

    ctl = CTL_CC;
    fin = 1'b0;
    if (!done) begin
      if (prod) begin
        if (r[0] != n[0]) ctl = CTL_LATCH;
        else begin
          ctl = CTL_MERGE;
          fin = (n == QW'(2)) && (r == '0);
        end
      end else if (n[0] && (c == CW'(q) + d)) begin
        ctl = CTL_PASS;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n  <= QW'(1);
      lg <= '0;
      c  <= CW'(1);
    end else if (init) begin
      n  <= kp;
      lg <= '0;
      c  <= CW'(1);
    end else if (adv && !done) begin
      if (last_step) begin
        n  <= QW'((32'(n) + 1) / 2);
        lg <= lg + 1'b1;
        c  <= CW'(1);
      end else begin
        c <= c + 1'b1;
      end
    end
  end

endmodule
