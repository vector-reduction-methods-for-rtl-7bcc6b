// tb_vr_seq: test of the phase sequencer (K = 6, up to 12 vectors).
//
// The pipeline is replaced by a K-cycle delay line for the tag. For a set
// of vector lengths N, vector counts M and both methods the test checks:
// the element requests (M*N of them, in interleaved order), the dummy
// length D = ceil(K/M)*M - K (M - K when M >= K), that the first
// min(M*N, Q*M) input cycles fill the loop with (C, X) and the rest use
// (B(t), X), that during merging every control word is held for M cycles,
// that exactly M operations are tagged, and that done comes after
// M*N + M*Tm + K cycles.
module tb_vr_seq;
  import vr_pkg::*;

  localparam int K = 6;
  localparam int MMAX = 2*K;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start;
  logic [15:0] cfg_n;
  logic [4:0]  cfg_m;
  vr_meth_e    cfg_meth;
  vr_ctl_t     ctl;
  logic        x_en, tag, tag_out, fifo_clr, busy, done;
  logic [4:0]  x_vec;
  logic [15:0] x_elem;
  logic [2:0]  d_len;
  logic [K-1:0] tline;

  vr_seq #(.K(K)) dut (.clk, .rst_n, .start, .cfg_n, .cfg_m, .cfg_meth, .ctl, .x_en,
                       .x_vec, .x_elem, .tag, .tag_out, .d_len, .fifo_clr, .busy, .done);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tline <= '0;
    else        tline <= {tline[K-2:0], tag};
  assign tag_out = tline[K-1];

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int tm(vr_meth_e m, int q, int n);
    int l = clog2i(n);
    if (n <= 1) return 0;
    if (m == METH_SR) return n*l + (1 << l) - n + (q - n)*l;
    else              return n*l - (1 << l) + n + (q - n)*l;
  endfunction

  task automatic run(int n, int m, vr_meth_e meth);
    int q, d, kp, cyc, nin, ntag, exp_t, ev, ee;
    vr_ctl_t prev;
    int run_len;
    bit bad_in, bad_rep;
    q  = (m >= K) ? 1 : (K + m - 1) / m;
    d  = q*m - K;
    kp = (n < q) ? n : q;
    exp_t = m*n + m*tm(meth, q, kp) + K;
    @(negedge clk);
    cfg_n = 16'(n); cfg_m = 5'(m); cfg_meth = meth; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0; nin = 0; ntag = 0; bad_in = 0; bad_rep = 0; run_len = 0;
    prev = CTL_CC;
    checks++;
    if (32'(d_len) != d) begin
      failures++;
      $display("FAIL n=%0d m=%0d: D=%0d exp %0d", n, m, d_len, d);
    end
    while (!done && cyc < 5000) begin
      cyc++;
      if (x_en) begin
        ev = nin % m; ee = nin / m;
        if (32'(x_vec) != ev || 32'(x_elem) != ee) bad_in = 1;
        if (ctl != ((nin < q*m) ? CTL_CC : CTL_PART)) bad_in = 1;
        nin++;
      end else if (nin == m*n && busy) begin
        // merge and drain: control words come in runs that are multiples of M
        if (ctl == prev) run_len++;
        else begin
          if (run_len % m != 0) bad_rep = 1;
          run_len = 1;
          prev = ctl;
        end
      end
      if (tag) ntag++;
      @(negedge clk);
    end
    checks += 4;
    if (nin != m*n || bad_in) begin
      failures++;
      $display("FAIL n=%0d m=%0d: input phase (%0d elements, order error %0d)", n, m, nin, bad_in);
    end
    if (bad_rep) begin
      failures++;
      $display("FAIL n=%0d m=%0d meth=%0d: merge step not repeated M times", n, m, meth);
    end
    if (ntag != m) begin
      failures++;
      $display("FAIL n=%0d m=%0d: %0d tagged", n, m, ntag);
    end
    // done rises in the cycle after the last result
    if (cyc != exp_t) begin
      failures++;
      $display("FAIL n=%0d m=%0d meth=%0d: %0d cycles exp %0d", n, m, meth, cyc, exp_t);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; cfg_n = '0; cfg_m = '0; cfg_meth = METH_SR;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 1; m <= MMAX; m++)
      foreach (ns[i])
        for (int me = 0; me < 2; me++)
          run(ns[i], m, vr_meth_e'(me));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ns [6] = '{1, 2, 4, 6, 9, 25};

endmodule
