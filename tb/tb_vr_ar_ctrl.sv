// tb_vr_ar_ctrl: test of the asymmetric reduction (AR) group-merging controller.
//
// For pipelines of 2 to 16 segments the controller is started with every
// number of initial groups from 1 to K and stepped once per cycle. A model
// of the loop in the testbench follows the control words: it keeps, for
// each segment and for the latch, how many elements the group there holds,
// and flags any control word that would drop a productive group, latch into
// a full latch, merge without a latched group or pass on an empty one. The
// test checks that the last group holds all initial groups, that it is
// produced by the step marked fin, and that merging takes the number of
// steps of the method: for N >= K the published merge-time totals for
// K = 1..16, for N < K the closed form h(N) = N*ceil(log2 N) - 2^ceil(log2 N) + N + (K-N)*ceil(log2 N).
module tb_vr_ar_ctrl;
  import vr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // published merge-phase totals, K = 0..16
  int tab [17] = '{0, 0, 2, 5, 8, 12, 16, 20, 24, 29, 34, 39, 44, 49, 54, 59, 64};

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int form(int n);
    int l = clog2i(n);
    return n*l - (1 << l) + n;
  endfunction

  localparam int NK = 8;
  localparam int KS [NK] = '{2, 3, 5, 6, 7, 9, 10, 16};

  logic    init [NK];
  logic    adv  [NK];
  logic [4:0] qv [NK];
  logic [4:0] kpv [NK];
  vr_ctl_t ctl  [NK];
  logic    fin  [NK];
  logic    done [NK];

  for (genvar g = 0; g < NK; g++) begin : g_dut
    localparam int KK = KS[g];
    localparam int QW = $clog2(KK+1);
    vr_ar_ctrl #(.K(KK)) dut (
      .clk, .rst_n, .init(init[g]), .q(QW'(qv[g])), .kp(QW'(kpv[g])),
      .adv(adv[g]), .ctl(ctl[g]), .fin(fin[g]), .done(done[g])
    );
  end

  task automatic run(int g, int k, int n);
    int ring [16];
    int lat, steps, out, nw, exp_t;
    bit seen_fin;
    for (int i = 0; i < k; i++) ring[i] = (i < n) ? 1 : 0;
    lat = 0;
    steps = 0;
    seen_fin = 0;
    @(negedge clk);
    qv[g] = 5'(k); kpv[g] = 5'(n); init[g] = 1'b1;
    @(negedge clk);
    init[g] = 1'b0;
    adv[g] = 1'b1;
    while (!done[g] && steps < 200) begin
      out = ring[k-1];
      nw = 0;
      checks++;
      case (ctl[g])
        CTL_LATCH: if (out == 0 || lat != 0) failures++; else lat = out;
        CTL_MERGE: if (out == 0 || lat == 0) failures++; else begin nw = out + lat; lat = 0; end
        CTL_PASS:  if (out != 0 || lat == 0) failures++; else begin nw = lat; lat = 0; end
        CTL_CC:    if (out != 0) failures++;
        default:   failures++;
      endcase
      if (fin[g]) begin
        checks++;
        if (seen_fin || nw != n) begin
          failures++;
          $display("FAIL K=%0d N=%0d: fin on a group of %0d", k, n, nw);
        end
        seen_fin = 1;
      end
      for (int i = k-1; i > 0; i--) ring[i] = ring[i-1];
      ring[0] = nw;
      steps++;
      @(negedge clk);
    end
    adv[g] = 1'b0;
    exp_t = (n >= k) ? tab[k] : form(n) + (k - n) * clog2i(n);
    checks++;
    if (steps != exp_t || (n > 1 && !seen_fin) || ring[0] != n || lat != 0) begin
      failures++;
      $display("FAIL K=%0d N=%0d: %0d steps (expected %0d), fin=%0d, final group %0d",
               k, n, steps, exp_t, seen_fin, ring[0]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NK; g++) begin
      init[g] = 1'b0; adv[g] = 1'b0; qv[g] = '0; kpv[g] = 5'd1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NK; g++)
      for (int n = 1; n <= KS[g]; n++)
        run(g, KS[g], n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
