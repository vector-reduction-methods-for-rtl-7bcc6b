// tb_vr_processor: end-to-end test of the vector reduction processor at
// its default size (K = 6 segments, 32-bit words, up to 12 vectors).
//
// A memory model serves the interleaved element requests. For a sweep of
// vector lengths N (1 to 1000), vector counts M, both merging methods, all four
// operators, the inner-product mode and the mean value, the test checks every result
// against a sequential reduction of the same data, checks that results come
// out in vector order and that the operation takes exactly
// M*N + M*Tm(Q, min(N,Q)) + K cycles from the first element to the last
// result, with Q = ceil(K/M) (1 for M >= K) and Tm the merge-step count of
// the method (Theorems for SR and AR). It also counts how often each
// mechanism of the design was used (fill, partition, latch, merge, pass-on
// of a left-over group, dummy segments, several groups in the FIFO, the
// no-merge path) and fails if one never was.
module tb_vr_processor;
  import vr_pkg::*;

  localparam int K    = 6;
  localparam int W    = 32;
  localparam int MMAX = 2*K;
  localparam int NMAX = 1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          start = 1'b0;
  logic [15:0]   cfg_n = '0;
  logic [4:0]    cfg_m = '0;
  vr_op_e        cfg_op = OP_SUM;
  vr_meth_e      cfg_meth = METH_SR;
  logic          cfg_ip = 1'b0;
  logic          cfg_mean = 1'b0;
  logic          x_ready, z_valid, busy, done;
  logic [4:0]    x_vec, z_vec;
  logic [15:0]   x_elem;
  logic [W-1:0]  x_a, x_b, z_data;

  logic [W-1:0] mem_a [MMAX][NMAX];
  logic [W-1:0] mem_b [MMAX][NMAX];

  vr_processor dut (
    .clk, .rst_n, .start, .cfg_n, .cfg_m, .cfg_op, .cfg_meth, .cfg_ip, .cfg_mean,
    .x_ready, .x_vec, .x_elem, .x_a, .x_b,
    .z_valid, .z_vec, .z_data, .busy, .done
  );

  always_comb begin
    x_a = '0;
    x_b = '0;
    if (x_ready && 32'(x_vec) < MMAX && 32'(x_elem) < NMAX) begin
      x_a = mem_a[x_vec][x_elem];
      x_b = mem_b[x_vec][x_elem];
    end
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_fill = 0, n_part = 0, n_latch = 0, n_merge = 0, n_pass = 0;
  int n_dummy = 0, n_fifo2 = 0, n_nomerge = 0, n_sr = 0, n_ar = 0, n_ip = 0, n_mean = 0;
  int n_op [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (busy) begin
    if (x_ready && dut.ctl == CTL_CC)   n_fill++;
    if (x_ready && dut.ctl == CTL_PART) n_part++;
    if (dut.ctl == CTL_LATCH) n_latch++;
    if (dut.ctl == CTL_MERGE) n_merge++;
    if (dut.ctl == CTL_PASS)  n_pass++;
    if (dut.d_len != '0 && x_ready) n_dummy++;
    if (dut.fifo_count > 1) n_fifo2++;
  end

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int tm(vr_meth_e m, int q, int n);
    int l = clog2i(n);
    if (m == METH_SR) return n*l + (1 << l) - n + (q - n)*l;
    else              return n*l - (1 << l) + n + (q - n)*l;
  endfunction

  function automatic logic [W-1:0] fref(vr_op_e op, logic [W-1:0] a, logic [W-1:0] b);
    case (op)
      OP_SUM:  return a + b;
      OP_MAX:  return ($signed(a) > $signed(b)) ? a : b;
      OP_MIN:  return ($signed(a) < $signed(b)) ? a : b;
      default: return W'($signed(a) * $signed(b));
    endcase
  endfunction

  task automatic run(int n, int m, vr_op_e op, vr_meth_e meth, bit ip, bit mean = 1'b0);
    logic [W-1:0] exp_z [MMAX];
    int q, kp, t_exp, t_first, t_last, got;
    bit first_seen;
    // data
    for (int v = 0; v < m; v++)
      for (int i = 0; i < n; i++) begin
        if (op == OP_PROD) begin
          mem_a[v][i] = W'($urandom_range(0, 6)) - W'(3);
        end else begin
          mem_a[v][i] = $urandom();
        end
        mem_b[v][i] = W'($urandom_range(0, 2000)) - W'(1000);
        if (ip) mem_a[v][i] = W'($urandom_range(0, 2000)) - W'(1000);
      end
    for (int v = 0; v < m; v++) begin
      exp_z[v] = ip ? W'($signed(mem_a[v][0]) * $signed(mem_b[v][0])) : mem_a[v][0];
      for (int i = 1; i < n; i++)
        exp_z[v] = fref(op, exp_z[v],
                        ip ? W'($signed(mem_a[v][i]) * $signed(mem_b[v][i])) : mem_a[v][i]);
    end
    if (mean)
      for (int v = 0; v < m; v++) exp_z[v] = W'($signed(exp_z[v]) / n);
    q  = (m >= K) ? 1 : (K + m - 1) / m;
    kp = (n < q) ? n : q;
    t_exp = m*n + ((kp > 1) ? m*tm(meth, q, kp) : 0) + K;
    if (q == 1 || n == 1) n_nomerge++;
    if (meth == METH_SR) n_sr++; else n_ar++;
    if (ip) n_ip++;
    if (mean) n_mean++;
    n_op[op]++;
    // launch
    @(negedge clk);
    cfg_n = 16'(n); cfg_m = 5'(m); cfg_op = op; cfg_meth = meth; cfg_ip = ip; cfg_mean = mean;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t_first = cyc;       // first element cycle
    got = 0;
    first_seen = 0;
    t_last = 0;
    while (busy) begin
      @(posedge clk);
      #1;
      if (z_valid) begin
        checks++;
        if (got >= m) begin
          failures++;
          $display("FAIL extra result n=%0d m=%0d", n, m);
        end else if (z_data !== exp_z[got] || 32'(z_vec) != got) begin
          failures++;
          $display("FAIL n=%0d m=%0d op=%0d meth=%0d ip=%0d vec=%0d/%0d got %h exp %h",
                   n, m, op, meth, ip, z_vec, got, z_data, exp_z[got]);
        end
        got++;
        t_last = cyc;
      end
    end
    checks++;
    if (got != m) begin
      failures++;
      $display("FAIL n=%0d m=%0d: %0d results", n, m, got);
    end
    checks++;
    if (t_last - t_first + 1 != t_exp) begin
      failures++;
      $display("FAIL time n=%0d m=%0d meth=%0d: %0d cycles, expected %0d",
               n, m, meth, t_last - t_first + 1, t_exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ns [8] = '{1, 2, 3, 5, 6, 7, 13, 40};
  int ms [9] = '{1, 2, 3, 4, 5, 6, 7, 9, 12};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (ns[i])
      foreach (ms[j])
        for (int me = 0; me < 2; me++)
          for (int o = 0; o < 4; o++)
            run(ns[i], ms[j], vr_op_e'(o), vr_meth_e'(me), 1'b0);
    // long vectors (N >> K): time N + Tm + K, i.e. N plus a constant
    for (int me = 0; me < 2; me++) begin
      run(1000, 1, OP_SUM, vr_meth_e'(me), 1'b0);
      run(999, 4, OP_MAX, vr_meth_e'(me), 1'b0);
    end
    for (int me = 0; me < 2; me++) begin
      run(17, 1, OP_SUM, vr_meth_e'(me), 1'b1);
      run(9, 4, OP_SUM, vr_meth_e'(me), 1'b1);
    end
    // mean value: summation divided by N
    for (int me = 0; me < 2; me++) begin
      run(13, 1, OP_SUM, vr_meth_e'(me), 1'b0, 1'b1);
      run(7, 5, OP_SUM, vr_meth_e'(me), 1'b0, 1'b1);
    end
    $display("mechanisms: fill=%0d partition=%0d latch=%0d merge=%0d pass=%0d dummy=%0d fifo>1=%0d nomerge=%0d sr=%0d ar=%0d ip=%0d mean=%0d",
             n_fill, n_part, n_latch, n_merge, n_pass, n_dummy, n_fifo2, n_nomerge, n_sr, n_ar, n_ip, n_mean);
    checks++; if (n_fill == 0)    begin failures++; $display("FAIL fill never used"); end
    checks++; if (n_part == 0)    begin failures++; $display("FAIL partition never used"); end
    checks++; if (n_latch == 0)   begin failures++; $display("FAIL latch never used"); end
    checks++; if (n_merge == 0)   begin failures++; $display("FAIL merge never used"); end
    checks++; if (n_pass == 0)    begin failures++; $display("FAIL pass never used"); end
    checks++; if (n_dummy == 0)   begin failures++; $display("FAIL dummy segments never used"); end
    checks++; if (n_fifo2 == 0)   begin failures++; $display("FAIL FIFO never held two groups"); end
    checks++; if (n_nomerge == 0) begin failures++; $display("FAIL no-merge path never used"); end
    checks++; if (n_sr == 0 || n_ar == 0 || n_ip == 0 || n_mean == 0) begin failures++; $display("FAIL mode never used"); end
    for (int o = 0; o < 4; o++) begin
      checks++; if (n_op[o] == 0) begin failures++; $display("FAIL op %0d never used", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
