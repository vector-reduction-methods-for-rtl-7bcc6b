// tb_vr_table4: single-vector merge times of the SR and AR methods, run on
// whole processors with K = 2..16 segments.
//
// For every K one processor reduces vectors of N = 3K+1 random elements
// (summation with both methods, and maximum with AR). Each result
// is checked against a sequential sum and the time from the first element
// to the result against N + Tm(K) + K, where Tm(K) is the published
// merge-phase total of each method (SR: K*L + 2^L - K, AR: K*L - 2^L + K,
// L = ceil(log2 K), listed below as constants).
module tb_vr_table4;
  import vr_pkg::*;

  localparam int W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int tab_sr [17] = '{0, 0, 2, 7, 8, 18, 20, 22, 24, 43, 46, 49, 52, 55, 58, 61, 64};
  int tab_ar [17] = '{0, 0, 2, 5, 8, 12, 16, 20, 24, 29, 34, 39, 44, 49, 54, 59, 64};

  logic        start  [17];
  vr_meth_e    meth   [17];
  vr_op_e      op     [17];
  logic [15:0] cfg_n  [17];
  logic        x_ready[17];
  logic [15:0] x_elem [17];
  logic [W-1:0] x_a   [17];
  logic        z_valid[17];
  logic [W-1:0] z_data[17];
  logic        busy   [17];
  logic [W-1:0] data  [17][64];

  for (genvar k = 2; k <= 16; k++) begin : g_k
    localparam int MW = $clog2(2*k+1);
    logic [MW-1:0] xv, zv;
    logic          dn;
    vr_processor #(.K(k)) dut (
      .clk, .rst_n, .start(start[k]), .cfg_n(cfg_n[k]), .cfg_m(MW'(1)), .cfg_op(op[k]),
      .cfg_meth(meth[k]), .cfg_ip(1'b0), .cfg_mean(1'b0), .x_ready(x_ready[k]), .x_vec(xv), .x_elem(x_elem[k]),
      .x_a(x_a[k]), .x_b('0), .z_valid(z_valid[k]), .z_vec(zv), .z_data(z_data[k]),
      .busy(busy[k]), .done(dn)
    );
    assign x_a[k] = (x_ready[k] && x_elem[k] < 64) ? data[k][x_elem[k][5:0]] : '0;
  end

  task automatic run(int k, vr_meth_e m, vr_op_e o);
    int n = 3*k + 1;
    int t0, t1, got;
    logic [W-1:0] exp_z;
    for (int i = 0; i < n; i++) data[k][i] = $urandom();
    exp_z = data[k][0];
    for (int i = 1; i < n; i++)
      exp_z = (o == OP_SUM) ? exp_z + data[k][i]
            : (($signed(exp_z) > $signed(data[k][i])) ? exp_z : data[k][i]);
    @(negedge clk);
    cfg_n[k] = 16'(n); meth[k] = m; op[k] = o; start[k] = 1'b1;
    @(negedge clk);
    start[k] = 1'b0;
    t0 = cyc;
    t1 = 0;
    got = 0;
    while (busy[k]) begin
      @(posedge clk);
      #1;
      if (z_valid[k]) begin
        got++;
        t1 = cyc;
        checks++;
        if (z_data[k] !== exp_z) begin
          failures++;
          $display("FAIL K=%0d meth=%0d: %h exp %h", k, m, z_data[k], exp_z);
        end
      end
    end
    checks++;
    if (got != 1 || t1 - t0 + 1 != n + ((m == METH_SR) ? tab_sr[k] : tab_ar[k]) + k) begin
      failures++;
      $display("FAIL K=%0d meth=%0d: %0d results, %0d cycles, expected %0d", k, m, got,
               t1 - t0 + 1, n + ((m == METH_SR) ? tab_sr[k] : tab_ar[k]) + k);
    end else
      $display("K=%2d %s: merge %0d cycles, total %0d cycles", k, (m == METH_SR) ? "SR" : "AR",
               t1 - t0 + 1 - n - k, t1 - t0 + 1);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 16; k++) begin
      start[k] = 1'b0; cfg_n[k] = '0; meth[k] = METH_SR; op[k] = OP_SUM;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 2; k <= 16; k++) begin
      run(k, METH_SR, OP_SUM);
      run(k, METH_AR, OP_SUM);
      run(k, METH_AR, OP_MAX);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
