// tb_vr_seg_pipe: test of the K-segment pipeline.
//
// A new random operand pair, operator and tag enters every cycle. The test
// keeps its own queue of expected results, computed by a separate model of
// the four operators, and checks that each result and tag leaves segment K
// exactly K cycles after its operands entered (one pair per cycle, latency
// K), for the default K = 6 and for K = 10.
module tb_vr_seg_pipe;
  import vr_pkg::*;

  localparam int W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] fref(vr_op_e op, logic [W-1:0] a, logic [W-1:0] b);
    logic signed [63:0] p;
    case (op)
      OP_SUM:  return a + b;
      OP_MAX:  return ($signed(a) >= $signed(b)) ? a : b;
      OP_MIN:  return ($signed(a) <= $signed(b)) ? a : b;
      default: begin p = $signed(a) * $signed(b); return p[W-1:0]; end
    endcase
  endfunction

  vr_op_e       op;
  logic [W-1:0] a, b;
  logic         tin;
  logic [W-1:0] y6, y10;
  logic         t6, t10;

  vr_seg_pipe #(.K(6),  .W(W)) dut6  (.clk, .rst_n, .op, .a, .b, .tag_in(tin), .y(y6),  .tag_out(t6));
  vr_seg_pipe #(.K(10), .W(W)) dut10 (.clk, .rst_n, .op, .a, .b, .tag_in(tin), .y(y10), .tag_out(t10));

  logic [W-1:0] hist_v [$];
  logic         hist_t [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_SUM; a = '0; b = '0; tin = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      op  = vr_op_e'($urandom_range(0, 3));
      a   = (c % 7 == 0) ? b : $urandom();
      b   = $urandom();
      tin = 1'($urandom());
      hist_v.push_front(fref(op, a, b));
      hist_t.push_front(tin);
      @(negedge clk);
      // the pair entered c+1 cycles ago is at hist[0]; K cycles ago at hist[K-1]
      if (c >= 10) begin
        checks += 2;
        if (y6 !== hist_v[5] || t6 !== hist_t[5]) begin
          failures++;
          $display("FAIL K=6 cycle %0d: %h exp %h", c, y6, hist_v[5]);
        end
        if (y10 !== hist_v[9] || t10 !== hist_t[9]) begin
          failures++;
          $display("FAIL K=10 cycle %0d: %h exp %h", c, y10, hist_v[9]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
