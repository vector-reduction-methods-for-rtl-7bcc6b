// tb_vr_dummy_buf: test of the dummy segment buffer.
//
// A random word enters every cycle while the length D is changed now and
// then over 0..DMAX; the output must be the word that entered D cycles
// earlier (the input itself for D = 0).
module tb_vr_dummy_buf;

  localparam int W = 32;
  localparam int DMAX = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0]   d_len;
  logic [W-1:0] din, dout;
  logic [W-1:0] hist [$];

  vr_dummy_buf #(.W(W), .DMAX(DMAX)) dut (.clk, .rst_n, .d_len, .din, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_len = '0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      if (c % 50 == 0) d_len = 3'($urandom_range(0, DMAX));
      din = $urandom();
      hist.push_front(din);
      #1;
      if (c > DMAX) begin
        checks++;
        if (dout !== hist[d_len]) begin
          failures++;
          $display("FAIL cycle %0d D=%0d: %h exp %h", c, d_len, dout, hist[d_len]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
