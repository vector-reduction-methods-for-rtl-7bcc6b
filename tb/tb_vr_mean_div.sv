// tb_vr_mean_div: test of the mean-value output stage.
//
// Random signed sums and lengths (1 to 65535, with small values favoured)
// are checked against a 64-bit signed division rounded toward zero when the
// stage is enabled, and against the unchanged sum when it is not.
module tb_vr_mean_div;

  localparam int W  = 32;
  localparam int NW = 16;

  int checks = 0, failures = 0;

  logic          mean_en;
  logic [W-1:0]  sum, z, exp_z;
  logic [NW-1:0] n;
  longint        q;

  vr_mean_div #(.W(W), .NW(NW)) dut (.mean_en, .sum, .n, .z);

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      mean_en = (i % 4 != 3);
      sum = $urandom();
      n = (i % 2 == 0) ? NW'($urandom_range(1, 40)) : NW'($urandom_range(1, 65535));
      q = longint'($signed(sum)) / longint'(n);
      exp_z = mean_en ? q[W-1:0] : sum;
      #1;
      checks++;
      if (z !== exp_z) begin
        failures++;
        $display("FAIL sum=%h n=%0d en=%b: %h exp %h", sum, n, mean_en, z, exp_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
