// tb_vr_ip_mult: test of the inner-product multiplier.
//
// Random signed pairs, small and full-range, are checked against a 64-bit
// product truncated to 32 bits when the multiplier is enabled, and against
// the pass-through of a when it is not.
module tb_vr_ip_mult;

  localparam int W = 32;

  int checks = 0, failures = 0;

  logic         ip_en;
  logic [W-1:0] a, b, x;
  logic signed [63:0] p;

  vr_ip_mult #(.W(W)) dut (.ip_en, .a, .b, .x);

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      ip_en = i[0];
      if (i < 500) begin
        a = W'($urandom_range(0, 200)) - W'(100);
        b = W'($urandom_range(0, 200)) - W'(100);
      end else begin
        a = $urandom();
        b = $urandom();
      end
      p = 64'($signed(a)) * 64'($signed(b));
      #1;
      checks++;
      if (x !== (ip_en ? p[W-1:0] : a)) begin
        failures++;
        $display("FAIL a=%h b=%h en=%b x=%h", a, b, ip_en, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
