// tb_vr_operand_mux: test of the operand multiplexers.
//
// For every operator and every control word (c1, c0) with and without an
// element supplied, the test checks that the operand pair is the one of
// the multiplexer table: (C, X), (C, B(t-j)), (B(t), X), (B(t), B(t-j)),
// with C in place of X when no element is supplied, and that C is the
// identity of the operator (0, most negative, most positive, 1).
module tb_vr_operand_mux;
  import vr_pkg::*;

  localparam int W = 32;

  int checks = 0, failures = 0;

  vr_op_e       op;
  vr_ctl_t      ctl;
  logic [W-1:0] fb, lat, x, a, b, cexp, aexp, bexp;
  logic         x_en;

  vr_operand_mux #(.W(W)) dut (.op, .ctl, .fb, .lat, .x, .x_en, .a, .b);

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int o = 0; o < 4; o++)
        for (int c = 0; c < 16; c++) begin
          op   = vr_op_e'(o);
          ctl  = vr_ctl_t'(c[2:0]);
          x_en = c[3];
          fb   = $urandom();
          lat  = $urandom();
          x    = $urandom();
          case (o)
            0: cexp = 32'h0000_0000;
            1: cexp = 32'h8000_0000;
            2: cexp = 32'h7fff_ffff;
            default: cexp = 32'h0000_0001;
          endcase
          aexp = ctl.c1 ? fb : cexp;
          bexp = ctl.c0 ? lat : (x_en ? x : cexp);
          #1;
          checks++;
          if (a !== aexp || b !== bexp) begin
            failures++;
            $display("FAIL op=%0d ctl=%b x_en=%b: a=%h b=%h exp %h %h", o, ctl, x_en, a, b, aexp, bexp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
