// tb_vr_fifo_latch: test of the FIFO latch (depth K-1 = 5).
//
// Random pushes and pops, never beyond full or empty, are checked against a
// queue model: the head word, the count and the empty and full flags, after
// every cycle; also the clear input.
module tb_vr_fifo_latch;

  localparam int W = 32;
  localparam int DEPTH = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic clr, push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [2:0] count;
  logic [W-1:0] model [$];

  vr_fifo_latch #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .clr, .push, .din, .pop,
                                             .dout, .empty, .full, .count);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1'b0; push = 1'b0; pop = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      clr  = (c % 997 == 996);
      pop  = 1'($urandom()) && (model.size() > 0);
      push = 1'($urandom()) && (model.size() < DEPTH || pop);
      din  = $urandom();
      @(negedge clk);
      if (clr) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(din);
      end
      checks++;
      if (32'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)
          || (model.size() > 0 && dout !== model[0])) begin
        failures++;
        $display("FAIL cycle %0d: count %0d exp %0d dout %h", c, count, model.size(), dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
