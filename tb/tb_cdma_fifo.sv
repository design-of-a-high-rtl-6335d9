// tb_cdma_fifo: random push/pop test of the packet buffer against a queue
// model. Checks the head packet, empty and full every clock, including
// simultaneous push and pop and attempts to push into a full buffer.
module tb_cdma_fifo;
  localparam int unsigned W = 22, D = 4;
  logic clk = 0, rst_n;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  always #5 clk = ~clk;

  cdma_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h expected %h", dout, model[0]));
      // bias toward filling in the first half, emptying in the second
      push = ($urandom % 100) < (((k / 300) % 2) != 0 ? 35 : 75);
      pop  = ($urandom % 100) < (((k / 300) % 2) != 0 ? 75 : 35);
      din  = W'($urandom);
      if (push && full) n_full++;
      if (push && pop && !full && !empty) n_both++;
      @(posedge clk);
      // model update, using the flags as they were before this edge
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && model.size() < D + (pop ? 1 : 0) && !(full)) model.push_back(din);
    end
    check(n_full > 0 && n_both > 0, "full and push+pop cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
