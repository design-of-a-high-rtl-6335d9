// tb_code_adder: random chips from the seven modulators; after each clock
// every (bit, chip) sum must equal the number of modulators sending a 1 there.
module tb_code_adder;
  localparam int unsigned AW = 3, PW = 16, L = 8, NP = 7, N = 22;
  logic clk = 0, rst_n;
  logic [NP-1:0][N-1:0][L-1:0] chips;
  logic [N-1:0][L-1:0][AW-1:0] sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  code_adder #(.ADDR_W(AW), .PAYLOAD_W(PW)) dut (.clk, .rst_n, .chips, .sum);

  initial begin
    rst_n = 0; chips = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      logic [NP-1:0][N-1:0][L-1:0] c;
      for (int p = 0; p < NP; p++)
        for (int n = 0; n < N; n++) c[p][n] = (k % 7 == 0) ? '1 : L'($urandom);
      chips = c;
      @(negedge clk);
      for (int n = 0; n < N; n++)
        for (int i = 0; i < L; i++) begin
          int e;
          e = 0;
          for (int p = 0; p < NP; p++) e += int'(c[p][n][i]);
          checks++;
          if (int'(sum[n][i]) != e) begin
            failures++;
            $display("FAIL n=%0d i=%0d: %0d expected %0d", n, i, sum[n][i], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
