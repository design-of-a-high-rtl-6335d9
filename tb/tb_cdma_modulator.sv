// tb_cdma_modulator: random packets and codewords. After each clock, every
// packet bit's chips must be the codeword for a 0, the inverted codeword for
// a 1, and all zeros when no packet was loaded.
module tb_cdma_modulator;
  localparam int unsigned AW = 3, PW = 16, L = 8, N = 22;
  logic clk = 0, rst_n, load;
  logic [N-1:0] pkt;
  logic [L-1:0] codeword;
  logic [N-1:0][L-1:0] chips;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cdma_modulator #(.ADDR_W(AW), .PAYLOAD_W(PW)) dut (.clk, .rst_n, .load, .pkt, .codeword, .chips);

  initial begin
    rst_n = 0; load = 0; pkt = '0; codeword = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      logic l;
      logic [N-1:0] p;
      logic [L-1:0] c;
      l = ($urandom % 4) != 0; p = N'($urandom); c = L'($urandom);
      load = l; pkt = p; codeword = c;
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        logic [L-1:0] e;
        e = !l ? '0 : (p[n] ? ~c : c);
        checks++;
        if (chips[n] !== e) begin
          failures++;
          $display("FAIL bit %0d: %b expected %b", n, chips[n], e);
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
