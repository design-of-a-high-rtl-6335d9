// tb_cdma_demodulator: builds code-adder sums in the testbench from a random
// set of senders, each spreading a random packet with a distinct destination
// codeword (0 -> codeword, 1 -> inverted, idle -> all zeros), and checks that
// the demodulator for one codeword recovers exactly the packet sent with it,
// reports no packet when none was, and flags a collision of two packets on
// one codeword. Codewords come from the recursive Hadamard construction.
module tb_cdma_demodulator;
  localparam int unsigned AW = 3, PW = 16, L = 8, NP = 7, N = 22;
  logic clk = 0, rst_n;
  logic [N-1:0][L-1:0][AW-1:0] sum;
  logic [L-1:0] codeword;
  logic valid, err;
  logic [N-1:0] pkt;
  logic [L-1:0] cw [L];
  int checks = 0, failures = 0, n_none = 0, n_hit = 0, n_coll = 0;

  always #5 clk = ~clk;

  cdma_demodulator #(.ADDR_W(AW), .PAYLOAD_W(PW)) dut (.clk, .rst_n, .sum, .codeword, .valid, .pkt, .err);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cw[0] = '0;
    for (int n = 1; n < L; n *= 2)
      for (int k = 0; k < n; k++) begin
        logic [L-1:0] r;
        r = cw[k];
        for (int i = 0; i < n; i++) begin
          cw[k][n + i] = r[i]; cw[n + k][i] = r[i]; cw[n + k][n + i] = ~r[i];
        end
      end
    rst_n = 0; sum = '0; codeword = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      int me, dst [NP];
      logic [N-1:0] data [NP];
      logic [N-1:0] exp_pkt;
      bit exp_valid, collide;
      int nsent;
      me = 1 + ($urandom % NP);
      collide = (k % 10 == 9);
      exp_valid = 0; nsent = 0; exp_pkt = '0;
      // sender p uses destination (p + rot) % L, or idles (0)
      for (int p = 0; p < NP; p++) begin
        int rot;
        rot = k % NP;
        dst[p] = (($urandom % 3) == 0) ? 0 : 1 + ((p + rot) % NP);
        data[p] = N'($urandom);
      end
      if (collide) begin dst[0] = me; dst[1] = me; end
      for (int p = 0; p < NP; p++)
        if (dst[p] == me) begin nsent++; exp_pkt = data[p]; end
      exp_valid = (nsent == 1);
      for (int n = 0; n < N; n++)
        for (int i = 0; i < L; i++) begin
          int s;
          s = 0;
          for (int p = 0; p < NP; p++)
            if (dst[p] != 0) s += (cw[dst[p]][i] != data[p][n]) ? 1 : 0;
          sum[n][i] = AW'(s);
        end
      codeword = cw[me];
      @(negedge clk);
      if (nsent > 1) begin
        n_coll++;
        check(err == 1'b1, "collision flagged");
      end else begin
        check(err == 1'b0, "no error");
        check(valid == exp_valid, $sformatf("valid %0d expected %0d", valid, exp_valid));
        if (exp_valid) begin
          n_hit++;
          check(pkt == exp_pkt, $sformatf("pkt %h expected %h", pkt, exp_pkt));
        end else n_none++;
      end
    end
    check(n_none > 0 && n_hit > 0 && n_coll > 0, "all cases reached");
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
