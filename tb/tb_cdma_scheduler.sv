// tb_cdma_scheduler: random requests. Checks that every requested destination
// gets exactly one grant, grants go only to requesters, and that per
// destination the grant rotates: the winner is the first requester after the
// previous winner (reference kept in the testbench). Also checks that a port
// kept requesting a contended destination is served within NPORTS grants.
module tb_cdma_scheduler;
  localparam int unsigned AW = 3, NP = 7;
  logic clk = 0, rst_n;
  logic [NP-1:0] req, gnt;
  logic [NP-1:0][AW-1:0] req_dst;
  int last [NP];
  int checks = 0, failures = 0, n_contend = 0;

  always #5 clk = ~clk;

  cdma_scheduler #(.ADDR_W(AW)) dut (.clk, .rst_n, .req, .req_dst, .gnt);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; req = '0; req_dst = '0;
    for (int d = 0; d < NP; d++) last[d] = NP - 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        req[p] = ($urandom % 4) != 0;
        req_dst[p] = AW'(1 + ($urandom % (k < 2000 ? 3 : NP)));
      end
      #1;
      for (int d = 1; d <= NP; d++) begin
        int nreq, ngnt, winner, expw;
        nreq = 0; ngnt = 0; winner = -1; expw = -1;
        for (int p = 0; p < NP; p++) begin
          if (req[p] && req_dst[p] == AW'(d)) nreq++;
          if (gnt[p] && req_dst[p] == AW'(d)) begin ngnt++; winner = p; end
        end
        for (int s = 1; s <= NP && expw < 0; s++) begin
          int p;
          p = (last[d-1] + s) % NP;
          if (req[p] && req_dst[p] == AW'(d)) expw = p;
        end
        if (nreq > 1) n_contend++;
        check(ngnt == (nreq > 0 ? 1 : 0), $sformatf("dst %0d: %0d requests, %0d grants", d, nreq, ngnt));
        check(winner == expw, $sformatf("dst %0d: winner %0d expected %0d", d, winner, expw));
        if (expw >= 0) last[d-1] = expw;
      end
      check((gnt & ~req) == '0, "grant without request");
    end
    check(n_contend > 0, "contention happened");
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
