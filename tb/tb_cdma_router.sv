// tb_cdma_router: end-to-end test of the CDMA router at its default size
// (7 ports, 3-bit addresses, 16-bit payload, 4-entry buffers).
// router_harness drives all ports with a single packet, permutation traffic
// and random traffic, and checks every delivered packet against a reference
// queue per (source, destination) pair, the 3-clock latency, one packet per
// port per clock, and that contention, full buffers, loopback and
// address-0 packets all occurred. A watchdog ends the run if it hangs.
module tb_cdma_router;
  localparam int unsigned NP    = 7;
  localparam int unsigned PKT_W = 22;

  logic clk = 0;
  logic rst_n;
  logic [NP-1:0] in_valid, in_ready, out_valid;
  logic [NP-1:0][PKT_W-1:0] in_pkt, out_pkt;
  logic done;
  int checks, failures;

  always #5 clk = ~clk;

  cdma_router dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_pkt
  );

  router_harness #(.ADDR_W(3), .PAYLOAD_W(16)) h (
    .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_pkt,
    .req(dut.req), .gnt(dut.gnt), .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
