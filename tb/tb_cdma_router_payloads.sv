// tb_cdma_router_payloads: the router at the five payload sizes its area and
// throughput were evaluated at (8, 16, 32, 64 and 128 payload bits; 7 ports,
// 3-bit addresses). Each size runs the full router_harness sequence: single
// packet latency, one packet per port per clock under permutation traffic,
// and random traffic with contention, full buffers, loopback and address-0
// packets. The five routers run side by side from one clock.
module tb_cdma_router_payloads;
  localparam int unsigned NP = 7;
  localparam int unsigned NSZ = 5;
  localparam int unsigned SIZES [NSZ] = '{8, 16, 32, 64, 128};

  logic clk = 0;
  logic [NSZ-1:0] done;
  int checks [NSZ];
  int failures [NSZ];

  always #5 clk = ~clk;

  for (genvar s = 0; s < NSZ; s++) begin : g_size
    localparam int unsigned PW = SIZES[s];
    localparam int unsigned PKT_W = 6 + PW;
    logic rst_n;
    logic [NP-1:0] in_valid, in_ready, out_valid;
    logic [NP-1:0][PKT_W-1:0] in_pkt, out_pkt;

    cdma_router #(.ADDR_W(3), .PAYLOAD_W(PW)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_pkt
    );

    router_harness #(.ADDR_W(3), .PAYLOAD_W(PW), .RANDOM_CYCLES(1500)) h (
      .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_pkt,
      .req(dut.req), .gnt(dut.gnt), .done(done[s]), .checks(checks[s]), .failures(failures[s])
    );
  end

  initial begin
    int c, f;
    wait (&done);
    c = 0; f = 0;
    for (int s = 0; s < NSZ; s++) begin
      $display("payload %0d bits: checks=%0d failures=%0d", SIZES[s], checks[s], failures[s]);
      c += checks[s];
      f += failures[s];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (20000) @(posedge clk);
    c = 0; f = 0;
    for (int s = 0; s < NSZ; s++) begin c += checks[s]; f += failures[s]; end
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end
endmodule
