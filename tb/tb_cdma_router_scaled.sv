// tb_cdma_router_scaled: the router grown by lengthening the Walsh codewords.
// 4 address bits give 16-chip codewords and 15 ports; 5 address bits give
// 32-chip codewords and 31 ports. Both run the full router_harness sequence
// (latency, one packet per port per clock, random traffic and draining)
// with a 16-bit payload.
module tb_cdma_router_scaled;
  localparam int unsigned NSZ = 2;
  localparam int unsigned AWS [NSZ] = '{4, 5};
  localparam int unsigned PW = 16;

  logic clk = 0;
  logic [NSZ-1:0] done;
  int checks [NSZ];
  int failures [NSZ];

  always #5 clk = ~clk;

  for (genvar s = 0; s < NSZ; s++) begin : g_size
    localparam int unsigned AW = AWS[s];
    localparam int unsigned NP = (1 << AW) - 1;
    localparam int unsigned PKT_W = 2 * AW + PW;
    logic rst_n;
    logic [NP-1:0] in_valid, in_ready, out_valid;
    logic [NP-1:0][PKT_W-1:0] in_pkt, out_pkt;

    cdma_router #(.ADDR_W(AW), .PAYLOAD_W(PW)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_pkt
    );

    router_harness #(.ADDR_W(AW), .PAYLOAD_W(PW), .RANDOM_CYCLES(1500)) h (
      .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_pkt,
      .req(dut.req), .gnt(dut.gnt), .done(done[s]), .checks(checks[s]), .failures(failures[s])
    );
  end

  initial begin
    int c, f;
    wait (&done);
    c = 0; f = 0;
    for (int s = 0; s < NSZ; s++) begin
      $display("%0d-bit addresses (%0d ports): checks=%0d failures=%0d",
               AWS[s], (1 << AWS[s]) - 1, checks[s], failures[s]);
      c += checks[s];
      f += failures[s];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (30000) @(posedge clk);
    c = 0; f = 0;
    for (int s = 0; s < NSZ; s++) begin c += checks[s]; f += failures[s]; end
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
    $finish;
  end
endmodule
