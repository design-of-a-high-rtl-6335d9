// cdma_scheduler: contention resolution for the CDMA router.
//
// Each port whose buffer holds a packet requests the packet's destination.
// Several ports may send in the same clock as long as their destinations
// differ, because their codewords are orthogonal; two packets for the same
// destination would share a codeword and collide. So, per destination, the
// scheduler grants exactly one of the requesting ports, round-robin: the first
// requester after the port granted last time for that destination. Grants are
// combinational from the requests (same clock), which lets every port send a
// packet each clock; the round-robin pointers are the only state. The source
// leaves the scheduling algorithm open; round-robin is this design's choice.
module cdma_scheduler #(
  parameter int unsigned ADDR_W = cdma_pkg::ADDR_W_DEFAULT,
  localparam int unsigned NPORTS = (1 << ADDR_W) - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0]             req,
  input  logic [NPORTS-1:0][ADDR_W-1:0] req_dst,
  output logic [NPORTS-1:0]             gnt
);
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  // last[d]: port granted most recently for destination d+1
  logic [PW-1:0] last      [NPORTS];
  logic [PW-1:0] last_nxt  [NPORTS];
  logic [NPORTS-1:0] dst_busy;

  always_comb begin
    gnt = '0;
    dst_busy = '0;
    for (int unsigned d = 0; d < NPORTS; d++) begin
      last_nxt[d] = last[d];
      for (int unsigned k = 1; k <= NPORTS; k++) begin
        int unsigned p;
        p = (int'(last[d]) + k) % NPORTS;
        if (!dst_busy[d] && req[p] && (int'(req_dst[p]) == d + 1)) begin
          gnt[p]      = 1'b1;
          dst_busy[d] = 1'b1;
          last_nxt[d] = PW'(p);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 0; d < NPORTS; d++) last[d] <= PW'(NPORTS - 1);
    end else begin
      for (int unsigned d = 0; d < NPORTS; d++) last[d] <= last_nxt[d];
    end
  end

  // A grant only ever goes to a requesting port, and never two for one destination.
  logic multi_gnt;
  always_comb begin
    multi_gnt = 1'b0;
    for (int unsigned d = 0; d < NPORTS; d++) begin
      int unsigned n;
      n = 0;
      for (int unsigned p = 0; p < NPORTS; p++)
        if (gnt[p] && int'(req_dst[p]) == d + 1) n++;
      if (n > 1) multi_gnt = 1'b1;
    end
  end

  a_one_grant_per_dst: assert property (@(posedge clk) disable iff (!rst_n) !multi_gnt)
    else $error("two grants for one destination");
  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0)
    else $error("grant without request");

endmodule
