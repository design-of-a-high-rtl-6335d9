// cdma_router: a code-division multiple-access router for an on-chip network.
//
// NPORTS = 2**ADDR_W - 1 resources attach to the router (7 with the default
// 3-bit addresses). Resource i has address i+1 and owns Walsh codeword i+1;
// codeword 0 (all zeros) means "no data". A packet is {SRC, DST, PAYLOAD} and
// travels as one parallel word. Per port, a buffer (cdma_fifo) holds incoming
// packets, a header decoder asks the shared scheduler for the head packet's
// destination, and on a grant the modulator spreads every packet bit with the
// destination's codeword (codeword for a 0, inverted codeword for a 1). The
// code adder counts, chip by chip, the 1s over all modulators, and every
// port's demodulator correlates those counts with its own codeword to recover
// the packet sent to it. Because the codewords are orthogonal, all ports can
// send in the same clock as long as their destinations differ; the scheduler
// grants one sender per destination per clock (round-robin).
//
// Interface: in_valid/in_ready/in_pkt per port (a packet is taken at a clock
// edge where in_valid and in_ready are both high; in_ready is "buffer not
// full"); out_valid/out_pkt per port (a one-clock strobe, no backpressure).
// Timing: a packet taken at edge 0 into an empty buffer is granted in the
// next clock, is spread at edge 1, summed at edge 2 and appears on out_pkt
// after edge 3. With no contention every port delivers one packet per clock.
// The block structure, the modulation table and the demodulation equations
// follow the source; buffer depth, handshakes, the scheduling rule, the
// pipeline registers and dropping of packets addressed to 0 are this
// design's choices. Defaults: 3-bit addresses, 16-bit payload.
module cdma_router #(
  parameter int unsigned ADDR_W     = cdma_pkg::ADDR_W_DEFAULT,
  parameter int unsigned PAYLOAD_W  = cdma_pkg::PAYLOAD_W_DEFAULT,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned L         = 1 << ADDR_W,
  localparam int unsigned NPORTS    = L - 1,
  localparam int unsigned PKT_W     = 2 * ADDR_W + PAYLOAD_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NPORTS-1:0]            in_valid,
  output logic [NPORTS-1:0]            in_ready,
  input  logic [NPORTS-1:0][PKT_W-1:0] in_pkt,
  output logic [NPORTS-1:0]            out_valid,
  output logic [NPORTS-1:0][PKT_W-1:0] out_pkt
);
  // Packet fields: DST sits just above the payload.
  localparam int unsigned DST_LSB = PAYLOAD_W;

  logic [NPORTS-1:0]                         full, empty, pop, req, gnt, mod_load;
  logic [NPORTS-1:0][PKT_W-1:0]              head;
  logic [NPORTS-1:0][ADDR_W-1:0]             req_dst, mod_dst;
  logic [2*NPORTS-1:0][ADDR_W-1:0]           cw_addr;
  logic [2*NPORTS-1:0][L-1:0]                cw_data;
  logic [NPORTS-1:0][PKT_W-1:0][L-1:0]       chips;
  logic [PKT_W-1:0][L-1:0][ADDR_W-1:0]       sum;
  logic [NPORTS-1:0]                         demod_err;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    cdma_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_buff (
      .clk, .rst_n,
      .push (in_valid[p] && !full[p]),
      .din  (in_pkt[p]),
      .full (full[p]),
      .pop  (pop[p]),
      .dout (head[p]),
      .empty(empty[p])
    );
    assign in_ready[p] = !full[p];

    header_decoder #(.ADDR_W(ADDR_W)) u_hd (
      .empty    (empty[p]),
      .head_dst (head[p][DST_LSB +: ADDR_W]),
      .req      (req[p]),
      .req_dst  (req_dst[p]),
      .sched_gnt(gnt[p]),
      .pop      (pop[p]),
      .mod_load (mod_load[p]),
      .mod_dst  (mod_dst[p])
    );

    // Read port p: the destination's codeword; read port NPORTS+p: own codeword.
    assign cw_addr[p]          = mod_dst[p];
    assign cw_addr[NPORTS + p] = ADDR_W'(p + 1);

    cdma_modulator #(.ADDR_W(ADDR_W), .PAYLOAD_W(PAYLOAD_W)) u_mod (
      .clk, .rst_n,
      .load    (mod_load[p]),
      .pkt     (head[p]),
      .codeword(cw_data[p]),
      .chips   (chips[p])
    );

    cdma_demodulator #(.ADDR_W(ADDR_W), .PAYLOAD_W(PAYLOAD_W)) u_demod (
      .clk, .rst_n,
      .sum     (sum),
      .codeword(cw_data[NPORTS + p]),
      .valid   (out_valid[p]),
      .pkt     (out_pkt[p]),
      .err     (demod_err[p])
    );
  end

  walsh_code_mem #(.ADDR_W(ADDR_W), .NRD(2 * NPORTS)) u_walsh (
    .addr(cw_addr),
    .data(cw_data)
  );

  cdma_scheduler #(.ADDR_W(ADDR_W)) u_sche (
    .clk, .rst_n,
    .req    (req),
    .req_dst(req_dst),
    .gnt    (gnt)
  );

  code_adder #(.ADDR_W(ADDR_W), .PAYLOAD_W(PAYLOAD_W)) u_ca (
    .clk, .rst_n,
    .chips(chips),
    .sum  (sum)
  );

  // With one sender per destination every decision factor is +1, -1 or 0.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) demod_err == '0)
    else $error("demodulator saw a collision");

endmodule
