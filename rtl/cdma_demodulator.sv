// cdma_demodulator: per-port demodulator (DEMOD) of the CDMA router.
//
// Recovers, from the code adder's sums, the packet addressed to this port.
// For each packet bit and each chip i it forms the decision variable
//   D[i] = 2*S[i] - L   when chip i of this port's codeword is 0,
//   D[i] = L - 2*S[i]   when it is 1,
// and the decision factor lambda = sum(D)/L. lambda = +1 means a 1 was sent,
// -1 a 0, and 0 that nothing was sent to this port; these are the source's
// equations and decision table. Only the sign of lambda matters, so the sum of
// D is compared with 0 and never divided. Because idle ports send the all-zero
// codeword and other destinations use orthogonal codewords, with at most one
// sender per destination sum(D) is exactly +L, -L or 0.
// `valid` rises when every bit of the packet has a non-zero decision factor.
// `err` (this design's addition) flags a decision factor outside {-1,0,+1} or
// a packet with only some bits present, which the scheduler rules out.
// Registered: sums presented before a clock edge give `pkt` right after it.
module cdma_demodulator #(
  parameter int unsigned ADDR_W    = cdma_pkg::ADDR_W_DEFAULT,
  parameter int unsigned PAYLOAD_W = cdma_pkg::PAYLOAD_W_DEFAULT,
  localparam int unsigned L        = 1 << ADDR_W,
  localparam int unsigned PKT_W    = 2 * ADDR_W + PAYLOAD_W,
  localparam int unsigned ACC_W    = 2 * ADDR_W + 2
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [PKT_W-1:0][L-1:0][ADDR_W-1:0] sum,
  input  logic [L-1:0]                        codeword,
  output logic                                valid,
  output logic [PKT_W-1:0]                    pkt,
  output logic                                err
);
  logic signed [ACC_W-1:0] acc [PKT_W];
  logic [PKT_W-1:0] bit_d, present, bad;

  always_comb begin
    for (int unsigned n = 0; n < PKT_W; n++) begin
      logic signed [ACC_W-1:0] s2, d;
      acc[n] = '0;
      for (int unsigned i = 0; i < L; i++) begin
        s2 = ACC_W'(sum[n][i]) <<< 1;
        d  = codeword[i] ? (ACC_W'(L) - s2) : (s2 - ACC_W'(L));
        acc[n] = acc[n] + d;
      end
      bit_d[n]   = (acc[n] > 0);
      present[n] = (acc[n] != 0);
      bad[n]     = present[n] && (acc[n] != ACC_W'(L)) && (acc[n] != -ACC_W'(L));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      pkt   <= '0;
      err   <= 1'b0;
    end else begin
      valid <= &present;
      pkt   <= bit_d;
      err   <= (|bad) || ((|present) && !(&present));
    end
  end

endmodule
