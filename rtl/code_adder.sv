// code_adder: the code adder (CA) shared by all ports of the CDMA router.
//
// For every packet bit position n and every chip i it counts how many of the
// NPORTS modulators send a 1 on that chip: sum[n][i] = S[i] in the
// demodulation equations. With NPORTS = 2**ADDR_W - 1 the count fits in
// ADDR_W bits. Idle modulators send all-zero chips and add nothing. The
// result is registered: chips presented before a clock edge give their sums
// right after it. The adder structure (a population count per chip) is this
// design's; the source only says the adder forms the summation value.
module code_adder #(
  parameter int unsigned ADDR_W    = cdma_pkg::ADDR_W_DEFAULT,
  parameter int unsigned PAYLOAD_W = cdma_pkg::PAYLOAD_W_DEFAULT,
  localparam int unsigned L        = 1 << ADDR_W,
  localparam int unsigned NPORTS   = L - 1,
  localparam int unsigned PKT_W    = 2 * ADDR_W + PAYLOAD_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NPORTS-1:0][PKT_W-1:0][L-1:0]    chips,
  output logic [PKT_W-1:0][L-1:0][ADDR_W-1:0]    sum
);
  logic [PKT_W-1:0][L-1:0][ADDR_W-1:0] sum_d;

  always_comb begin
    for (int unsigned n = 0; n < PKT_W; n++)
      for (int unsigned i = 0; i < L; i++) begin
        sum_d[n][i] = '0;
        for (int unsigned p = 0; p < NPORTS; p++)
          sum_d[n][i] = sum_d[n][i] + ADDR_W'(chips[p][n][i]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= sum_d;
  end

endmodule
