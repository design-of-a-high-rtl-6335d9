// cdma_modulator: per-port modulator (MOD) of the CDMA router.
//
// When the header decoder passes on a grant (`load`), the packet leaving the
// buffer is spread bit-parallel with the destination's Walsh codeword: for
// every packet bit, a multiplexer sends the codeword itself for a 0 and the
// inverted codeword for a 1. With no grant the modulator sends the all-zero
// codeword, the "no data" code, which is orthogonal to every resource's
// codeword and so contributes nothing at the demodulators. This mapping is the
// source's modulation table. The output is registered: chips for a packet
// loaded at a clock edge appear right after that edge and last one clock.
// Interface: `codeword` is the destination's codeword from the Walsh storage,
// chip i in bit i; `chips[n]` is the L-chip sequence of packet bit n.
module cdma_modulator #(
  parameter int unsigned ADDR_W    = cdma_pkg::ADDR_W_DEFAULT,
  parameter int unsigned PAYLOAD_W = cdma_pkg::PAYLOAD_W_DEFAULT,
  localparam int unsigned L        = 1 << ADDR_W,
  localparam int unsigned PKT_W    = 2 * ADDR_W + PAYLOAD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [PKT_W-1:0]          pkt,
  input  logic [L-1:0]              codeword,
  output logic [PKT_W-1:0][L-1:0]   chips
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chips <= '0;
    end else begin
      for (int unsigned n = 0; n < PKT_W; n++)
        chips[n] <= load ? (pkt[n] ? ~codeword : codeword) : '0;
    end
  end

endmodule
