// walsh_code_mem: Walsh codeword storage of the CDMA router.
//
// A read-only table of the L = 2**ADDR_W Walsh codewords, each L chips long,
// with NRD independent read ports. Port r returns codeword `addr[r]`, chip i in
// bit i. The modulators read the codeword of their packet's destination
// through it (this read port plays the part of the codeword multiplexers
// drawn in front of the modulator), and each demodulator reads its own
// port's codeword. The table is built at elaboration from the Hadamard rule
// chip(k, i) = parity(k AND i), so codeword 0 is all zeros (the reserved
// "no data" code) and codeword 3 is 01100110. Purely combinational.
module walsh_code_mem #(
  parameter int unsigned ADDR_W = cdma_pkg::ADDR_W_DEFAULT,
  parameter int unsigned NRD    = 14,
  localparam int unsigned L     = 1 << ADDR_W
) (
  input  logic [NRD-1:0][ADDR_W-1:0] addr,
  output logic [NRD-1:0][L-1:0]      data
);
  logic [L-1:0] rom [L];

  always_comb begin
    for (int unsigned k = 0; k < L; k++)
      for (int unsigned i = 0; i < L; i++)
        rom[k][i] = cdma_pkg::walsh_chip(k, i);
  end

  always_comb begin
    for (int unsigned r = 0; r < NRD; r++) data[r] = rom[addr[r]];
  end

endmodule
