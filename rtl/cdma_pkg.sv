// cdma_pkg: constants and helper functions shared by the CDMA router blocks.
//
// The router spreads every packet bit with a Walsh codeword. With ADDR_W address
// bits there are L = 2**ADDR_W codewords of L chips each; codeword 0 (all zeros)
// means "no data" and codewords 1..L-1 belong to the L-1 attached resources.
// The codewords are the rows of a Sylvester-ordered Hadamard matrix written in
// 0/1 form: chip i of codeword k is the parity of (k AND i). This choice is the
// design's own (the contents are not tabulated by the source), picked because
// row 0 is all zeros and row 3 is 01100110, the codeword used as an example
// for the modulator.
//
// A packet is {SRC, DST, PAYLOAD}: SRC in the most significant ADDR_W bits,
// then DST, then PAYLOAD_W payload bits. The defaults are the 3-bit addresses
// and 16-bit payload of the reference configuration.
package cdma_pkg;

  localparam int unsigned ADDR_W_DEFAULT    = 3;
  localparam int unsigned PAYLOAD_W_DEFAULT = 16;

  // Chip `i` of Walsh codeword `k` (0/1 form of Hadamard row k).
  function automatic logic walsh_chip(input int unsigned k, input int unsigned i);
    return ^(k & i);
  endfunction

  // Whole codeword k of length l, chip i in bit i.
  function automatic logic [255:0] walsh_row(input int unsigned k, input int unsigned l);
    logic [255:0] r;
    r = '0;
    for (int unsigned i = 0; i < l; i++) r[i] = walsh_chip(k, i);
    return r;
  endfunction

endpackage
