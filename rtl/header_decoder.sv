// header_decoder: per-port header decoder (HD) of the CDMA router.
//
// Looks at the destination field of the packet at the head of its port's
// buffer and asks the scheduler for that destination (`req`, `req_dst`). When
// the scheduler grants it, the grant goes on to the buffer (`pop`) and to the
// modulator (`mod_load`), and the destination selects the codeword the
// modulator uses (`mod_dst`). Destination 0 names the reserved "no data"
// codeword, not a resource: such a packet is popped and dropped without a
// request (this design's rule). Purely combinational; the signal set follows
// the Req/Gnt/DST connections of the router's block diagram.
module header_decoder #(
  parameter int unsigned ADDR_W = cdma_pkg::ADDR_W_DEFAULT
) (
  input  logic              empty,
  input  logic [ADDR_W-1:0] head_dst,
  output logic              req,
  output logic [ADDR_W-1:0] req_dst,
  input  logic              sched_gnt,
  output logic              pop,
  output logic              mod_load,
  output logic [ADDR_W-1:0] mod_dst
);
  logic bad_dst;

  always_comb begin
    bad_dst  = (head_dst == '0);
    req      = !empty && !bad_dst;
    req_dst  = head_dst;
    mod_load = req && sched_gnt;
    mod_dst  = head_dst;
    pop      = mod_load || (!empty && bad_dst);
  end

endmodule
