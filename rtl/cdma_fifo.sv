// cdma_fifo: per-port packet buffer (BUFF) of the CDMA router.
//
// Holds whole packets sent by the attached resource until the header decoder
// and scheduler let them go. It is a circular buffer of DEPTH entries of WIDTH
// bits with first-word fall-through: `dout` always shows the oldest packet, so
// the header decoder can read its destination field in the same clock.
// Interface: `push`/`din` write, `pop` removes the head; `full` and `empty`
// report the occupancy. A push while full and a pop while empty are ignored.
// Push and pop may happen in the same clock. Timing: a packet pushed at a
// clock edge is visible at `dout` right after that edge when the buffer was
// empty. The source asks for packet buffering but gives no depth or
// organisation; DEPTH = 4 and the fall-through structure are this design's.
module cdma_fifo #(
  parameter int unsigned WIDTH = 2 * cdma_pkg::ADDR_W_DEFAULT + cdma_pkg::PAYLOAD_W_DEFAULT,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      count;
  logic             do_push, do_pop;

  assign full    = (count == (PW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

endmodule
