// private_buffer: the small per-virtual-channel FIFO of the link-sharing router.
//
// Every virtual channel owns one of these whatever the shared memory holds, so
// a channel can always make progress and the network cannot deadlock for lack
// of shared space. Flits reach it either straight from the input port (route 1)
// or from the shared memory (route 2); they leave it through the switch
// allocation stage. The depth default of two flits follows the document, which
// says the pipeline through the shared memory flows smoothly when the private
// buffer can absorb one blocking, i.e. holds two or more flits.
//
// Interface: push/din write at the clock edge, pop removes the head; dout is
// the head flit (valid while !empty). count is the registered occupancy.
// Pushing when full or popping when empty is a protocol error (asserted).
module private_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = PRIV_DEPTH
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  buf_flit_t din,
  input  logic      pop,
  output buf_flit_t dout,
  output logic      empty,
  output logic      full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  buf_flit_t      mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
