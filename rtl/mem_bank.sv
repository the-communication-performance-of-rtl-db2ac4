// mem_bank: one bank of the multi-bank multi-port memory.
//
// A plain memory of DEPTH flits with one write port and one read port; the
// read is combinational (address in, data out in the same cycle) and the write
// takes effect at the clock edge. Because each bank holds exactly one block of
// the shared memory and a block belongs to one link at a time, a single write
// and a single read port per bank are enough, which is the point of the
// multi-bank organisation in the document. The asynchronous read is this
// design's choice; it lets the output crossbar deliver into the private buffer
// in the same cycle as the read.
module mem_bank
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = BLOCK_FLITS
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  buf_flit_t                wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output buf_flit_t                rdata
);
  buf_flit_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
