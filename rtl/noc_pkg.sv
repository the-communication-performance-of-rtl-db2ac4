// noc_pkg: types and constants shared by the link-sharing wormhole router.
//
// The router has five ports (four mesh/torus neighbours plus the local PE),
// two virtual channels per physical link and a flit of FLIT_W payload bits
// with a two-bit type tag. A head flit carries its destination coordinates in
// the low bits of the payload. The four neighbour links share one multi-bank
// multi-port memory of NUM_BLOCKS blocks of BLOCK_FLITS flits each; every
// block is one bank, so each bank is written and read by one link at a time.
//
// Values that follow the document: 2 virtual channels per link, 64-bit flits
// (the W=64 column of its cost table), 4 sharing links, 8 blocks (its chosen
// number of banks), 64 flits of shared memory (B x F = 64), and a private
// buffer of 2 flits ("two or larger"). The port numbering, the flit tag
// encoding and the position of the destination in the head flit are this
// design's own choices.
package noc_pkg;

  localparam int unsigned NUM_PORTS    = 5;   // N, E, S, W, local
  localparam int unsigned NUM_VCS      = 2;   // virtual channels per physical link
  localparam int unsigned FLIT_W       = 64;  // payload bits per flit (W)
  localparam int unsigned SHARED_LINKS = 4;   // links that share the memory (L)
  localparam int unsigned NUM_BLOCKS   = 8;   // blocks = banks of the shared memory (B)
  localparam int unsigned BLOCK_FLITS  = 8;   // flits per block (F), B x F = 64
  localparam int unsigned PRIV_DEPTH   = 2;   // private buffer flits per virtual channel
  localparam int unsigned COORD_W      = 3;   // coordinate bits, enough for an 8x8 network

  localparam int unsigned PORT_BITS = $clog2(NUM_PORTS);
  localparam int unsigned VC_W   = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1;

  // Port numbers. A flit that enters on PORT_WEST came from the west neighbour.
  typedef enum logic [PORT_BITS-1:0] {
    PORT_NORTH = 3'd0,
    PORT_EAST = 3'd1,
    PORT_SOUTH = 3'd2,
    PORT_WEST = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY     = 2'b00,
    FLIT_HEAD     = 2'b01,
    FLIT_TAIL     = 2'b10,
    FLIT_HEADTAIL = 2'b11
  } flit_type_e;

  // A flit as it travels on a link.
  typedef struct packed {
    flit_type_e        ftype;
    logic [FLIT_W-1:0] data;   // head: data[COORD_W-1:0] = dest x, next COORD_W bits = dest y
  } flit_t;

  // A flit inside the router's buffers: the route computed for a head flit in
  // the first pipeline stage travels with it (ignored for body and tail flits).
  typedef struct packed {
    flit_t              flit;
    logic [PORT_BITS-1:0]  out_port;
    logic [NUM_VCS-1:0] vc_mask;   // output virtual channels the head may take
  } buf_flit_t;

  function automatic logic is_head(flit_type_e t);
    return t[0];
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return t[1];
  endfunction

endpackage
