// route_compute: dimension-order (X then Y) routing for a 2-D mesh or torus.
//
// Runs on a head flit in the first pipeline stage, in parallel with the
// In-Judge decision, because the output link does not depend on whether the
// flit goes through the shared memory. It returns the output port and the set
// of output virtual channels the packet may take at the next router.
//
// Mesh: X is corrected first, then Y; both virtual channels are free for use,
// since dimension-order routing on a mesh cannot deadlock. Torus: the shorter
// way round is taken in each dimension (ties go the positive way) and the two
// virtual channels form a dateline pair: a packet uses VC 0 until it crosses
// the wrap-around link of the dimension it travels in, and VC 1 from that
// link on, until it turns into the next dimension. Dimension-order routing
// follows the document; the dateline scheme and the tie rule are this design's
// choice, as the document does not say how the torus avoids deadlock.
//
// Purely combinational. Ports: N is +y, S is -y, E is +x, W is -x.
module route_compute
  import noc_pkg::*;
#(
  parameter bit          TORUS = 1'b1,
  parameter int unsigned K     = 4       // routers per dimension
) (
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic [PORT_BITS-1:0]  in_port,
  input  logic [VC_W-1:0]    in_vc,
  output logic [PORT_BITS-1:0]  out_port,
  output logic [NUM_VCS-1:0] vc_mask
);
  // distance the positive way round, modulo K
  function automatic int unsigned fwd_dist(logic [COORD_W-1:0] from, logic [COORD_W-1:0] to);
    return (int'(to) >= int'(from)) ? int'(to) - int'(from) : int'(to) + K - int'(from);
  endfunction

  always_comb begin
    int unsigned dxp, dyp;
    logic positive, wraps, same_dim, crossed;
    out_port = PORT_LOCAL;
    vc_mask  = '1;
    positive = 1'b0;
    wraps    = 1'b0;
    same_dim = 1'b0;
    crossed  = 1'b0;
    dxp      = fwd_dist(cur_x, dst_x);
    dyp      = fwd_dist(cur_y, dst_y);
    if (dst_x != cur_x) begin
      if (TORUS) positive = (dxp <= K / 2);
      else       positive = (dst_x > cur_x);
      out_port = positive ? PORT_EAST : PORT_WEST;
      wraps    = positive ? (int'(cur_x) == K - 1) : (cur_x == '0);
      // still travelling in X if it came in from the W or E neighbour
      same_dim = (in_port == PORT_WEST) || (in_port == PORT_EAST);
    end else if (dst_y != cur_y) begin
      if (TORUS) positive = (dyp <= K / 2);
      else       positive = (dst_y > cur_y);
      out_port = positive ? PORT_NORTH : PORT_SOUTH;
      wraps    = positive ? (int'(cur_y) == K - 1) : (cur_y == '0);
      same_dim = (in_port == PORT_NORTH) || (in_port == PORT_SOUTH);
    end
    if (TORUS && out_port != PORT_LOCAL) begin
      crossed = same_dim && (in_vc == VC_W'(1));
      vc_mask = (crossed || wraps) ? NUM_VCS'(2'b10) : NUM_VCS'(2'b01);
    end
  end
endmodule
