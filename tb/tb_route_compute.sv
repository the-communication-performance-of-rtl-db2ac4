// tb_route_compute: exhaustive check of dimension-order routing on a 4x4
// torus and a 4x4 mesh.
//
// For every router position, destination, input port and input VC the output
// port and the allowed VC set are compared with a reference written here:
// X first, the shorter way round on the torus (ties positive), and on the
// torus the dateline rule (VC 1 on and after the wrap-around link of the
// current dimension, VC 0 otherwise); both VCs on the mesh.
module tb_route_compute;
  import noc_pkg::*;

  localparam int KK = 4;

  logic [COORD_W-1:0] cx, cy, dx, dy;
  logic [PORT_BITS-1:0] ip;
  logic [VC_W-1:0] ivc;
  logic [PORT_BITS-1:0] t_port, m_port;
  logic [NUM_VCS-1:0] t_mask, m_mask;

  route_compute #(.TORUS(1'b1), .K(KK)) u_t (
    .cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .in_port(ip), .in_vc(ivc),
    .out_port(t_port), .vc_mask(t_mask));
  route_compute #(.TORUS(1'b0), .K(KK)) u_m (
    .cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .in_port(ip), .in_vc(ivc),
    .out_port(m_port), .vc_mask(m_mask));

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int x = 0; x < KK; x++)
    for (int y = 0; y < KK; y++)
    for (int tx = 0; tx < KK; tx++)
    for (int ty = 0; ty < KK; ty++)
    for (int p = 0; p < NUM_PORTS; p++)
    for (int v = 0; v < NUM_VCS; v++) begin
      int ep, em, fx, fy;
      bit wraps, same;
      cx = 3'(x); cy = 3'(y); dx = 3'(tx); dy = 3'(ty); ip = 3'(p); ivc = 1'(v);
      #1;
      // torus
      fx = (tx - x + KK) % KK;
      fy = (ty - y + KK) % KK;
      if (fx != 0)      ep = (fx <= KK / 2) ? 1 : 3;
      else if (fy != 0) ep = (fy <= KK / 2) ? 0 : 2;
      else              ep = 4;
      wraps = (ep == 1 && x == KK - 1) || (ep == 3 && x == 0) ||
              (ep == 0 && y == KK - 1) || (ep == 2 && y == 0);
      same  = ((ep == 1 || ep == 3) && (p == 1 || p == 3)) ||
              ((ep == 0 || ep == 2) && (p == 0 || p == 2));
      if (ep == 4)                    em = 3;
      else if (wraps || (same && v == 1)) em = 2;
      else                            em = 1;
      check(int'(t_port) == ep, $sformatf("torus port (%0d,%0d)->(%0d,%0d): %0d vs %0d", x, y, tx, ty, t_port, ep));
      check(int'(t_mask) == em, $sformatf("torus mask (%0d,%0d)->(%0d,%0d) in %0d/%0d: %0d vs %0d",
                                          x, y, tx, ty, p, v, t_mask, em));
      // mesh
      if (tx > x)      ep = 1;
      else if (tx < x) ep = 3;
      else if (ty > y) ep = 0;
      else if (ty < y) ep = 2;
      else             ep = 4;
      check(int'(m_port) == ep, "mesh port");
      check(m_mask == 2'b11, "mesh mask");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
