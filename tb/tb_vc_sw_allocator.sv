// tb_vc_sw_allocator: random wormhole traffic from 5 x 2 input VCs against
// random next-router readiness.
//
// A model here keeps which packet holds each output VC. Every cycle it
// checks that each output takes at most one flit and each input gives at
// most one; that a granted flit was present, goes to its packet's output
// port, and leaves on a VC that is ready; that a head takes a VC its route
// allows and no other packet holds; that body and tail flits follow their
// head's VC; and that a tail frees the VC. All packets must get through, and
// heads must at some point wait for a busy output VC.
module tb_vc_sw_allocator;
  import noc_pkg::*;

  localparam int P = NUM_PORTS;
  localparam int V = NUM_VCS;
  localparam int NPKT = 80;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      [P-1:0][V-1:0]         vc_valid, out_ready, vc_pop;
  buf_flit_t [P-1:0][V-1:0]         vc_head;
  logic      [P-1:0]                in_grant, out_grant;
  logic      [P-1:0][VC_W-1:0]      in_vc_sel, out_vc;
  logic      [P-1:0][PORT_BITS-1:0] out_sel;

  vc_sw_allocator dut (.clk, .rst_n, .vc_valid, .vc_head, .out_ready, .vc_pop,
                       .in_grant, .in_vc_sel, .out_grant, .out_sel, .out_vc);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // input VC streams
  int len [P][V], seq [P][V], left [P][V], port [P][V];
  logic [V-1:0] mask [P][V];
  int hold_vc [P][V];        // output VC held by the packet, -1 before its head
  int owner [P][V];          // [out][ovc] -> p*V+v, or -1
  int done_pkts = 0, head_waits = 0;

  task automatic next_packet(int p, int v);
    if (left[p][v] == 0) begin len[p][v] = 0; return; end
    left[p][v]--;
    len[p][v]  = $urandom_range(1, 6);
    seq[p][v]  = 0;
    port[p][v] = $urandom_range(0, P - 1);
    mask[p][v] = 2'($urandom_range(1, 3));
    hold_vc[p][v] = -1;
  endtask

  function automatic buf_flit_t head_of(int p, int v);
    buf_flit_t b;
    b = '0;
    b.flit.ftype = (len[p][v] == 1) ? FLIT_HEADTAIL :
                   (seq[p][v] == 0) ? FLIT_HEAD : (seq[p][v] == len[p][v] - 1) ? FLIT_TAIL : FLIT_BODY;
    b.flit.data  = 64'(p * 1000 + v * 100 + seq[p][v]);
    // the route fields are only valid on heads: scramble them elsewhere
    b.out_port   = (seq[p][v] == 0) ? PORT_BITS'(port[p][v]) : PORT_BITS'($urandom_range(0, P - 1));
    b.vc_mask    = (seq[p][v] == 0) ? mask[p][v] : 2'($urandom_range(0, 3));
    return b;
  endfunction

  initial begin
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
      left[p][v] = NPKT; next_packet(p, v); owner[p][v] = -1;
    end
    vc_valid = '0; out_ready = '0; vc_head = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 100000 && done_pkts < P * V * NPKT; cyc++) begin
      int in_used [P];
      bit out_used [P];
      @(negedge clk);
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
        vc_valid[p][v]  = (len[p][v] != 0) && ($urandom_range(0, 3) != 0);
        vc_head[p][v]   = head_of(p, v);
        out_ready[p][v] = $urandom_range(0, 2) != 0;
      end
      #1;
      for (int p = 0; p < P; p++) begin in_used[p] = 0; out_used[p] = 0; end
      for (int o = 0; o < P; o++) begin
        if (out_grant[o]) begin
          int p, v, ov;
          p  = int'(out_sel[o]);
          v  = int'(in_vc_sel[p]);
          ov = int'(out_vc[o]);
          check(!out_used[o], "two flits to one output");
          out_used[o] = 1;
          check(vc_pop[p][v], "granted VC not popped");
          check(vc_valid[p][v], "grant to an empty VC");
          check(port[p][v] == o, $sformatf("in %0d.%0d sent to output %0d, route says %0d", p, v, o, port[p][v]));
          check(out_ready[o][ov], "flit sent to a VC that is not ready");
          if (seq[p][v] == 0) begin
            check(mask[p][v][ov], "head took a VC outside its route's set");
            check(owner[o][ov] < 0, "head took a VC another packet holds");
          end else begin
            check(hold_vc[p][v] == ov, "body or tail left its packet's VC");
          end
        end
      end
      for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) begin
        if (vc_pop[p][v]) in_used[p]++;
        if (vc_valid[p][v] && seq[p][v] == 0 && !vc_pop[p][v] && out_ready[port[p][v]] != '0)
          head_waits++;
      end
      for (int p = 0; p < P; p++) begin
        check(in_used[p] <= 1, "two flits from one input");
        check(in_grant[p] == (in_used[p] == 1), "in_grant");
      end
      @(posedge clk);
      // advance the model
      for (int o = 0; o < P; o++) begin
        if (out_grant[o]) begin
          int p, v, ov;
          p  = int'(out_sel[o]);
          v  = int'(in_vc_sel[p]);
          ov = int'(out_vc[o]);
          if (seq[p][v] == 0) begin owner[o][ov] = p * V + v; hold_vc[p][v] = ov; end
          seq[p][v]++;
          if (seq[p][v] == len[p][v]) begin
            owner[o][ov] = -1;
            done_pkts++;
            next_packet(p, v);
          end
        end
      end
    end
    check(done_pkts == P * V * NPKT, $sformatf("only %0d packets completed", done_pkts));
    check(head_waits > 0, "heads never had to wait");
    $display("packets=%0d head_waits=%0d", done_pkts, head_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
