// tb_noc_router: end-to-end test of one link-sharing router at its default
// parameters (2-D torus, 4x4, 2 VCs, 8 blocks of 8 flits, 2-flit private
// buffers), placed at (1,2).
//
// Five sources, one per input port, each run two packet streams (one per
// virtual channel) of 16-, 32- and 64-flit packets to random destinations,
// and obey the router's per-VC ready exactly as an upstream router would. Five
// sinks accept flits with a ready that is random per VC and switches between
// congested phases (ready rarely high) and free phases, so the private
// buffers fill and flits are pushed through the shared memory.
//
// Checks, against a model written here: every head leaves on the output port
// of X-then-Y shortest-way routing, on a VC allowed by the dateline rule;
// every flit of a packet leaves on the same port and VC, in order, with its
// payload intact; every packet is delivered exactly once; no flit leaves on a
// VC whose sink was not ready. An idle router forwards a single-flit packet in
// three cycles (route 1). A packet whose head is blocked at the switch puts
// its first two flits in the private buffer and the rest in the shared
// memory, and leaves once the output frees. Mechanisms counted, each must
// occur: route 1 and route 2 flits, block allocations and releases, use of
// every bank, a channel holding more than one block, flow-control
// back-pressure, and both dateline VCs on network outputs.
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned P      = NUM_PORTS;
  localparam int unsigned V      = NUM_VCS;
  localparam int unsigned KK     = 4;
  localparam int unsigned NPKT   = 24;          // packets per (port, VC) stream
  localparam int unsigned MAXID  = P * V * NPKT + 3;   // two ids for directed packets
  localparam logic [COORD_W-1:0] MY_X = 3'd1;
  localparam logic [COORD_W-1:0] MY_Y = 3'd2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [P-1:0]             in_valid;
  logic  [P-1:0][VC_W-1:0]   in_vc;
  flit_t [P-1:0]             in_flit;
  logic  [P-1:0][V-1:0]      in_ready;
  logic  [P-1:0]             out_valid;
  logic  [P-1:0][VC_W-1:0]   out_vc;
  flit_t [P-1:0]             out_flit;
  logic  [P-1:0][V-1:0]      out_ready;

  noc_router dut (
    .clk       (clk),
    .rst_n     (rst_n),
    .cur_x     (MY_X),
    .cur_y     (MY_Y),
    .in_valid  (in_valid),
    .in_vc     (in_vc),
    .in_flit   (in_flit),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_vc    (out_vc),
    .out_flit  (out_flit),
    .out_ready (out_ready)
  );

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------- reference routing
  function automatic int ref_port(int dx, int dy);
    int fx, fy;
    fx = (dx - MY_X + KK) % KK;
    fy = (dy - MY_Y + KK) % KK;
    if (fx != 0) return (fx <= KK / 2) ? 1 : 3;   // E : W
    if (fy != 0) return (fy <= KK / 2) ? 0 : 2;   // N : S
    return 4;
  endfunction

  function automatic int ref_vc(int op, int ip, int ivc);
    // returns the only legal VC, or -1 when both are
    bit wraps, same;
    if (op == 4) return -1;
    wraps = (op == 1 && MY_X == KK - 1) || (op == 3 && MY_X == 0) ||
            (op == 0 && MY_Y == KK - 1) || (op == 2 && MY_Y == 0);
    same  = ((op == 1 || op == 3) && (ip == 1 || ip == 3)) ||
            ((op == 0 || op == 2) && (ip == 0 || ip == 2));
    return (wraps || (same && ivc == 1)) ? 1 : 0;
  endfunction

  // ------------------------------------------------------------- packet table
  int pk_len   [MAXID];
  int pk_port  [MAXID];
  int pk_vc    [MAXID];
  int pk_seen  [MAXID];
  int sent_pkts = 0;
  int done_pkts = 0;

  // source state per (port, vc)
  int src_id   [P][V];
  int src_seq  [P][V];
  int src_left [P][V];     // packets still to start
  int src_dx   [P][V];
  int src_dy   [P][V];

  function automatic logic [FLIT_W-1:0] payload(int id, int seq, int dx, int dy);
    logic [FLIT_W-1:0] d;
    d        = '0;
    d[2:0]   = 3'(dx);
    d[5:3]   = 3'(dy);
    d[15:8]  = 8'(seq);
    d[31:16] = 16'(id);
    d[63:32] = 32'(id * 7919 + seq * 104729);
    return d;
  endfunction

  int next_id = 1;

  task automatic new_packet(int p, int v);
    int len, dx, dy, op, r;
    r   = $urandom_range(0, 9);
    len = (r < 5) ? 16 : (r < 8) ? 32 : 64;
    do begin
      dx = $urandom_range(0, KK - 1);
      dy = $urandom_range(0, KK - 1);
      op = ref_port(dx, dy);
    end while (op == p);          // no U-turns
    src_id[p][v]  = next_id;
    src_seq[p][v] = 0;
    src_dx[p][v]  = dx;
    src_dy[p][v]  = dy;
    pk_len[next_id]  = len;
    pk_port[next_id] = op;
    pk_vc[next_id]   = ref_vc(op, p, v);
    pk_seen[next_id] = 0;
    next_id++;
    sent_pkts++;
    src_left[p][v]--;
  endtask

  // ------------------------------------------------------------ sources
  int stall_cycles = 0;
  bit sources_on = 1'b0;
  int rr_vc [P];

  always @(posedge clk) begin
    if (sources_on) begin
      for (int p = 0; p < P; p++) begin
        bit sent;
        sent = 1'b0;
        in_valid[p] <= 1'b0;
        for (int k = 0; k < V; k++) begin
          int v;
          v = (rr_vc[p] + k) % V;
          if (!sent && src_id[p][v] == 0 && src_left[p][v] > 0 && $urandom_range(0, 3) != 0)
            new_packet(p, v);
          if (!sent && src_id[p][v] != 0) begin
            if (in_ready[p][v]) begin
              int id, seq, len;
              id  = src_id[p][v];
              seq = src_seq[p][v];
              len = pk_len[id];
              in_valid[p]      <= 1'b1;
              in_vc[p]         <= VC_W'(v);
              in_flit[p].data  <= payload(id, seq, src_dx[p][v], src_dy[p][v]);
              in_flit[p].ftype <= (seq == 0) ? FLIT_HEAD : (seq == len - 1) ? FLIT_TAIL : FLIT_BODY;
              src_seq[p][v]    = seq + 1;
              if (seq + 1 == len) src_id[p][v] = 0;
              sent = 1'b1;
              rr_vc[p] = (v + 1) % V;
            end else begin
              stall_cycles++;
            end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ sinks
  int cur_id  [P][V];
  int cur_seq [P][V];
  bit congested = 1'b0;
  bit hold_e = 1'b0;               // directed test: east output never ready
  logic [P-1:0][V-1:0] ready_q;    // ready presented in the previous cycle
  int vc1_net = 0, vc0_net = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      // flits on the outputs now were granted against last cycle's ready
      for (int o = 0; o < P; o++) begin
        if (out_valid[o]) begin
          int v, id, seq;
          v   = int'(out_vc[o]);
          id  = int'(out_flit[o].data[31:16]);
          seq = int'(out_flit[o].data[15:8]);
          check(ready_q[o][v], $sformatf("flit on port %0d vc %0d without ready", o, v));
          if (id <= 0 || id >= MAXID) begin
            check(1'b0, $sformatf("bad packet id %0d", id));
          end else begin
            check(out_flit[o].data == payload(id, seq, out_flit[o].data[2:0], out_flit[o].data[5:3]),
                  "payload corrupted");
            if (is_head(out_flit[o].ftype)) begin
              check(cur_id[o][v] == 0, $sformatf("head of %0d interleaves packet %0d", id, cur_id[o][v]));
              check(seq == 0, "head with nonzero sequence");
              check(pk_port[id] == o, $sformatf("packet %0d left on port %0d, expected %0d", id, o, pk_port[id]));
              check(pk_vc[id] < 0 || pk_vc[id] == v,
                    $sformatf("packet %0d on vc %0d, expected %0d", id, v, pk_vc[id]));
              if (o != 4) begin
                if (v == 1) vc1_net++;
                else        vc0_net++;
              end
              cur_id[o][v]  = id;
              cur_seq[o][v] = 0;
            end else begin
              check(cur_id[o][v] == id, $sformatf("flit of %0d inside packet %0d", id, cur_id[o][v]));
              check(seq == cur_seq[o][v] + 1, $sformatf("packet %0d seq %0d after %0d", id, seq, cur_seq[o][v]));
              cur_seq[o][v] = seq;
            end
            check((seq == pk_len[id] - 1) == is_tail(out_flit[o].ftype), "tail flag wrong");
            if (is_tail(out_flit[o].ftype)) begin
              pk_seen[id]++;
              check(pk_seen[id] == 1, "packet delivered twice");
              done_pkts++;
              cur_id[o][v] = 0;
            end
          end
        end
      end
      if ($urandom_range(0, 199) == 0) congested = !congested;
      for (int o = 0; o < P; o++)
        for (int v = 0; v < V; v++)
          out_ready[o][v] <= (hold_e && o == 1) ? 1'b0 :
                             congested ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 9) < 8);
    end
    ready_q <= out_ready;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_route1 = 0, n_route2 = 0, n_alloc = 0, n_release = 0, n_multi = 0;
  logic [NUM_BLOCKS-1:0] banks_used = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      n_route1 += int'(dut.g_in[0].g_shared.u_in.ij_route1) + int'(dut.g_in[1].g_shared.u_in.ij_route1)
                + int'(dut.g_in[2].g_shared.u_in.ij_route1) + int'(dut.g_in[3].g_shared.u_in.ij_route1)
                + int'(dut.g_in[4].g_private.u_in.ij_route1);
      n_route2 += int'(dut.g_in[0].g_shared.u_in.sh_wr_en) + int'(dut.g_in[1].g_shared.u_in.sh_wr_en)
                + int'(dut.g_in[2].g_shared.u_in.sh_wr_en) + int'(dut.g_in[3].g_shared.u_in.sh_wr_en);
      n_alloc  += $countones(dut.blk_gnt);
      for (int l = 0; l < SHARED_LINKS; l++) n_release += $countones(dut.blk_release[l]);
      for (int l = 0; l < SHARED_LINKS; l++)
        if (dut.wr_en[l]) banks_used[dut.wr_bank[l]] = 1'b1;
      for (int v = 0; v < V; v++)
        if (dut.g_in[0].g_shared.u_in.nblk[v] > 1 || dut.g_in[1].g_shared.u_in.nblk[v] > 1 ||
            dut.g_in[2].g_shared.u_in.nblk[v] > 1 || dut.g_in[3].g_shared.u_in.nblk[v] > 1)
          n_multi++;
    end
  end

  // route taken by each flit judged at the west input (directed test)
  int ij_log [$];
  always @(negedge clk) begin
    if (rst_n && dut.g_in[3].g_shared.u_in.ir_valid)
      ij_log.push_back(dut.g_in[3].g_shared.u_in.ij_route2 ? 2 : 1);
  end

  // ------------------------------------------------------------ main
  initial begin
    int lat;
    in_valid  = '0;
    in_vc     = '0;
    in_flit   = '0;
    out_ready = '1;
    ready_q   = '1;
    for (int p = 0; p < P; p++) begin
      rr_vc[p] = 0;
      for (int v = 0; v < V; v++) begin
        src_id[p][v]   = 0;
        src_left[p][v] = NPKT;
        cur_id[p][v]   = 0;
        cur_seq[p][v]  = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // route-1 latency of an idle router: single-flit packet west -> east
    pk_len[MAXID-1] = 1; pk_port[MAXID-1] = 1; pk_vc[MAXID-1] = 0; pk_seen[MAXID-1] = 0;
    in_valid[3]      <= 1'b1;
    in_vc[3]         <= '0;
    in_flit[3].ftype <= FLIT_HEADTAIL;
    in_flit[3].data  <= payload(MAXID - 1, 0, 2, 2);
    @(posedge clk);
    in_valid[3] <= 1'b0;
    lat = 0;
    while (!out_valid[1] && lat < 20) begin
      @(posedge clk);
      lat++;
    end
    check(lat == 3, $sformatf("idle route-1 latency %0d cycles, expected 3", lat));
    repeat (3) @(posedge clk);

    // blocked head: a 6-flit packet west -> east while the east output is
    // never ready. The first two flits fill the private buffer (route 1),
    // the rest go through the shared memory (route 2).
    hold_e = 1'b1;
    congested = 1'b0;
    repeat (3) @(posedge clk);
    pk_len[MAXID-2] = 6; pk_port[MAXID-2] = 1; pk_vc[MAXID-2] = 0; pk_seen[MAXID-2] = 0;
    ij_log.delete();
    begin
      int i;
      bit ok;
      i = 0;
      while (i < 6) begin
        @(negedge clk);
        ok = in_ready[3][0];
        @(posedge clk);
        if (ok) begin
          in_valid[3]      <= 1'b1;
          in_vc[3]         <= '0;
          in_flit[3].ftype <= (i == 0) ? FLIT_HEAD : (i == 5) ? FLIT_TAIL : FLIT_BODY;
          in_flit[3].data  <= payload(MAXID - 2, i, 3, 2);
          i++;
        end else begin
          in_valid[3] <= 1'b0;
        end
      end
      @(posedge clk);
      in_valid[3] <= 1'b0;
    end
    repeat (10) @(posedge clk);
    check(ij_log.size() == 6, $sformatf("blocked packet: %0d flits judged", ij_log.size()));
    for (int i = 0; i < ij_log.size(); i++)
      check(ij_log[i] == ((i < 2) ? 1 : 2), $sformatf("blocked packet flit %0d took route %0d", i, ij_log[i]));
    check(pk_seen[MAXID-2] == 0, "blocked packet left while its output was not ready");
    hold_e = 1'b0;
    repeat (30) @(posedge clk);
    check(pk_seen[MAXID-2] == 1, "blocked packet not delivered after release");
    done_pkts = 0;

    sources_on = 1'b1;
    wait (done_pkts == P * V * NPKT);
    repeat (10) @(posedge clk);
    check(sent_pkts == P * V * NPKT, "not all packets sent");
    check(dut.u_blk.free_count == NUM_BLOCKS, "blocks not all returned at the end");
    $display("route1=%0d route2=%0d allocs=%0d releases=%0d multi-block=%0d stalls=%0d banks=%b vc0=%0d vc1=%0d",
             n_route1, n_route2, n_alloc, n_release, n_multi, stall_cycles, banks_used, vc0_net, vc1_net);
    check(n_route1 > 0, "route 1 never taken");
    check(n_route2 > 0, "route 2 never taken");
    check(n_alloc > 0, "no block allocated");
    check(n_release == n_alloc, "allocations and releases differ");
    check(&banks_used, "a bank was never written");
    check(n_multi > 0, "no channel ever held two blocks");
    check(stall_cycles > 0, "no back-pressure seen");
    check(vc0_net > 0 && vc1_net > 0, "dateline VCs not both used");
    $display("cycles=%0d packets=%0d", cycle, done_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d packets delivered", done_pkts, P * V * NPKT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
