// net_harness: a K x K mesh or torus of link-sharing routers with one
// traffic-generating PE model per router, used by the network workload test.
//
// Each PE makes packets of PKT_LEN flits to uniformly random other nodes,
// one new packet with probability 1/GAP per cycle, NPKT in all, and injects
// them through the local port obeying the router's ready. Its sink accepts
// every flit. The harness checks that every packet reaches the node it was
// addressed to, whole, in order and once; it reports the mean packet latency
// (creation to tail delivery) and how often flits went through the shared
// memory. Routers on mesh edges see their outward links as never ready,
// which dimension-order routing never needs.
module net_harness
  import noc_pkg::*;
#(
  parameter bit          TORUS   = 1'b1,
  parameter int unsigned K       = 4,
  parameter int unsigned B       = NUM_BLOCKS,
  parameter int unsigned F       = BLOCK_FLITS,
  parameter int unsigned PKT_LEN = 16,
  parameter int unsigned NPKT    = 10,      // packets per PE
  parameter int unsigned GAP     = 40       // mean cycles between packet creations
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output bit   done,
  output int   checks,
  output int   failures,
  output int   route2_flits,
  output int   route1_flits,
  output int   delivered,
  output int   lat_sum
);
  localparam int N = K * K;
  localparam int P = NUM_PORTS;
  localparam int V = NUM_VCS;

  logic  [P-1:0]           in_valid  [N];
  logic  [P-1:0][VC_W-1:0] in_vc     [N];
  flit_t [P-1:0]           in_flit   [N];
  logic  [P-1:0][V-1:0]    in_ready  [N];
  logic  [P-1:0]           out_valid [N];
  logic  [P-1:0][VC_W-1:0] out_vc    [N];
  flit_t [P-1:0]           out_flit  [N];
  logic  [P-1:0][V-1:0]    out_ready [N];

  // PE side of every router
  logic            pe_valid [N];
  logic [VC_W-1:0] pe_vc    [N];
  flit_t           pe_flit  [N];

  function automatic int nid(int x, int y);
    return ((y + K) % K) * K + ((x + K) % K);
  endfunction

  for (genvar x = 0; x < K; x++) begin : g_x
    for (genvar y = 0; y < K; y++) begin : g_y
      localparam int ME = y * K + x;
      // neighbour ids; -1 off a mesh edge
      localparam int NB_N = (y == K - 1) ? (TORUS ? x : -1) : (y + 1) * K + x;
      localparam int NB_S = (y == 0)     ? (TORUS ? (K - 1) * K + x : -1) : (y - 1) * K + x;
      localparam int NB_E = (x == K - 1) ? (TORUS ? y * K : -1) : y * K + x + 1;
      localparam int NB_W = (x == 0)     ? (TORUS ? y * K + K - 1 : -1) : y * K + x - 1;

      noc_router #(.TORUS(TORUS), .K(K), .B(B), .F(F)) u_r (
        .clk       (clk),
        .rst_n     (rst_n),
        .cur_x     (COORD_W'(x)),
        .cur_y     (COORD_W'(y)),
        .in_valid  (in_valid[ME]),
        .in_vc     (in_vc[ME]),
        .in_flit   (in_flit[ME]),
        .in_ready  (in_ready[ME]),
        .out_valid (out_valid[ME]),
        .out_vc    (out_vc[ME]),
        .out_flit  (out_flit[ME]),
        .out_ready (out_ready[ME])
      );

      // links: my input N comes from the north neighbour's output S, etc.
      always_comb begin
        in_valid[ME] = '0;
        in_vc[ME]    = '0;
        in_flit[ME]  = '0;
        out_ready[ME] = '0;
        if (NB_N >= 0) begin
          in_valid[ME][0] = out_valid[NB_N][2]; in_vc[ME][0] = out_vc[NB_N][2]; in_flit[ME][0] = out_flit[NB_N][2];
          out_ready[ME][0] = in_ready[NB_N][2];
        end
        if (NB_E >= 0) begin
          in_valid[ME][1] = out_valid[NB_E][3]; in_vc[ME][1] = out_vc[NB_E][3]; in_flit[ME][1] = out_flit[NB_E][3];
          out_ready[ME][1] = in_ready[NB_E][3];
        end
        if (NB_S >= 0) begin
          in_valid[ME][2] = out_valid[NB_S][0]; in_vc[ME][2] = out_vc[NB_S][0]; in_flit[ME][2] = out_flit[NB_S][0];
          out_ready[ME][2] = in_ready[NB_S][0];
        end
        if (NB_W >= 0) begin
          in_valid[ME][3] = out_valid[NB_W][1]; in_vc[ME][3] = out_vc[NB_W][1]; in_flit[ME][3] = out_flit[NB_W][1];
          out_ready[ME][3] = in_ready[NB_W][1];
        end
        in_valid[ME][4] = pe_valid[ME];
        in_vc[ME][4]    = pe_vc[ME];
        in_flit[ME][4]  = pe_flit[ME];
        out_ready[ME][4] = '1;
      end

      // shared-memory use in this router
      always @(posedge clk) begin
        if (rst_n) begin
          route2_flits += int'(u_r.wr_en[0]) + int'(u_r.wr_en[1]) + int'(u_r.wr_en[2]) + int'(u_r.wr_en[3]);
          route1_flits += int'(u_r.g_in[0].g_shared.u_in.ij_route1) + int'(u_r.g_in[1].g_shared.u_in.ij_route1)
                        + int'(u_r.g_in[2].g_shared.u_in.ij_route1) + int'(u_r.g_in[3].g_shared.u_in.ij_route1);
        end
      end
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL net(torus=%0d,K=%0d,len=%0d) @%0t: %s", TORUS, K, PKT_LEN, $time, what);
    end
  endtask

  // ------------------------------------------------------------- PE models
  localparam int MAXP = N * NPKT + 1;
  int pk_dst   [MAXP];
  int pk_birth [MAXP];
  int pk_seen  [MAXP];

  int q_id  [N][$];          // packets waiting at each PE
  int made  [N];
  int cur   [N];             // packet being injected, 0 if none
  int seqn  [N];
  int vcsel [N];
  int next_id = 1;
  int cyc = 0;

  // receive state per node and VC
  int rx_id  [N][V];
  int rx_seq [N][V];

  function automatic logic [FLIT_W-1:0] payload(int id, int seq, int dst);
    logic [FLIT_W-1:0] d;
    d        = '0;
    d[2:0]   = 3'(dst % K);
    d[5:3]   = 3'(dst / K);
    d[15:8]  = 8'(seq);
    d[31:16] = 16'(id);
    d[63:32] = 32'(id * 2654435761 + seq);
    return d;
  endfunction

  initial begin
    checks = 0; failures = 0; route2_flits = 0; route1_flits = 0; delivered = 0; lat_sum = 0; done = 0;
    for (int n = 0; n < N; n++) begin
      pe_valid[n] = 1'b0; pe_vc[n] = '0; pe_flit[n] = '0;
      made[n] = 0; cur[n] = 0; seqn[n] = 0; vcsel[n] = 0;
      for (int v = 0; v < V; v++) begin rx_id[n][v] = 0; rx_seq[n][v] = 0; end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && start) begin
      for (int n = 0; n < N; n++) begin
        // create
        if (made[n] < int'(NPKT) && $urandom_range(0, GAP - 1) == 0) begin
          int d;
          do d = $urandom_range(0, N - 1); while (d == n);
          pk_dst[next_id]   = d;
          pk_birth[next_id] = cyc;
          pk_seen[next_id]  = 0;
          q_id[n].push_back(next_id);
          next_id++;
          made[n]++;
        end
        // inject, one flit per cycle when the router is ready on the chosen VC
        pe_valid[n] <= 1'b0;
        if (cur[n] == 0 && q_id[n].size() > 0) begin
          cur[n]   = q_id[n].pop_front();
          seqn[n]  = 0;
          vcsel[n] = (vcsel[n] + 1) % V;
        end
        if (cur[n] != 0 && in_ready[n][4][vcsel[n]]) begin
          pe_valid[n]      <= 1'b1;
          pe_vc[n]         <= VC_W'(vcsel[n]);
          pe_flit[n].data  <= payload(cur[n], seqn[n], pk_dst[cur[n]]);
          pe_flit[n].ftype <= (PKT_LEN == 1) ? FLIT_HEADTAIL : (seqn[n] == 0) ? FLIT_HEAD :
                              (seqn[n] == int'(PKT_LEN) - 1) ? FLIT_TAIL : FLIT_BODY;
          seqn[n]++;
          if (seqn[n] == int'(PKT_LEN)) cur[n] = 0;
        end
      end
      // deliver
      for (int n = 0; n < N; n++) begin
        if (out_valid[n][4]) begin
          int v, id, seq;
          flit_t f;
          f   = out_flit[n][4];
          v   = int'(out_vc[n][4]);
          id  = int'(f.data[31:16]);
          seq = int'(f.data[15:8]);
          if (id <= 0 || id >= next_id) begin
            check(1'b0, "unknown packet");
          end else begin
            check(pk_dst[id] == n, $sformatf("packet %0d for node %0d delivered at %0d", id, pk_dst[id], n));
            check(f.data == payload(id, seq, pk_dst[id]), "payload");
            if (is_head(f.ftype)) begin
              check(rx_id[n][v] == 0 && seq == 0, "head inside another packet");
              rx_id[n][v] = id; rx_seq[n][v] = 0;
            end else begin
              check(rx_id[n][v] == id && seq == rx_seq[n][v] + 1, "flit order");
              rx_seq[n][v] = seq;
            end
            if (is_tail(f.ftype)) begin
              check(seq == int'(PKT_LEN) - 1, "packet length");
              pk_seen[id]++;
              check(pk_seen[id] == 1, "packet delivered twice");
              rx_id[n][v] = 0;
              delivered++;
              lat_sum += cyc - pk_birth[id];
            end
          end
        end
      end
      if (delivered == N * int'(NPKT)) done <= 1'b1;
    end
  end
endmodule
