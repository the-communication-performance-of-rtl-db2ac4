// tb_input_unit: one sharing input port with its own block allocator and
// multi-bank memory (one link), fed by an upstream model that obeys the
// per-VC ready, and drained by a downstream model that pops the private
// buffers at random, with long stalls.
//
// Checks: the flits of each VC come out of the private buffer in the order
// they were sent with their payload intact; each head carries the X-then-Y
// mesh route; every block is returned at the end. Timing: a flit that takes
// route 1 is written into the private buffer at the second clock edge after
// it was put on the link (input register, then buffer); the fastest route-2
// flit takes exactly two edges more (stored in a bank, then moved to the
// private buffer). Mechanisms counted:
// route 1, route 2, a channel holding several blocks, back-pressure.
module tb_input_unit;
  import noc_pkg::*;

  localparam int V = NUM_VCS;
  localparam int B = NUM_BLOCKS;
  localparam int F = BLOCK_FLITS;
  localparam int NPKT = 60;
  localparam logic [COORD_W-1:0] MY_X = 3'd1, MY_Y = 3'd1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    in_valid;
  logic [VC_W-1:0]         in_vc;
  flit_t                   in_flit;
  logic [V-1:0]            in_ready;
  logic                    blk_req, blk_gnt;
  logic [$clog2(B)-1:0]    blk_gnt_id;
  logic [B-1:0]            blk_release;
  logic                    sh_wr_en, sh_rd_en;
  logic [$clog2(B)-1:0]    sh_wr_bank, sh_rd_bank;
  logic [$clog2(F)-1:0]    sh_wr_addr, sh_rd_addr;
  buf_flit_t               sh_wr_data, sh_rd_data;
  logic      [V-1:0]       vc_valid, vc_pop;
  buf_flit_t [V-1:0]       vc_head;
  logic [B-1:0]            free_map;
  logic [$clog2(B+1)-1:0]  free_count;

  input_unit #(.PORT_ID(PORT_WEST), .USE_SHARED(1'b1), .TORUS(1'b0)) dut (
    .clk, .rst_n, .cur_x(MY_X), .cur_y(MY_Y),
    .in_valid, .in_vc, .in_flit, .in_ready,
    .blk_req, .blk_gnt, .blk_gnt_id, .blk_release,
    .sh_wr_en, .sh_wr_bank, .sh_wr_addr, .sh_wr_data,
    .sh_rd_en, .sh_rd_bank, .sh_rd_addr, .sh_rd_data,
    .vc_valid, .vc_head, .vc_pop);

  block_allocator #(.L(1)) u_alloc (
    .clk, .rst_n, .req(blk_req), .gnt(blk_gnt), .gnt_id(blk_gnt_id),
    .release_mask(blk_release), .free_map, .free_count);

  mbmp_memory #(.L(1)) u_mem (
    .clk, .rst_n, .wr_en(sh_wr_en), .wr_bank(sh_wr_bank), .wr_addr(sh_wr_addr), .wr_data(sh_wr_data),
    .rd_en(sh_rd_en), .rd_bank(sh_rd_bank), .rd_addr(sh_rd_addr), .rd_data(sh_rd_data));

  int checks = 0, failures = 0, cycle = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic int ref_port(int dx, int dy);
    if (dx > MY_X) return 1;
    if (dx < MY_X) return 3;
    if (dy > MY_Y) return 0;
    if (dy < MY_Y) return 2;
    return 4;
  endfunction

  // ---------------------------------------------------------- upstream
  flit_t sent_q [V][$];      // flits sent, for the output check
  int    sent_cyc [V][$];    // cycle each was on the link
  int    left [V], seq [V], len [V], pid [V];
  int    next_id = 1, stalls = 0, done_flits = 0, total_flits = 0;
  bit    src_on = 0;

  always @(posedge clk) begin
    cycle++;
    if (src_on) begin
      bit sent;
      sent = 0;
      in_valid <= 1'b0;
      for (int k = 0; k < V; k++) begin
        int v;
        v = (cycle + k) % V;
        if (!sent && len[v] == 0 && left[v] > 0) begin
          len[v] = $urandom_range(2, 40);
          seq[v] = 0;
          pid[v] = next_id++;
          left[v]--;
          total_flits += len[v];
        end
        if (!sent && len[v] != 0) begin
          if (in_ready[v] && $urandom_range(0, 5) != 0) begin
            flit_t f;
            f.data = {16'(pid[v]), 8'(seq[v]), 34'($urandom), 3'($urandom_range(0, 3)), 3'($urandom_range(0, 3))};
            f.ftype = (seq[v] == 0) ? FLIT_HEAD : (seq[v] == len[v] - 1) ? FLIT_TAIL : FLIT_BODY;
            in_valid <= 1'b1;
            in_vc    <= VC_W'(v);
            in_flit  <= f;
            sent_q[v].push_back(f);
            sent_cyc[v].push_back(int'($time));   // driven onto the link at this edge
            seq[v]++;
            if (seq[v] == len[v]) len[v] = 0;
            sent = 1;
          end else if (!in_ready[v]) begin
            stalls++;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------- downstream
  bit stall_phase = 0;
  always @(posedge clk) begin
    if ($urandom_range(0, 99) == 0) stall_phase = !stall_phase;
    for (int v = 0; v < V; v++)
      vc_pop[v] <= 1'b0;
    #1;
    for (int v = 0; v < V; v++)
      vc_pop[v] <= vc_valid[v] && (stall_phase ? ($urandom_range(0, 19) == 0) : ($urandom_range(0, 3) != 0));
  end

  // order and payload at the private buffer output
  always @(posedge clk) begin
    for (int v = 0; v < V; v++) begin
      if (vc_pop[v]) begin
        if (sent_q[v].size() == 0) begin
          check(1'b0, "pop of a flit never sent");
        end else begin
          flit_t e;
          e = sent_q[v].pop_front();
          check(vc_head[v].flit == e, $sformatf("vc %0d flit order or payload", v));
          if (is_head(e.ftype))
            check(int'(vc_head[v].out_port) == ref_port(int'(e.data[2:0]), int'(e.data[5:3])), "head route");
          done_flits++;
        end
      end
    end
  end

  // latency from the link into the private buffer, by route
  int lat_q [V][$];
  int min1 = 1000, min2 = 1000, n1 = 0, n2 = 0, nmulti = 0;
  always @(negedge clk) begin
    for (int v = 0; v < V; v++) begin
      if (rst_n && dut.pb_push[v]) begin
        int c, lat;
        c = sent_cyc[v][lat_q[v].size()];
        lat = (int'($time) + 5 - c) / 10;   // clock edges from link to private buffer
        lat_q[v].push_back(lat);
        if (dut.drain_gnt[v]) begin n2++; if (lat < min2) min2 = lat; end
        else                  begin n1++; if (lat < min1) min1 = lat; end
      end
      if (dut.nblk[v] > 1) nmulti++;
    end
  end

  initial begin
    in_valid = 0; in_vc = '0; in_flit = '0; vc_pop = '0;
    for (int v = 0; v < V; v++) begin left[v] = NPKT; len[v] = 0; seq[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    src_on = 1;
    wait (next_id > 2 * NPKT && len[0] == 0 && len[1] == 0);
    src_on = 0;
    @(posedge clk);
    in_valid <= 1'b0;
    wait (done_flits == total_flits);
    repeat (5) @(posedge clk);
    check(free_count == B, "blocks not returned");
    $display("route1=%0d (min %0d) route2=%0d (min %0d) multi=%0d stalls=%0d flits=%0d",
             n1, min1, n2, min2, nmulti, stalls, done_flits);
    check(n1 > 0 && n2 > 0, "both routes used");
    check(min1 == 2, "route-1 latency");
    check(min2 == min1 + 2, "route-2 latency is route 1 plus two");
    check(nmulti > 0, "no channel held two blocks");
    check(stalls > 0, "no back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d flits", done_flits, total_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
