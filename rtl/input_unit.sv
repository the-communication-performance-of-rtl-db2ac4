// input_unit: one input port of the link-sharing router.
//
// A flit arriving on the link is latched into the input register and, in the
// next cycle (stage 1), two things happen side by side: route computation for
// a head flit, and In-Judge (IJ), which decides where the flit goes.
//   route 1: input port -> private buffer -> switch            (3 stages)
//   route 2: input port -> shared memory -> private buffer -> switch (5 stages)
// A flit takes route 1 when its virtual channel has nothing waiting in the
// shared memory and its private buffer is not full; otherwise it takes route 2,
// so the flits of a channel never overtake each other. On route 2 the write
// address is chosen in stage 1 (Switch-i Allocation: the bank is the block the
// channel is filling), the flit crosses the input crossbar and is stored in
// stage 2 (Switch-i Traversal), and a later cycle picks one channel whose
// private buffer has room, reads its oldest flit and writes it into the
// private buffer through the output crossbar (Switch-o Allocation and
// Traversal, with the block release done in the same cycle).
//
// "VC block info": each channel keeps the ordered list of blocks it owns
// (a small FIFO of block numbers), a write pointer into the newest block and a
// read pointer into the oldest. A block is returned when all its flits have
// been read, or when the channel is idle and has emptied its only block. A new
// block is requested while a packet is in progress on the channel and the
// space left would not cover the flits in flight.
//
// Flow control to the upstream router is a per-channel ready that depends only
// on this unit's registered state and on the flit now on the link: it is high
// when the space the channel can still use exceeds the flits already on their
// way (the one on the link and the one in the input register), so a flit
// granted upstream in this cycle always finds room two cycles later. This
// flow-control scheme, the request and release rules and the mapping of the
// five route-2 steps onto three cycles are this design's choices; the document
// gives the two routes, the IJ decision, the stage names and the by-block
// sharing. The local port (USE_SHARED = 0) has private buffers only.
module input_unit
  import noc_pkg::*;
#(
  parameter logic [PORT_BITS-1:0] PORT_ID    = PORT_NORTH,
  parameter bit                USE_SHARED = 1'b1,
  parameter bit                TORUS      = 1'b1,
  parameter int unsigned       K          = 4,
  parameter int unsigned       B          = NUM_BLOCKS,
  parameter int unsigned       F          = BLOCK_FLITS,
  parameter int unsigned       PDEPTH     = PRIV_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [COORD_W-1:0]        cur_x,
  input  logic [COORD_W-1:0]        cur_y,
  // link from the upstream router
  input  logic                      in_valid,
  input  logic [VC_W-1:0]           in_vc,
  input  flit_t                     in_flit,
  output logic [NUM_VCS-1:0]        in_ready,
  // block allocator
  output logic                      blk_req,
  input  logic                      blk_gnt,
  input  logic [$clog2(B)-1:0]      blk_gnt_id,
  output logic [B-1:0]              blk_release,
  // shared memory, write side
  output logic                      sh_wr_en,
  output logic [$clog2(B)-1:0]      sh_wr_bank,
  output logic [$clog2(F)-1:0]      sh_wr_addr,
  output buf_flit_t                 sh_wr_data,
  // shared memory, read side
  output logic                      sh_rd_en,
  output logic [$clog2(B)-1:0]      sh_rd_bank,
  output logic [$clog2(F)-1:0]      sh_rd_addr,
  input  buf_flit_t                 sh_rd_data,
  // to the allocators: head of each private buffer
  output logic      [NUM_VCS-1:0]   vc_valid,
  output buf_flit_t [NUM_VCS-1:0]   vc_head,
  input  logic      [NUM_VCS-1:0]   vc_pop
);
  localparam int unsigned BW  = $clog2(B);
  localparam int unsigned FW  = $clog2(F);
  localparam int unsigned PW  = $clog2(F + 1);     // pointer that can hold F
  localparam int unsigned NW  = $clog2(B + 1);     // blocks held by a channel
  localparam int unsigned SW  = $clog2(B * F + 1); // flits held in shared memory
  localparam int unsigned CW  = $clog2(PDEPTH + 1);

  // ---------------------------------------------------------------- stage 0
  logic            ir_valid;
  logic [VC_W-1:0] ir_vc;
  flit_t           ir_flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_valid <= 1'b0;
      ir_vc    <= '0;
      ir_flit  <= '0;
    end else begin
      ir_valid <= in_valid;
      ir_vc    <= in_vc;
      ir_flit  <= in_flit;
    end
  end

  // ------------------------------------------------------- per-channel state
  logic [NUM_VCS-1:0]          pkt_active;                 // head seen, tail not yet
  logic [NUM_VCS-1:0][SW-1:0]  pending;                    // decided route 2, not yet drained
  logic [NUM_VCS-1:0][SW-1:0]  stored;                     // written to a bank, not yet drained
  logic [NUM_VCS-1:0][NW-1:0]  nblk;                       // blocks owned
  logic [NUM_VCS-1:0][PW-1:0]  wptr;                       // write pointer in newest block
  logic [NUM_VCS-1:0][FW-1:0]  rptr;                       // read pointer in oldest block
  logic [BW-1:0]               blist [NUM_VCS][B];         // owned blocks, oldest first
  logic [NUM_VCS-1:0][BW-1:0]  bhead;                      // index of the oldest in blist

  // private buffers
  logic      [NUM_VCS-1:0]         pb_push, pb_empty, pb_full;
  buf_flit_t [NUM_VCS-1:0]         pb_din;
  logic      [NUM_VCS-1:0][CW-1:0] pb_count;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_pb
    private_buffer #(.DEPTH(PDEPTH)) u_pb (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (pb_push[v]),
      .din   (pb_din[v]),
      .pop   (vc_pop[v]),
      .dout  (vc_head[v]),
      .empty (pb_empty[v]),
      .full  (pb_full[v]),
      .count (pb_count[v])
    );
    assign vc_valid[v] = !pb_empty[v];
  end

  function automatic logic [BW-1:0] tail_block(int unsigned v);
    return blist[v][(int'(bhead[v]) + int'(nblk[v]) - 1) % B];
  endfunction

  // ------------------------------------------------- stage 1: RC and IJ/SiA
  buf_flit_t          s1_entry;
  logic [PORT_BITS-1:0]  rc_port;
  logic [NUM_VCS-1:0] rc_mask;

  route_compute #(.TORUS(TORUS), .K(K)) u_rc (
    .cur_x    (cur_x),
    .cur_y    (cur_y),
    .dst_x    (ir_flit.data[COORD_W-1:0]),
    .dst_y    (ir_flit.data[2*COORD_W-1:COORD_W]),
    .in_port  (PORT_ID),
    .in_vc    (ir_vc),
    .out_port (rc_port),
    .vc_mask  (rc_mask)
  );

  logic ij_route1, ij_route2;   // IJ decision for the flit in the input register

  always_comb begin
    s1_entry.flit     = ir_flit;
    s1_entry.out_port = rc_port;
    s1_entry.vc_mask  = rc_mask;
    ij_route1 = ir_valid && (pending[ir_vc] == '0) && !pb_full[ir_vc];
    ij_route2 = ir_valid && !ij_route1;
  end

  // stage 2 register (SiT)
  logic            sit_valid;
  logic [VC_W-1:0] sit_vc;
  logic [BW-1:0]   sit_bank;
  logic [FW-1:0]   sit_addr;
  buf_flit_t       sit_data;

  assign sh_wr_en   = sit_valid;
  assign sh_wr_bank = sit_bank;
  assign sh_wr_addr = sit_addr;
  assign sh_wr_data = sit_data;

  // ------------------------------------------- drain: SoA/SoT and release
  logic [NUM_VCS-1:0] drain_req, drain_gnt;
  logic               drain_any;
  logic [VC_W-1:0]    drain_vc;

  always_comb begin
    for (int unsigned v = 0; v < NUM_VCS; v++)
      drain_req[v] = USE_SHARED && (stored[v] != '0) && !pb_full[v];
  end

  rr_arbiter #(.N(NUM_VCS)) u_drain_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (drain_req),
    .advance (1'b1),
    .grant   (drain_gnt),
    .any     (drain_any)
  );

  always_comb begin
    drain_vc = '0;
    for (int unsigned v = 0; v < NUM_VCS; v++) if (drain_gnt[v]) drain_vc = VC_W'(v);
  end

  assign sh_rd_en   = drain_any;
  assign sh_rd_bank = blist[drain_vc][bhead[drain_vc]];
  assign sh_rd_addr = rptr[drain_vc];

  // private buffer write: route 1 from stage 1, or route 2 from the drain;
  // the two never meet on one channel (route 1 needs pending == 0)
  always_comb begin
    for (int unsigned v = 0; v < NUM_VCS; v++) begin
      pb_push[v] = 1'b0;
      pb_din[v]  = s1_entry;
      if (ij_route1 && ir_vc == VC_W'(v)) begin
        pb_push[v] = 1'b1;
      end else if (drain_gnt[v]) begin
        pb_push[v] = 1'b1;
        pb_din[v]  = sh_rd_data;
      end
    end
  end

  // ----------------------------------------------- space, ready and blocks
  logic [NUM_VCS-1:0][1:0]    inflight;
  logic [NUM_VCS-1:0][SW+1:0] space;
  logic [NUM_VCS-1:0]         rel_idle;   // return the only block of an idle channel
  logic [NUM_VCS-1:0]         drain_rel;  // the drain read the last flit of a block
  logic [NUM_VCS-1:0]         need_blk;
  logic [VC_W-1:0]            req_vc;

  always_comb begin
    need_blk = '0;
    req_vc   = '0;
    blk_req  = 1'b0;
    for (int unsigned v = 0; v < NUM_VCS; v++) begin
      inflight[v] = 2'((ir_valid && ir_vc == VC_W'(v)) ? 1 : 0)
                  + 2'((in_valid && in_vc == VC_W'(v)) ? 1 : 0);
      rel_idle[v] = USE_SHARED && (nblk[v] == NW'(1)) && (pending[v] == '0) && (inflight[v] == '0)
                  && ((wptr[v] != '0) || !pkt_active[v]);
      drain_rel[v] = drain_gnt[v] && (int'(rptr[v]) == F - 1);
      space[v] = '0;
      if (pending[v] == '0) space[v] = (SW+2)'(PDEPTH) - (SW+2)'(pb_count[v]);
      if (nblk[v] != '0 && !rel_idle[v]) space[v] += (SW+2)'(F) - (SW+2)'(wptr[v]);
      in_ready[v] = (space[v] > (SW+2)'(inflight[v]));
      need_blk[v] = USE_SHARED && pkt_active[v] && (int'(nblk[v]) < int'(B))
                  && ((nblk[v] == '0) || (int'(wptr[v]) == F))
                  && (space[v] <= (SW+2)'(inflight[v]) + 1);
    end
    for (int v = int'(NUM_VCS) - 1; v >= 0; v--) begin
      if (need_blk[v]) begin
        blk_req = 1'b1;
        req_vc  = VC_W'(v);
      end
    end
  end

  always_comb begin
    blk_release = '0;
    for (int unsigned v = 0; v < NUM_VCS; v++) begin
      if (drain_rel[v] || rel_idle[v]) blk_release[blist[v][bhead[v]]] = 1'b1;
    end
  end

  // ----------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_active <= '0;
      pending    <= '0;
      stored     <= '0;
      nblk       <= '0;
      wptr       <= '0;
      rptr       <= '0;
      bhead      <= '0;
      sit_valid  <= 1'b0;
      sit_vc     <= '0;
      sit_bank   <= '0;
      sit_addr   <= '0;
      sit_data   <= '0;
    end else begin
      // packets in progress, seen at the link
      if (in_valid) begin
        if (is_tail(in_flit.ftype))      pkt_active[in_vc] <= 1'b0;
        else if (is_head(in_flit.ftype)) pkt_active[in_vc] <= 1'b1;
      end

      // stage 2 register
      sit_valid <= USE_SHARED && ij_route2;
      sit_vc    <= ir_vc;
      sit_bank  <= tail_block(int'(ir_vc));
      sit_addr  <= FW'(wptr[ir_vc]);
      sit_data  <= s1_entry;

      for (int unsigned v = 0; v < NUM_VCS; v++) begin
        logic push_blk, pop_blk, s1w, s2w;
        s1w      = USE_SHARED && ij_route2 && ir_vc == VC_W'(v);
        s2w      = sit_valid && sit_vc == VC_W'(v);
        push_blk = blk_gnt && req_vc == VC_W'(v);
        pop_blk  = drain_rel[v] || rel_idle[v];

        pending[v] <= pending[v] + SW'(s1w) - SW'(drain_gnt[v]);
        stored[v]  <= stored[v]  + SW'(s2w) - SW'(drain_gnt[v]);

        // write pointer of the newest block
        if (push_blk)                 wptr[v] <= '0;
        else if (pop_blk && nblk[v] == NW'(1)) wptr[v] <= '0;
        else if (s1w)                 wptr[v] <= wptr[v] + 1'b1;

        // read pointer of the oldest block
        if (pop_blk)            rptr[v] <= '0;
        else if (drain_gnt[v])  rptr[v] <= rptr[v] + 1'b1;

        // block list
        if (pop_blk)  bhead[v] <= (int'(bhead[v]) == B - 1) ? '0 : bhead[v] + 1'b1;
        nblk[v] <= nblk[v] + NW'(push_blk) - NW'(pop_blk);
      end
    end
  end

  // block numbers need no reset: an entry is read only after it was written
  always_ff @(posedge clk) begin
    if (blk_gnt) blist[req_vc][(int'(bhead[req_vc]) + int'(nblk[req_vc])) % B] <= blk_gnt_id;
  end

  // route 2 needs room in the newest block; the upstream must respect ready
  a_room_in_block: assert property (@(posedge clk) disable iff (!rst_n)
    (USE_SHARED && ij_route2) |-> (nblk[ir_vc] != '0 && int'(wptr[ir_vc]) < F));
  a_no_shared_local: assert property (@(posedge clk) disable iff (!rst_n)
    (!USE_SHARED && ir_valid) |-> ij_route1);
endmodule
