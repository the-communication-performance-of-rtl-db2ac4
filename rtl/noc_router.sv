// noc_router: wormhole router whose four network input links share one
// multi-bank multi-port memory, block by block.
//
// Each input port has a two-flit private buffer per virtual channel. When a
// channel's private buffer is full, or the channel already has flits waiting in
// the shared memory, arriving flits are stored in the shared memory instead and
// move into the private buffer as it empties. The shared memory is B banks, one
// block each, placed between an input and an output crossbar; blocks are handed
// to virtual channels of the four network links on demand and returned when
// emptied, so one busy link can use most of the memory while idle links hold
// none. The local (PE) port has private buffers only.
//
// Pipeline, counted from the input register:
//   route 1: stage 1 RC + IJ (write private buffer), stage 2 VA/SA,
//            stage 3 ST (output register drives the link)
//   route 2: stage 1 RC + IJ + SiA, stage 2 SiT (write bank),
//            stage 3 SoA + SoT (bank -> private buffer, block release),
//            stage 4 VA/SA, stage 5 ST
// so a flit that goes through the shared memory spends two more cycles in the
// router than one that does not.
//
// Interface, per port p (0 = N, 1 = E, 2 = S, 3 = W, 4 = local PE):
//   in_valid/in_vc/in_flit    flit arriving from the neighbour (or PE)
//   in_ready[p][v]            this router can take a flit on VC v of port p
//                             granted now (it arrives one cycle later)
//   out_valid/out_vc/out_flit flit leaving towards the neighbour (or PE)
//   out_ready[p][v]           the neighbour's in_ready for that link
// cur_x/cur_y give the router's position. The sharing structure, the two
// routes, the stage names, 2 VCs, 8 blocks and 64 shared flits follow the
// document; the torus default, flow control and stage mapping are this
// design's choices (see the sub-modules).
module noc_router
  import noc_pkg::*;
#(
  parameter bit          TORUS  = 1'b1,
  parameter int unsigned K      = 4,
  parameter int unsigned B      = NUM_BLOCKS,
  parameter int unsigned F      = BLOCK_FLITS,
  parameter int unsigned PDEPTH = PRIV_DEPTH
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic      [COORD_W-1:0]                cur_x,
  input  logic      [COORD_W-1:0]                cur_y,
  input  logic      [NUM_PORTS-1:0]              in_valid,
  input  logic      [NUM_PORTS-1:0][VC_W-1:0]    in_vc,
  input  flit_t     [NUM_PORTS-1:0]              in_flit,
  output logic      [NUM_PORTS-1:0][NUM_VCS-1:0] in_ready,
  output logic      [NUM_PORTS-1:0]              out_valid,
  output logic      [NUM_PORTS-1:0][VC_W-1:0]    out_vc,
  output flit_t     [NUM_PORTS-1:0]              out_flit,
  input  logic      [NUM_PORTS-1:0][NUM_VCS-1:0] out_ready
);
  localparam int unsigned L  = SHARED_LINKS;
  localparam int unsigned BW = $clog2(B);
  localparam int unsigned FW = $clog2(F);

  // shared memory and block control
  logic      [L-1:0]         blk_req, blk_gnt;
  logic      [L-1:0][BW-1:0] blk_gnt_id;
  logic      [L-1:0][B-1:0]  blk_release;
  logic      [B-1:0]         free_map;
  logic      [$clog2(B+1)-1:0] free_count;
  logic      [L-1:0]         wr_en, rd_en;
  logic      [L-1:0][BW-1:0] wr_bank, rd_bank;
  logic      [L-1:0][FW-1:0] wr_addr, rd_addr;
  buf_flit_t [L-1:0]         wr_data, rd_data;

  block_allocator #(.L(L), .B(B)) u_blk (
    .clk          (clk),
    .rst_n        (rst_n),
    .req          (blk_req),
    .gnt          (blk_gnt),
    .gnt_id       (blk_gnt_id),
    .release_mask (blk_release),
    .free_map     (free_map),
    .free_count   (free_count)
  );

  mbmp_memory #(.L(L), .B(B), .F(F)) u_mem (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_en),
    .wr_bank (wr_bank),
    .wr_addr (wr_addr),
    .wr_data (wr_data),
    .rd_en   (rd_en),
    .rd_bank (rd_bank),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

  // input units
  logic      [NUM_PORTS-1:0][NUM_VCS-1:0] vc_valid, vc_pop;
  buf_flit_t [NUM_PORTS-1:0][NUM_VCS-1:0] vc_head;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    if (p < L) begin : g_shared
      input_unit #(
        .PORT_ID (PORT_BITS'(p)), .USE_SHARED (1'b1), .TORUS (TORUS), .K (K),
        .B (B), .F (F), .PDEPTH (PDEPTH)
      ) u_in (
        .clk         (clk),
        .rst_n       (rst_n),
        .cur_x       (cur_x),
        .cur_y       (cur_y),
        .in_valid    (in_valid[p]),
        .in_vc       (in_vc[p]),
        .in_flit     (in_flit[p]),
        .in_ready    (in_ready[p]),
        .blk_req     (blk_req[p]),
        .blk_gnt     (blk_gnt[p]),
        .blk_gnt_id  (blk_gnt_id[p]),
        .blk_release (blk_release[p]),
        .sh_wr_en    (wr_en[p]),
        .sh_wr_bank  (wr_bank[p]),
        .sh_wr_addr  (wr_addr[p]),
        .sh_wr_data  (wr_data[p]),
        .sh_rd_en    (rd_en[p]),
        .sh_rd_bank  (rd_bank[p]),
        .sh_rd_addr  (rd_addr[p]),
        .sh_rd_data  (rd_data[p]),
        .vc_valid    (vc_valid[p]),
        .vc_head     (vc_head[p]),
        .vc_pop      (vc_pop[p])
      );
    end else begin : g_private
      // the PE port: private buffers only, its shared-memory ports stay idle
      logic            nc_req, nc_wr_en, nc_rd_en;
      logic [B-1:0]    nc_release;
      logic [BW-1:0]   nc_wr_bank, nc_rd_bank;
      logic [FW-1:0]   nc_wr_addr, nc_rd_addr;
      buf_flit_t       nc_wr_data;
      input_unit #(
        .PORT_ID (PORT_BITS'(p)), .USE_SHARED (1'b0), .TORUS (TORUS), .K (K),
        .B (B), .F (F), .PDEPTH (PDEPTH)
      ) u_in (
        .clk         (clk),
        .rst_n       (rst_n),
        .cur_x       (cur_x),
        .cur_y       (cur_y),
        .in_valid    (in_valid[p]),
        .in_vc       (in_vc[p]),
        .in_flit     (in_flit[p]),
        .in_ready    (in_ready[p]),
        .blk_req     (nc_req),
        .blk_gnt     (1'b0),
        .blk_gnt_id  ('0),
        .blk_release (nc_release),
        .sh_wr_en    (nc_wr_en),
        .sh_wr_bank  (nc_wr_bank),
        .sh_wr_addr  (nc_wr_addr),
        .sh_wr_data  (nc_wr_data),
        .sh_rd_en    (nc_rd_en),
        .sh_rd_bank  (nc_rd_bank),
        .sh_rd_addr  (nc_rd_addr),
        .sh_rd_data  ('0),
        .vc_valid    (vc_valid[p]),
        .vc_head     (vc_head[p]),
        .vc_pop      (vc_pop[p])
      );
    end
  end

  // VA / SA
  logic [NUM_PORTS-1:0]                in_grant, out_grant;
  logic [NUM_PORTS-1:0][VC_W-1:0]      in_vc_sel, alloc_vc;
  logic [NUM_PORTS-1:0][PORT_BITS-1:0] out_sel;

  vc_sw_allocator #(.P(NUM_PORTS), .V(NUM_VCS)) u_alloc (
    .clk       (clk),
    .rst_n     (rst_n),
    .vc_valid  (vc_valid),
    .vc_head   (vc_head),
    .out_ready (out_ready),
    .vc_pop    (vc_pop),
    .in_grant  (in_grant),
    .in_vc_sel (in_vc_sel),
    .out_grant (out_grant),
    .out_sel   (out_sel),
    .out_vc    (alloc_vc)
  );

  // the winning VC of each input port feeds the crossbar
  flit_t [NUM_PORTS-1:0] xb_in;
  always_comb begin
    for (int unsigned p = 0; p < NUM_PORTS; p++) xb_in[p] = vc_head[p][in_vc_sel[p]].flit;
  end

  // ST
  crossbar #(.P(NUM_PORTS)) u_xbar (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_flit   (xb_in),
    .out_grant (out_grant),
    .out_sel   (out_sel),
    .out_vc_in (alloc_vc),
    .out_valid (out_valid),
    .out_vc    (out_vc),
    .out_flit  (out_flit)
  );
endmodule
