// block_allocator: the by-block control of the shared memory.
//
// The shared memory is managed in whole blocks, and each block is tied to one
// bank, so a block owned by one link is the only user of its bank. This module
// keeps the free-block bitmap. Each of the L sharing links may ask for one new
// block per cycle; free blocks are handed out lowest index first, with the link
// served first rotating every cycle so no link is starved. A link returns the
// blocks it has emptied through its release mask (any number per cycle).
//
// Timing: grants are combinational from the registered free bitmap; the bitmap
// updates at the clock edge. A block released in a cycle can be granted from
// the next cycle. The document gives the block/bank association and that
// blocks are allocated and released; the first-free policy and rotating link
// priority are this design's choice.
module block_allocator
  import noc_pkg::*;
#(
  parameter int unsigned L = SHARED_LINKS,
  parameter int unsigned B = NUM_BLOCKS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [L-1:0]         req,
  output logic [L-1:0]         gnt,
  output logic [L-1:0][$clog2(B)-1:0] gnt_id,
  input  logic [L-1:0][B-1:0]  release_mask,
  output logic [B-1:0]         free_map,
  output logic [$clog2(B+1)-1:0] free_count
);
  localparam int unsigned BW = $clog2(B);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;

  logic [B-1:0]  free_q;
  logic [LW-1:0] first_q;
  logic [B-1:0]  taken;
  logic [B-1:0]  released;

  assign free_map = free_q;

  always_comb begin
    free_count = '0;
    for (int unsigned b = 0; b < B; b++) free_count += $bits(free_count)'(free_q[b]);
  end

  always_comb begin
    logic [B-1:0] avail;
    avail  = free_q;
    taken  = '0;
    gnt    = '0;
    gnt_id = '0;
    for (int unsigned k = 0; k < L; k++) begin
      int unsigned l;
      l = (int'(first_q) + k) % L;
      if (req[l]) begin
        for (int unsigned b = 0; b < B; b++) begin
          if (!gnt[l] && avail[b]) begin
            gnt[l]    = 1'b1;
            gnt_id[l] = BW'(b);
            avail[b]  = 1'b0;
            taken[b]  = 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    released = '0;
    for (int unsigned l = 0; l < L; l++) released |= release_mask[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_q  <= '1;
      first_q <= '0;
    end else begin
      free_q  <= (free_q & ~taken) | released;
      first_q <= (int'(first_q) == L - 1) ? '0 : first_q + 1'b1;
    end
  end

  // a block may only be returned while it is allocated
  a_release_owned: assert property (@(posedge clk) disable iff (!rst_n) (released & free_q) == '0);
endmodule
