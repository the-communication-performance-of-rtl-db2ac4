// mbmp_memory: the multi-bank multi-port shared memory of the router.
//
// B single-write single-read banks sit between two crossbar switches. The
// input crossbar connects each of the L sharing links to the bank its write
// request names (Switch-i Traversal); the output crossbar connects each link's
// read request to the bank it names (Switch-o Traversal) and returns the flit.
// Under by-block control a bank is written and read only by the link that owns
// its block, so no two links ever name the same bank in one cycle; this is
// asserted rather than arbitrated. If it were violated, the lowest-numbered
// link would win.
//
// Timing: a write is stored at the clock edge; a read returns data in the same
// cycle (combinational through the output crossbar). Each link has one write
// and one read port per cycle. The structure (banks between two crossbars)
// follows the document; port widths and the combinational read are this
// design's choices.
module mbmp_memory
  import noc_pkg::*;
#(
  parameter int unsigned L = SHARED_LINKS,
  parameter int unsigned B = NUM_BLOCKS,
  parameter int unsigned F = BLOCK_FLITS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // write side (input crossbar)
  input  logic      [L-1:0]             wr_en,
  input  logic      [L-1:0][$clog2(B)-1:0] wr_bank,
  input  logic      [L-1:0][$clog2(F)-1:0] wr_addr,
  input  buf_flit_t [L-1:0]             wr_data,
  // read side (output crossbar)
  input  logic      [L-1:0]             rd_en,
  input  logic      [L-1:0][$clog2(B)-1:0] rd_bank,
  input  logic      [L-1:0][$clog2(F)-1:0] rd_addr,
  output buf_flit_t [L-1:0]             rd_data
);
  localparam int unsigned BW = $clog2(B);
  localparam int unsigned FW = $clog2(F);

  logic      [B-1:0]         bank_we;
  logic      [B-1:0][FW-1:0] bank_waddr, bank_raddr;
  buf_flit_t [B-1:0]         bank_wdata, bank_rdata;

  // input crossbar: one cross point per (bank, link)
  always_comb begin
    bank_we    = '0;
    bank_waddr = '0;
    bank_wdata = '0;
    bank_raddr = '0;
    for (int unsigned b = 0; b < B; b++) begin
      for (int l = int'(L) - 1; l >= 0; l--) begin
        if (wr_en[l] && wr_bank[l] == BW'(b)) begin
          bank_we[b]    = 1'b1;
          bank_waddr[b] = wr_addr[l];
          bank_wdata[b] = wr_data[l];
        end
        if (rd_en[l] && rd_bank[l] == BW'(b))
          bank_raddr[b] = rd_addr[l];
      end
    end
  end

  for (genvar b = 0; b < B; b++) begin : g_bank
    mem_bank #(.DEPTH(F)) u_bank (
      .clk   (clk),
      .we    (bank_we[b]),
      .waddr (bank_waddr[b]),
      .wdata (bank_wdata[b]),
      .raddr (bank_raddr[b]),
      .rdata (bank_rdata[b])
    );
  end

  // output crossbar
  always_comb begin
    for (int unsigned l = 0; l < L; l++) rd_data[l] = bank_rdata[rd_bank[l]];
  end

  // by-block control guarantees one writer and one reader per bank
  for (genvar l = 0; l < L; l++) begin : g_chk
    for (genvar m = l + 1; m < L; m++) begin : g_pair
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
        !(wr_en[l] && wr_en[m] && wr_bank[l] == wr_bank[m]));
      a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
        !(rd_en[l] && rd_en[m] && rd_bank[l] == rd_bank[m]));
    end
  end
endmodule
