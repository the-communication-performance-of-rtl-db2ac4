// tb_block_allocator: random block requests and releases against a model of
// the free-block set.
//
// Every grant must name a block the model holds as free, no block may go to
// two links in one cycle, a link may only release blocks it owns, every
// request must be granted while enough blocks are free, grants take the
// lowest free blocks, and the free count must track the model.
module tb_block_allocator;
  import noc_pkg::*;

  localparam int L = SHARED_LINKS;
  localparam int B = NUM_BLOCKS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [L-1:0]                 req, gnt;
  logic [L-1:0][$clog2(B)-1:0]  gnt_id;
  logic [L-1:0][B-1:0]          release_mask;
  logic [B-1:0]                 free_map;
  logic [$clog2(B+1)-1:0]       free_count;

  block_allocator dut (.clk, .rst_n, .req, .gnt, .gnt_id, .release_mask, .free_map, .free_count);

  int checks = 0, failures = 0;
  int owner [B];      // -1 when free
  int n_exhaust = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int b = 0; b < B; b++) owner[b] = -1;
    req = '0; release_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int nfree, nreq, ngnt;
      logic [B-1:0] taken, lowest;
      @(negedge clk);
      release_mask = '0;
      for (int b = 0; b < B; b++)
        if (owner[b] >= 0 && $urandom_range(0, 3) == 0) release_mask[owner[b]][b] = 1'b1;
      for (int l = 0; l < L; l++) req[l] = $urandom_range(0, 2) == 0;
      #1;
      nfree = 0; nreq = 0; ngnt = 0; taken = '0;
      for (int b = 0; b < B; b++) if (owner[b] < 0) nfree++;
      check(int'(free_count) == nfree, "free count");
      lowest = '0;
      for (int b = 0, k = 0; b < B; b++) if (owner[b] < 0 && k < $countones(req)) begin lowest[b] = 1'b1; k++; end
      for (int l = 0; l < L; l++) begin
        if (req[l]) nreq++;
        check(!gnt[l] || req[l], "grant without request");
        if (gnt[l]) begin
          ngnt++;
          check(owner[gnt_id[l]] < 0, $sformatf("block %0d granted while owned", gnt_id[l]));
          check(!taken[gnt_id[l]], "block granted twice in a cycle");
          check(lowest[gnt_id[l]], "grant is not among the lowest free blocks");
          taken[gnt_id[l]] = 1'b1;
        end
      end
      check(ngnt == ((nreq < nfree) ? nreq : nfree), "number of grants");
      if (nreq > nfree) n_exhaust++;
      @(posedge clk);
      for (int b = 0; b < B; b++)
        for (int l = 0; l < L; l++) if (release_mask[l][b]) owner[b] = -1;
      for (int l = 0; l < L; l++) if (gnt[l]) owner[gnt_id[l]] = l;
    end
    check(n_exhaust > 0, "pool never ran out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
