// tb_mbmp_memory: the multi-bank multi-port memory against an array model.
//
// Each cycle every link may write one flit and read one flit, each to a bank
// no other link names that cycle (the by-block rule). Reads return data in
// the same cycle; the model is a plain B x F array. Also checks that all four
// links can write and read in the same cycle.
module tb_mbmp_memory;
  import noc_pkg::*;

  localparam int L = SHARED_LINKS;
  localparam int B = NUM_BLOCKS;
  localparam int F = BLOCK_FLITS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      [L-1:0]                 wr_en, rd_en;
  logic      [L-1:0][$clog2(B)-1:0]  wr_bank, rd_bank;
  logic      [L-1:0][$clog2(F)-1:0]  wr_addr, rd_addr;
  buf_flit_t [L-1:0]                 wr_data, rd_data;

  mbmp_memory dut (.clk, .rst_n, .wr_en, .wr_bank, .wr_addr, .wr_data, .rd_en, .rd_bank, .rd_addr, .rd_data);

  int checks = 0, failures = 0;
  buf_flit_t model [B][F];
  logic      valid [B][F];
  int n_full_par = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // a random permutation of banks gives distinct banks to the links
  function automatic void perm(output int pb[B]);
    for (int b = 0; b < B; b++) pb[b] = b;
    for (int b = B - 1; b > 0; b--) begin
      int j, t;
      j = $urandom_range(0, b);
      t = pb[b]; pb[b] = pb[j]; pb[j] = t;
    end
  endfunction

  initial begin
    int pw[B], pr[B];
    for (int b = 0; b < B; b++) for (int a = 0; a < F; a++) valid[b][a] = 1'b0;
    wr_en = '0; rd_en = '0; wr_bank = '0; rd_bank = '0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      perm(pw);
      perm(pr);
      for (int l = 0; l < L; l++) begin
        wr_en[l]   = $urandom_range(0, 1);
        wr_bank[l] = 3'(pw[l]);
        wr_addr[l] = 3'($urandom_range(0, F - 1));
        wr_data[l] = buf_flit_t'({$urandom, $urandom, $urandom});
        rd_en[l]   = $urandom_range(0, 1);
        rd_bank[l] = 3'(pr[l]);
        rd_addr[l] = 3'($urandom_range(0, F - 1));
      end
      if (wr_en == '1 && rd_en == '1) n_full_par++;
      #1;
      for (int l = 0; l < L; l++)
        if (rd_en[l] && valid[rd_bank[l]][rd_addr[l]])
          check(rd_data[l] == model[rd_bank[l]][rd_addr[l]],
                $sformatf("link %0d read bank %0d addr %0d", l, rd_bank[l], rd_addr[l]));
      @(posedge clk);
      for (int l = 0; l < L; l++)
        if (wr_en[l]) begin
          model[wr_bank[l]][wr_addr[l]] = wr_data[l];
          valid[wr_bank[l]][wr_addr[l]] = 1'b1;
        end
    end
    check(n_full_par > 0, "never all ports at once");
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
