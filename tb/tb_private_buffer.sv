// tb_private_buffer: random push/pop against a queue model.
//
// Checks the head flit, the empty/full flags and the count every cycle for
// a two-flit buffer (the default) over 4000 random cycles, including
// simultaneous push and pop when full.
module tb_private_buffer;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      push, pop, empty, full;
  buf_flit_t din, dout;
  logic [1:0] count;

  private_buffer dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  int checks = 0, failures = 0;
  buf_flit_t q[$];
  int n_full = 0, n_both = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == PRIV_DEPTH), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head flit");
      pop  = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push = ((q.size() < PRIV_DEPTH) || pop) && ($urandom_range(0, 2) != 0);
      din  = buf_flit_t'({$urandom, $urandom, $urandom});
      if (full) n_full++;
      if (full && push && pop) n_both++;
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(n_full > 0 && n_both > 0, "full buffer never exercised");
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
