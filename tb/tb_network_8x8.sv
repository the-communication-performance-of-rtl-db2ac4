// tb_network_8x8: uniform random traffic on the 64-PE networks, an 8x8
// torus with 64-flit packets and an 8x8 mesh with 32-flit packets, both with
// the default shared memory of 8 blocks of 8 flits, and, beside them, a 4x4
// torus whose 64-flit shared memory is cut into only 2 blocks.
//
// Each network checks delivery (right node, whole, in order, once); this
// bench adds that both finished and that both routes were used in each, and
// prints mean latency and accepted throughput. The runs are short: they show
// that the configurations work, not how fast they are.
module tb_network_8x8;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 3;
  bit done [NW];
  int chk [NW], fail [NW], r2 [NW], r1 [NW], dlv [NW], lat [NW];

  net_harness #(.TORUS(1'b1), .K(8), .PKT_LEN(64), .NPKT(3), .GAP(150)) n0 (
    .clk, .rst_n, .start, .done(done[0]), .checks(chk[0]), .failures(fail[0]),
    .route2_flits(r2[0]), .route1_flits(r1[0]), .delivered(dlv[0]), .lat_sum(lat[0]));
  net_harness #(.TORUS(1'b0), .K(8), .PKT_LEN(32), .NPKT(4), .GAP(80)) n1 (
    .clk, .rst_n, .start, .done(done[1]), .checks(chk[1]), .failures(fail[1]),
    .route2_flits(r2[1]), .route1_flits(r1[1]), .delivered(dlv[1]), .lat_sum(lat[1]));
  net_harness #(.TORUS(1'b1), .K(4), .B(2), .F(32), .PKT_LEN(32), .NPKT(8), .GAP(50)) n2 (
    .clk, .rst_n, .start, .done(done[2]), .checks(chk[2]), .failures(fail[2]),
    .route2_flits(r2[2]), .route1_flits(r1[2]), .delivered(dlv[2]), .lat_sum(lat[2]));

  int checks = 0, failures = 0, cycles = 0;
  string names [NW] = '{"8x8 torus, 64-flit packets", "8x8 mesh, 32-flit packets",
                        "4x4 torus, 32-flit packets, B2 x 32"};
  int lens [NW] = '{64, 32, 32};
  int nodes [NW] = '{64, 64, 16};

  task automatic report();
    for (int i = 0; i < NW; i++) begin
      checks   += chk[i];
      failures += fail[i];
      $display("%-30s delivered=%0d mean latency=%0d route1=%0d route2=%0d throughput=%0.3f flits/PE/cycle",
               names[i], dlv[i], (dlv[i] > 0) ? lat[i] / dlv[i] : 0, r1[i], r2[i],
               real'(dlv[i] * lens[i]) / real'(nodes[i] * cycles));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start = 1'b1;
    while (!(done[0] && done[1] && done[2])) begin
      @(posedge clk);
      cycles++;
    end
    repeat (5) @(posedge clk);
    report();
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (r2[i] == 0 || r1[i] == 0) begin
        failures++;
        $display("FAIL: %s did not use both routes", names[i]);
      end
    end
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired (deadlock or too slow)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
