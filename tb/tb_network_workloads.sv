// tb_network_workloads: uniform random traffic on networks of link-sharing
// routers, in the configurations the design is meant for: 4x4 and 8x8, torus
// and mesh, 16-, 32- and 64-flit packets, 32- and 64-flit shared memories and
// 4 or 8 blocks. Every PE sends packets to random other PEs; three 4x4
// networks run side by side (the 8x8 networks and the 2-block memory are in
// tb_network_8x8).
//
// Each network checks delivery (right node, whole, in order, once); this
// bench adds that every network finished, that shared memory was used in
// each (route 2) alongside route 1, and prints mean latency and accepted
// throughput. The runs are far shorter than a performance study: they show
// that the configurations work, not how fast they are.
module tb_network_workloads;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 3;
  bit done [NW];
  int chk [NW], fail [NW], r2 [NW], r1 [NW], dlv [NW], lat [NW];

  // name: topology K, packet length, blocks x flits per block
  net_harness #(.TORUS(1'b1), .K(4), .B(8), .F(8),  .PKT_LEN(16), .NPKT(12), .GAP(30)) n0 (
    .clk, .rst_n, .start, .done(done[0]), .checks(chk[0]), .failures(fail[0]),
    .route2_flits(r2[0]), .route1_flits(r1[0]), .delivered(dlv[0]), .lat_sum(lat[0]));
  net_harness #(.TORUS(1'b1), .K(4), .B(4), .F(16), .PKT_LEN(64), .NPKT(4),  .GAP(100)) n1 (
    .clk, .rst_n, .start, .done(done[1]), .checks(chk[1]), .failures(fail[1]),
    .route2_flits(r2[1]), .route1_flits(r1[1]), .delivered(dlv[1]), .lat_sum(lat[1]));
  net_harness #(.TORUS(1'b0), .K(4), .B(8), .F(4),  .PKT_LEN(32), .NPKT(8),  .GAP(50)) n2 (
    .clk, .rst_n, .start, .done(done[2]), .checks(chk[2]), .failures(fail[2]),
    .route2_flits(r2[2]), .route1_flits(r1[2]), .delivered(dlv[2]), .lat_sum(lat[2]));

  int checks = 0, failures = 0, cycles = 0;
  string names [NW] = '{"4x4 torus, 16-flit packets, B8 x 8",
                        "4x4 torus, 64-flit packets, B4 x 16",
                        "4x4 mesh, 32-flit packets, B8 x 4 (32-flit memory)"};
  int nodes [NW] = '{16, 16, 16};
  int lens  [NW] = '{16, 64, 32};

  task automatic report();
    for (int i = 0; i < NW; i++) begin
      checks   += chk[i];
      failures += fail[i];
      $display("%-52s delivered=%0d mean latency=%0d route1=%0d route2=%0d throughput=%0.3f flits/PE/cycle",
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
