// tb_crossbar: random selects and grants; the registered outputs must equal
// the selected input flit and the given VC one cycle later.
module tb_crossbar;
  import noc_pkg::*;

  localparam int P = NUM_PORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t [P-1:0]                in_flit, out_flit;
  logic  [P-1:0]                out_grant, out_valid;
  logic  [P-1:0][PORT_BITS-1:0] out_sel;
  logic  [P-1:0][VC_W-1:0]      out_vc_in, out_vc;

  crossbar dut (.clk, .rst_n, .in_flit, .out_grant, .out_sel, .out_vc_in, .out_valid, .out_vc, .out_flit);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    flit_t [P-1:0] exp_f;
    logic [P-1:0] exp_v;
    logic [P-1:0][VC_W-1:0] exp_vc;
    in_flit = '0; out_grant = '0; out_sel = '0; out_vc_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        in_flit[p]   = flit_t'({$urandom, $urandom, $urandom});
        out_grant[p] = $urandom_range(0, 3) != 0;
        out_sel[p]   = PORT_BITS'($urandom_range(0, P - 1));
        out_vc_in[p] = VC_W'($urandom_range(0, NUM_VCS - 1));
        exp_v[p]     = out_grant[p];
        exp_vc[p]    = out_vc_in[p];
      end
      for (int p = 0; p < P; p++) exp_f[p] = in_flit[out_sel[p]];
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        check(out_valid[p] == exp_v[p], "valid");
        if (exp_v[p]) begin
          check(out_flit[p] == exp_f[p], $sformatf("flit at output %0d", p));
          check(out_vc[p] == exp_vc[p], "vc");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
