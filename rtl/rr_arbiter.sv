// rr_arbiter: round-robin arbiter over N requesters.
//
// The grant is combinational: the first requester at or after the position
// following the last winner wins. The pointer moves only when `advance` is
// high, so a caller can keep priority unchanged when the grant is not used.
// Used by the switch and virtual-channel allocation, which the document
// describes as arbitration without naming a policy; round robin is this
// design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         any
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q;   // highest priority position
  logic [IW-1:0] win;

  always_comb begin
    grant = '0;
    win   = '0;
    any   = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr_q) + k) % N;
      if (!any && req[idx]) begin
        any        = 1'b1;
        win        = IW'(idx);
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr_q <= '0;
    else if (advance && any)
      ptr_q <= (int'(win) == N - 1) ? '0 : win + 1'b1;
  end
endmodule
