// crossbar: the router's P x P switch with its output register (Switch
// Traversal, stage 3).
//
// Each output port takes the flit of the input port named by its select and
// registers it, together with the output VC, so the flit appears on the link
// in the cycle after switch allocation. An output with no grant drives
// valid = 0. The document calls for a crossbar switch between input buffers
// and output links; the output register is this design's pipeline choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  flit_t     [P-1:0]                in_flit,
  input  logic      [P-1:0]                out_grant,
  input  logic      [P-1:0][PORT_BITS-1:0] out_sel,
  input  logic      [P-1:0][VC_W-1:0]      out_vc_in,
  output logic      [P-1:0]                out_valid,
  output logic      [P-1:0][VC_W-1:0]      out_vc,
  output flit_t     [P-1:0]                out_flit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_vc    <= '0;
      out_flit  <= '0;
    end else begin
      for (int unsigned o = 0; o < P; o++) begin
        out_valid[o] <= out_grant[o];
        out_vc[o]    <= out_vc_in[o];
        out_flit[o]  <= in_flit[out_sel[o]];
      end
    end
  end
endmodule
