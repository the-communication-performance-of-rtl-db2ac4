// vc_sw_allocator: virtual-channel and switch allocation of the router.
//
// This is stage 2 of both routes (VA and SA in the document's terms). Every
// virtual channel whose private buffer is not empty may bid for its output
// port. A body or tail flit bids with the output VC its packet already holds,
// and only when the next router is ready on that VC. A head flit bids when one
// of the output VCs its route allows is free and ready; it takes the lowest
// such VC. Allocation is separable and single-cycle: a round-robin arbiter
// per input port picks one bidding VC, then a round-robin arbiter per output
// port picks one input port. The winner pops its private buffer; a winning
// head acquires its output VC and a winning tail frees it.
//
// Outputs are combinational: in_vc_sel / in_grant tell each input port which
// VC won, and out_grant / out_sel / out_vc tell the crossbar which input port
// feeds each output port and on which VC the flit leaves. The document names
// VA and SA and places them in one pipeline step; the separable round-robin
// scheme and the lowest-free-VC rule are this design's choice.
module vc_sw_allocator
  import noc_pkg::*;
#(
  parameter int unsigned P = NUM_PORTS,
  parameter int unsigned V = NUM_VCS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic      [P-1:0][V-1:0]       vc_valid,
  input  buf_flit_t [P-1:0][V-1:0]       vc_head,
  input  logic      [P-1:0][V-1:0]       out_ready,   // next router ready, per output port and VC
  output logic      [P-1:0][V-1:0]       vc_pop,
  output logic      [P-1:0]              in_grant,
  output logic      [P-1:0][VC_W-1:0]    in_vc_sel,
  output logic      [P-1:0]              out_grant,
  output logic      [P-1:0][PORT_BITS-1:0] out_sel,
  output logic      [P-1:0][VC_W-1:0]    out_vc
);
  // registered allocation state
  logic [P-1:0][V-1:0]                ovc_busy;   // output VC held by a packet
  logic [P-1:0][V-1:0]                has_ovc;    // input VC holds an output VC
  logic [P-1:0][V-1:0][VC_W-1:0]      ovc_q;      // which output VC it holds
  logic [P-1:0][V-1:0][PORT_BITS-1:0] oport_q;    // and on which output port

  // per input VC bid
  logic [P-1:0][V-1:0]                bid;
  logic [P-1:0][V-1:0]                bid_head;
  logic [P-1:0][V-1:0][PORT_BITS-1:0] bid_port;
  logic [P-1:0][V-1:0][VC_W-1:0]      bid_vc;

  always_comb begin
    for (int unsigned p = 0; p < P; p++) begin
      for (int unsigned v = 0; v < V; v++) begin
        logic [V-1:0] free_ok;
        logic [PORT_BITS-1:0] o;
        bid[p][v]      = 1'b0;
        bid_head[p][v] = 1'b0;
        bid_vc[p][v]   = ovc_q[p][v];
        o              = has_ovc[p][v] ? oport_q[p][v] : vc_head[p][v].out_port;
        bid_port[p][v] = o;
        free_ok        = '0;
        if (vc_valid[p][v] && int'(o) < int'(P)) begin
          if (has_ovc[p][v]) begin
            bid[p][v] = out_ready[o][ovc_q[p][v]];
          end else if (is_head(vc_head[p][v].flit.ftype)) begin
            free_ok = vc_head[p][v].vc_mask & ~ovc_busy[o] & out_ready[o];
            bid_head[p][v] = 1'b1;
            bid[p][v]      = |free_ok;
            for (int w = int'(V) - 1; w >= 0; w--)
              if (free_ok[w]) bid_vc[p][v] = VC_W'(w);
          end
        end
      end
    end
  end

  // input stage: one VC per input port
  logic [P-1:0][V-1:0] in_gnt_vec;
  logic [P-1:0]        in_any;
  logic [P-1:0][P-1:0] out_req;       // [output][input]
  logic [P-1:0][P-1:0] out_gnt_vec;   // [output][input]
  logic [P-1:0]        out_any;
  logic [P-1:0]        in_won;        // input port won its output

  for (genvar p = 0; p < P; p++) begin : g_in_arb
    rr_arbiter #(.N(V)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (bid[p]),
      .advance (in_won[p]),
      .grant   (in_gnt_vec[p]),
      .any     (in_any[p])
    );
  end

  always_comb begin
    out_req   = '0;
    in_vc_sel = '0;
    for (int unsigned p = 0; p < P; p++) begin
      for (int unsigned v = 0; v < V; v++) begin
        if (in_gnt_vec[p][v]) begin
          in_vc_sel[p] = VC_W'(v);
          out_req[bid_port[p][v]][p] = 1'b1;
        end
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_out_arb
    rr_arbiter #(.N(P)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (out_req[o]),
      .advance (1'b1),
      .grant   (out_gnt_vec[o]),
      .any     (out_any[o])
    );
  end

  always_comb begin
    in_won    = '0;
    out_sel   = '0;
    out_vc    = '0;
    out_grant = out_any;
    for (int unsigned o = 0; o < P; o++) begin
      for (int unsigned p = 0; p < P; p++) begin
        if (out_gnt_vec[o][p]) begin
          in_won[p]  = 1'b1;
          out_sel[o] = PORT_BITS'(p);
          out_vc[o]  = bid_vc[p][in_vc_sel[p]];
        end
      end
    end
    in_grant = in_won;
    for (int unsigned p = 0; p < P; p++)
      for (int unsigned v = 0; v < V; v++)
        vc_pop[p][v] = in_won[p] && in_gnt_vec[p][v];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovc_busy <= '0;
      has_ovc  <= '0;
      ovc_q    <= '0;
      oport_q  <= '0;
    end else begin
      for (int unsigned p = 0; p < P; p++) begin
        for (int unsigned v = 0; v < V; v++) begin
          if (vc_pop[p][v]) begin
            logic [PORT_BITS-1:0] o;
            logic [VC_W-1:0]      ov;
            o  = bid_port[p][v];
            ov = bid_vc[p][v];
            if (bid_head[p][v]) begin
              ovc_busy[o][ov] <= 1'b1;
              has_ovc[p][v]   <= 1'b1;
              ovc_q[p][v]     <= ov;
              oport_q[p][v]   <= o;
            end
            if (is_tail(vc_head[p][v].flit.ftype)) begin
              ovc_busy[o][ov] <= 1'b0;
              has_ovc[p][v]   <= 1'b0;
            end
          end
        end
      end
    end
  end

  // one flit per output and per input in a cycle
  for (genvar o = 0; o < P; o++) begin : g_chk
    a_onehot_out: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_gnt_vec[o]));
  end
endmodule
