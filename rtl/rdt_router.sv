// rdt_router: one RDT router chip, an 18-bit slice of a network node.
//
// Ten links (four for the rank-0 torus, four for the node's upper-rank torus
// and two towards the DSM management processors) each enter a packet
// manager; an eleventh crossbar input is reserved for the ACK packet
// combining cache, whose behaviour the source does not describe, so it is
// brought out as an injection port (comb_*). The arbiter hands free
// crossbar outputs to waiting packets; the crossbar copies a multicast packet
// to every output it won, and the per-link output buffers drive the links.
// A multicast packet therefore leaves in pieces: each time some of its
// destination buffers are empty, a copy goes to those and their bits in the
// packet's bit-map are cleared.
//
// Timing: a header taken from a link at clock edge t is granted in the
// following cycle, crosses the crossbar into the output buffer at edge t+2
// and is driven on the output link from edge t+3, so the next node can take
// it at edge t+4 at the earliest; one flit per cycle follows. Links are valid/ready. The routing field in every header
// names this router's output links directly; computing it from the
// hierarchical bit-map directory for the next hop is outside this block.
// Two instances fed with the two halves of a 36-bit flit form one node.
module rdt_router
  import jump1_pkg::*;
#(
  parameter int W    = SLICE_W,
  parameter int MAXF = MAX_FLITS,
  parameter int NP   = NPORTS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid [NP],
  input  logic [W-1:0] in_flit  [NP],
  output logic         in_ready [NP],
  output logic         out_valid[NP],
  output logic [W-1:0] out_flit [NP],
  input  logic         out_ready[NP],
  // eleventh crossbar input (ACK packet combining cache)
  input  logic         comb_valid,
  input  logic [W-1:0] comb_flit,
  output logic         comb_ready
);
  localparam int NI = NP + 1;

  logic         pm_valid [NI];
  logic [W-1:0] pm_flit  [NI];
  logic         pm_ready [NI];
  logic [NP-1:0] req_map [NI];
  logic         req_vc   [NI];
  logic [NP-1:0] grant   [NI];
  logic         x_valid  [NI];
  logic [W-1:0] x_flit   [NI];
  logic         x_last   [NI];
  logic         x_vc     [NI];
  logic         done     [NI];

  logic [$clog2(NI)-1:0] owner [NP];
  logic [NP-1:0]         locked;
  logic [NUM_VC-1:0]     out_free [NP];
  logic         xo_valid [NP];
  logic [W-1:0] xo_flit  [NP];
  logic         xo_last  [NP];
  logic         xo_vc    [NP];

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      pm_valid[p] = in_valid[p];
      pm_flit[p]  = in_flit[p];
      in_ready[p] = pm_ready[p];
    end
    pm_valid[NP] = comb_valid;
    pm_flit[NP]  = comb_flit;
    comb_ready   = pm_ready[NP];
  end

  for (genvar i = 0; i < NI; i++) begin : g_in
    packet_manager #(.W(W), .MAXF(MAXF), .NVC(NUM_VC), .NOUT(NP)) u_pm (
      .clk, .rst_n,
      .in_valid(pm_valid[i]), .in_flit(pm_flit[i]), .in_ready(pm_ready[i]),
      .req_map(req_map[i]), .req_vc(req_vc[i]), .grant(grant[i]),
      .x_valid(x_valid[i]), .x_flit(x_flit[i]), .x_last(x_last[i]), .x_vc(x_vc[i])
    );
    assign done[i] = x_valid[i] && x_last[i];
  end

  rdt_arbiter #(.NIN(NI), .NOUT(NP), .NVC(NUM_VC)) u_arb (
    .clk, .rst_n, .req_map, .req_vc, .out_free, .done, .grant, .owner, .locked
  );

  rdt_crossbar #(.NIN(NI), .NOUT(NP), .W(W)) u_xbar (
    .in_valid(x_valid), .in_flit(x_flit), .in_last(x_last), .in_vc(x_vc),
    .owner, .locked,
    .out_valid(xo_valid), .out_flit(xo_flit), .out_last(xo_last), .out_vc(xo_vc)
  );

  for (genvar p = 0; p < NP; p++) begin : g_out
    output_buffer #(.W(W), .MAXF(MAXF), .NVC(NUM_VC)) u_ob (
      .clk, .rst_n,
      .w_valid(xo_valid[p]), .w_flit(xo_flit[p]), .w_last(xo_last[p]), .w_vc(xo_vc[p]),
      .out_free(out_free[p]),
      .out_valid(out_valid[p]), .out_flit(out_flit[p]), .out_ready(out_ready[p])
    );
  end
endmodule
