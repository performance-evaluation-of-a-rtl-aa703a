// jump1_node: the network part of one JUMP-1 cluster.
//
// Two router slices run in bit-sliced mode: each carries 18 bits of every
// 36-bit flit and, since the routing field is replicated in both halves of
// the header, both take the same decisions in the same cycles. Link 8 of the
// router pair is wired to the RDT Interface of the DSM management processor;
// links 0..7 (rank-0 and upper-rank torus) and link 9 (second management
// processor port) are brought out, as is the ack combining input of the
// crossbar. The MBP core side of the RDT Interface (receiver, sender, cache
// maintenance and interrupt) is brought out too, since the core itself is
// not part of this design. An rhbd_route instance turns one level of a
// directory bit-map into router output links for whoever builds headers.
//
// Ports: net_*[8] are the eight torus links (index = router link number),
// mbp1_* is router link 9, comb_* the crossbar's eleventh input; all are
// 36-bit valid/ready flit streams, one packet at a time.
module jump1_node
  import jump1_pkg::*;
#(
  parameter int NC_ENTRIES = 512,
  parameter int AM_ENTRIES = 512,
  parameter int AC_ENTRIES = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       my_cluster,
  // torus links 0..7
  input  logic              net_in_valid [8],
  input  logic [FLIT_W-1:0] net_in_flit  [8],
  output logic              net_in_ready [8],
  output logic              net_out_valid[8],
  output logic [FLIT_W-1:0] net_out_flit [8],
  input  logic              net_out_ready[8],
  // router link 9 (second management processor port)
  input  logic              mbp1_in_valid,
  input  logic [FLIT_W-1:0] mbp1_in_flit,
  output logic              mbp1_in_ready,
  output logic              mbp1_out_valid,
  output logic [FLIT_W-1:0] mbp1_out_flit,
  input  logic              mbp1_out_ready,
  // crossbar input of the ACK packet combining cache
  input  logic              comb_valid,
  input  logic [FLIT_W-1:0] comb_flit,
  output logic              comb_ready,
  // MBP core side of the RDT Interface
  output logic              rx_valid,
  output logic [FLIT_W-1:0] rx_flit,
  output logic              rx_last,
  input  logic              rx_ready,
  input  logic              tx_valid,
  input  logic [FLIT_W-1:0] tx_flit,
  input  logic              tx_last,
  output logic              tx_ready,
  input  logic              nc_we,
  input  logic [31:0]       nc_addr,
  input  logic              nc_cached,
  input  logic              am_we,
  input  logic [15:0]       am_src,
  input  logic [NPORTS-1:0] am_ports,
  input  logic [2:0]        am_rank,
  input  logic              ac_we,
  input  logic [2:0]        ac_rank,
  input  logic [15:0]       ac_key,
  input  logic [3:0]        ac_count,
  input  logic              ac_to_core,
  input  logic [NPORTS-1:0] ac_ports,
  input  logic [2:0]        ac_rank_up,
  output logic              irq_valid,
  output irq_e              irq_cause,
  output logic [15:0]       irq_key,
  // directory level to router links
  input  logic [7:0]        rhbd_level_map,
  input  logic              rhbd_relay,
  input  logic              rhbd_rank0,
  output logic [NPORTS-1:0] rhbd_ports
);
  // 36-bit view of the ten router links
  logic              l_in_valid [NPORTS];
  logic [FLIT_W-1:0] l_in_flit  [NPORTS];
  logic              l_in_ready [NPORTS];
  logic              l_out_valid[NPORTS];
  logic [FLIT_W-1:0] l_out_flit [NPORTS];
  logic              l_out_ready[NPORTS];

  // per-slice views
  logic               lo_in_ready [NPORTS], hi_in_ready [NPORTS];
  logic               lo_out_valid[NPORTS], hi_out_valid[NPORTS];
  logic [SLICE_W-1:0] lo_in_flit  [NPORTS], hi_in_flit  [NPORTS];
  logic [SLICE_W-1:0] lo_out_flit [NPORTS], hi_out_flit [NPORTS];
  logic               lo_comb_ready, hi_comb_ready;

  logic              ri_valid, ri_ready, ro_valid, ro_ready;
  logic [FLIT_W-1:0] ri_flit, ro_flit;

  always_comb begin
    for (int p = 0; p < 8; p++) begin
      l_in_valid[p]    = net_in_valid[p];
      l_in_flit[p]     = net_in_flit[p];
      net_in_ready[p]  = l_in_ready[p];
      net_out_valid[p] = l_out_valid[p];
      net_out_flit[p]  = l_out_flit[p];
      l_out_ready[p]   = net_out_ready[p];
    end
    // link 8: RDT Interface
    l_in_valid[P_MBP0]  = ro_valid;
    l_in_flit[P_MBP0]   = ro_flit;
    ro_ready            = l_in_ready[P_MBP0];
    ri_valid            = l_out_valid[P_MBP0];
    ri_flit             = l_out_flit[P_MBP0];
    l_out_ready[P_MBP0] = ri_ready;
    // link 9
    l_in_valid[P_MBP1]  = mbp1_in_valid;
    l_in_flit[P_MBP1]   = mbp1_in_flit;
    mbp1_in_ready       = l_in_ready[P_MBP1];
    mbp1_out_valid      = l_out_valid[P_MBP1];
    mbp1_out_flit       = l_out_flit[P_MBP1];
    l_out_ready[P_MBP1] = mbp1_out_ready;
  end

  // bit slicing
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      lo_in_flit[p]  = l_in_flit[p][SLICE_W-1:0];
      hi_in_flit[p]  = l_in_flit[p][FLIT_W-1:SLICE_W];
      l_in_ready[p]  = lo_in_ready[p] & hi_in_ready[p];
      l_out_valid[p] = lo_out_valid[p] & hi_out_valid[p];
      l_out_flit[p]  = {hi_out_flit[p], lo_out_flit[p]};
    end
    comb_ready = lo_comb_ready & hi_comb_ready;
  end

  rdt_router u_router_lo (
    .clk, .rst_n,
    .in_valid(l_in_valid), .in_flit(lo_in_flit), .in_ready(lo_in_ready),
    .out_valid(lo_out_valid), .out_flit(lo_out_flit), .out_ready(l_out_ready),
    .comb_valid, .comb_flit(comb_flit[SLICE_W-1:0]), .comb_ready(lo_comb_ready)
  );

  rdt_router u_router_hi (
    .clk, .rst_n,
    .in_valid(l_in_valid), .in_flit(hi_in_flit), .in_ready(hi_in_ready),
    .out_valid(hi_out_valid), .out_flit(hi_out_flit), .out_ready(l_out_ready),
    .comb_valid, .comb_flit(comb_flit[FLIT_W-1:SLICE_W]), .comb_ready(hi_comb_ready)
  );

  rdt_interface #(.NC_ENTRIES(NC_ENTRIES), .AM_ENTRIES(AM_ENTRIES),
                  .AC_ENTRIES(AC_ENTRIES)) u_rdt_if (
    .clk, .rst_n, .my_cluster,
    .rin_valid(ri_valid), .rin_flit(ri_flit), .rin_ready(ri_ready),
    .rout_valid(ro_valid), .rout_flit(ro_flit), .rout_ready(ro_ready),
    .rx_valid, .rx_flit, .rx_last, .rx_ready,
    .tx_valid, .tx_flit, .tx_last, .tx_ready,
    .nc_we, .nc_addr, .nc_cached, .am_we, .am_src, .am_ports, .am_rank,
    .ac_we, .ac_rank, .ac_key, .ac_count, .ac_to_core, .ac_ports, .ac_rank_up,
    .irq_valid, .irq_cause, .irq_key
  );

  rhbd_route u_rhbd (.level_map(rhbd_level_map), .relay(rhbd_relay), .rank0(rhbd_rank0),
                      .ports(rhbd_ports));

  // The two slices must stay in lock step (ready only matters with valid).
  for (genvar p = 0; p < NPORTS; p++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
        (!l_in_valid[p] || lo_in_ready[p] == hi_in_ready[p]) &&
        (lo_out_valid[p] == hi_out_valid[p]));
  end
endmodule
