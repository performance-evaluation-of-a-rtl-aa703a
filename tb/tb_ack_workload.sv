// tb_ack_workload: the multicast / acknowledgement round trip between
// clusters, for 1 to 7 receivers.
//
// Node 0 is the sender; nodes 1..7 are receivers, each joined to one torus
// link of the sender (sender link k <-> receiver k+1 link 0). The wires
// between nodes stand in for the network: at every packet boundary they
// rewrite the routing field of the header for the next router (towards its
// management processor, link 8), the per-hop step that these nodes do not
// compute themselves.
//
// For n receivers the sender's core registers one Ack Cache entry (count n,
// interrupt when done) and writes ONE coherent request with a bit-map of n
// links. Each receiver answers it in hardware, the sender collects the n
// answers in hardware and the core sees one completion interrupt. Checked:
// one interrupt with the right key, one request arriving at every receiver,
// no packet reaching any core, and a round trip that does not shrink as n
// grows. The same is then done with one unicast request per receiver, the
// way software without multicast would send it; it must not be faster, and
// it keeps the core's sender busy at least n times as long. The cycle counts
// of both are printed.
module tb_ack_workload;
  import jump1_pkg::*;
  localparam int NN = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // per-node signals
  logic              ni_valid [NN][8];
  logic [FLIT_W-1:0] ni_flit  [NN][8];
  logic              ni_ready [NN][8];
  logic              no_valid [NN][8];
  logic [FLIT_W-1:0] no_flit  [NN][8];
  logic              no_ready [NN][8];
  logic              m1o_valid [NN];
  logic [FLIT_W-1:0] m1o_flit  [NN];
  logic              m1i_ready [NN];
  logic              cb_ready [NN];
  logic              rx_valid [NN], rx_last [NN], tx_ready [NN];
  logic [FLIT_W-1:0] rx_flit [NN];
  logic              tx_valid [NN], tx_last [NN];
  logic [FLIT_W-1:0] tx_flit [NN];
  logic              nc_we [NN], am_we [NN], ac_we [NN];
  logic [31:0]       nc_addr [NN];
  logic [15:0]       am_src [NN];
  logic [NPORTS-1:0] am_ports [NN];
  logic [15:0]       ac_key [NN];
  logic [3:0]        ac_count [NN];
  logic              irq_valid [NN];
  irq_e              irq_cause [NN];
  logic [15:0]       irq_key [NN];
  logic [NPORTS-1:0] rh_ports [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    jump1_node u_node (
      .clk, .rst_n, .my_cluster(16'(n)),
      .net_in_valid(ni_valid[n]), .net_in_flit(ni_flit[n]), .net_in_ready(ni_ready[n]),
      .net_out_valid(no_valid[n]), .net_out_flit(no_flit[n]), .net_out_ready(no_ready[n]),
      .mbp1_in_valid(1'b0), .mbp1_in_flit('0), .mbp1_in_ready(m1i_ready[n]),
      .mbp1_out_valid(m1o_valid[n]), .mbp1_out_flit(m1o_flit[n]), .mbp1_out_ready(1'b1),
      .comb_valid(1'b0), .comb_flit('0), .comb_ready(cb_ready[n]),
      .rx_valid(rx_valid[n]), .rx_flit(rx_flit[n]), .rx_last(rx_last[n]), .rx_ready(1'b1),
      .tx_valid(tx_valid[n]), .tx_flit(tx_flit[n]), .tx_last(tx_last[n]), .tx_ready(tx_ready[n]),
      .nc_we(nc_we[n]), .nc_addr(nc_addr[n]), .nc_cached(1'b1),
      .am_we(am_we[n]), .am_src(am_src[n]), .am_ports(am_ports[n]), .am_rank(3'd0),
      .ac_we(ac_we[n]), .ac_rank(3'd0), .ac_key(ac_key[n]), .ac_count(ac_count[n]),
      .ac_to_core(1'b1), .ac_ports('0), .ac_rank_up(3'd0),
      .irq_valid(irq_valid[n]), .irq_cause(irq_cause[n]), .irq_key(irq_key[n]),
      .rhbd_level_map(8'h00), .rhbd_relay(1'b0), .rhbd_rank0(1'b0), .rhbd_ports(rh_ports[n])
    );
  end

  // ------------------------------------------------------------ wires
  // wire w (0..6) forward: node 0 link w -> node w+1 link 0
  //               back:    node w+1 link 0 -> node 0 link w
  // A wire passes flits combinationally; on a header it replaces the link
  // bit-map with {link 8}.
  int fwd_left [7], back_left [7];

  function automatic logic [FLIT_W-1:0] reroute(logic [FLIT_W-1:0] f);
    logic [FLIT_W-1:0] g = f;
    g[9:0]   = 10'b01_0000_0000;
    g[27:18] = 10'b01_0000_0000;
    return g;
  endfunction

  always_comb begin
    for (int n = 0; n < NN; n++)
      for (int l = 0; l < 8; l++) begin
        ni_valid[n][l] = 1'b0; ni_flit[n][l] = '0; no_ready[n][l] = 1'b1;
      end
    for (int w = 0; w < 7; w++) begin
      ni_valid[w + 1][0] = no_valid[0][w];
      ni_flit[w + 1][0]  = (fwd_left[w] == 0) ? reroute(no_flit[0][w]) : no_flit[0][w];
      no_ready[0][w]     = ni_ready[w + 1][0];
      ni_valid[0][w]     = no_valid[w + 1][0];
      ni_flit[0][w]      = (back_left[w] == 0) ? reroute(no_flit[w + 1][0]) : no_flit[w + 1][0];
      no_ready[w + 1][0] = ni_ready[0][w];
    end
  end

  int req_seen [NN];
  int core_pkts = 0;
  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < 7; w++) begin
      if (no_valid[0][w] && ni_ready[w + 1][0]) begin
        if (fwd_left[w] == 0) begin
          fwd_left[w] <= int'(no_flit[0][w][14:11]);
          if (no_flit[0][w][35:33] == PT_COH_REQ) req_seen[w + 1] <= req_seen[w + 1] + 1;
        end else fwd_left[w] <= fwd_left[w] - 1;
      end
      if (no_valid[w + 1][0] && ni_ready[0][w])
        back_left[w] <= (back_left[w] == 0) ? int'(no_flit[w + 1][0][14:11]) : back_left[w] - 1;
    end
    for (int n = 0; n < NN; n++) if (rx_valid[n] && rx_last[n]) core_pkts++;
  end

  // ------------------------------------------------------------ scenario
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_start, rt [2][8], st [2][8];
    int irq_cnt;
    for (int w = 0; w < 7; w++) begin fwd_left[w] = 0; back_left[w] = 0; end
    for (int n = 0; n < NN; n++) begin
      tx_valid[n] = 0; tx_last[n] = 0; tx_flit[n] = '0;
      nc_we[n] = 0; am_we[n] = 0; ac_we[n] = 0; nc_addr[n] = '0; am_src[n] = '0;
      am_ports[n] = '0; ac_key[n] = '0; ac_count[n] = '0; req_seen[n] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // receivers: line 0x8000 is cached; answers to cluster 0 leave on link 0
    for (int n = 1; n < NN; n++) begin
      nc_we[n] = 1; nc_addr[n] = 32'h8000;
      am_we[n] = 1; am_src[n] = 16'd0; am_ports[n] = 10'b00_0000_0001;
    end
    @(negedge clk);
    for (int n = 1; n < NN; n++) begin nc_we[n] = 0; am_we[n] = 0; end

    // mode 0: one multicast packet; mode 1: one unicast packet per receiver
    for (int mode = 0; mode < 2; mode++)
    for (int nr = 1; nr <= 7; nr++) begin
      automatic logic [FLIT_W-1:0] p [3];
      automatic logic [15:0] key = 16'(16'h0100 * (mode + 1) + nr);
      for (int n = 0; n < NN; n++) req_seen[n] = 0;
      // register the collection, then send the request(s)
      ac_we[0] = 1; ac_key[0] = key; ac_count[0] = 4'(nr);
      @(negedge clk);
      ac_we[0] = 0;
      p[1] = {16'd0, 4'h0, key};
      p[2] = {4'h0, 32'h8000};
      t_start = cyc;
      irq_cnt = 0;
      for (int u = 0; u < ((mode == 0) ? 1 : nr); u++) begin
        p[0] = make_hdr0(PT_COH_REQ, 3'd0, 4'd2, 1'b0,
                         (mode == 0) ? NPORTS'((1 << nr) - 1) : NPORTS'(1 << u));
        for (int k = 0; k < 3; k++) begin
          tx_valid[0] = 1; tx_flit[0] = p[k]; tx_last[0] = (k == 2);
          @(posedge clk);
          while (!tx_ready[0]) @(posedge clk);
          @(negedge clk);
        end
      end
      tx_valid[0] = 0; tx_last[0] = 0;
      st[mode][nr] = cyc - t_start;
      rt[mode][nr] = -1;
      for (int c = 0; c < 400; c++) begin
        @(posedge clk);
        if (irq_valid[0]) begin
          irq_cnt++;
          if (rt[mode][nr] < 0) rt[mode][nr] = cyc - t_start;
          chk(irq_cause[0] == IRQ_COL_DONE && irq_key[0] == key, "completion interrupt");
        end
      end
      @(negedge clk);
      chk(irq_cnt == 1, $sformatf("exactly one interrupt for %0d receivers", nr));
      begin
        automatic bit ok = 1;
        for (int n = 1; n < NN; n++) if (req_seen[n] != ((n <= nr) ? 1 : 0)) ok = 0;
        chk(ok, $sformatf("one request at each of %0d receivers", nr));
      end
      if (nr > 1) chk(rt[mode][nr] >= rt[mode][nr - 1], "round trip does not shrink");
      if (mode == 1) chk(rt[1][nr] >= rt[0][nr], "multicast is not slower than unicast");
      if (mode == 1) chk(st[1][nr] >= nr * st[0][nr], "unicast occupies the core at least n times as long");
      $display("receivers=%0d  %s: sending %0d cycles, round trip to completion interrupt %0d cycles",
               nr, (mode == 0) ? "one multicast packet" : "one unicast packet each",
               st[mode][nr], rt[mode][nr]);
    end
    chk(core_pkts == 0, "no packet needed the MBP core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
