// tb_jump1_node: end-to-end run of one cluster's network side at its
// default sizes (two 18-bit router slices, RDT Interface with 512-entry Net
// and Ackmap Caches and 2 x 256-entry Ack Cache).
//
// Traffic enters on the torus links, the combining input and the core's
// sender; everything leaving on links, to the core and as interrupts is
// collected and compared with what the scenario must produce. Each
// mechanism is counted and must occur at least once:
//   multicast (all copies at once), partial multicast (a blocked link served
//   later), blocked input (link not ready for a header), both virtual
//   channels, ACK and NACK generation, generator miss, upward ACK after
//   collection, completion interrupt, collector miss, packet to the core,
//   core packet multicast, combining input, directory-level routing.
module tb_jump1_node;
  import jump1_pkg::*;
  typedef logic [FLIT_W-1:0] pkt_t [$];

  logic clk = 0, rst_n = 0;
  logic [15:0] my_cluster = 16'd3;
  logic              net_in_valid [8];
  logic [FLIT_W-1:0] net_in_flit  [8];
  logic              net_in_ready [8];
  logic              net_out_valid[8];
  logic [FLIT_W-1:0] net_out_flit [8];
  logic              net_out_ready[8];
  logic mbp1_in_valid, mbp1_in_ready, mbp1_out_valid, mbp1_out_ready;
  logic [FLIT_W-1:0] mbp1_in_flit, mbp1_out_flit;
  logic comb_valid, comb_ready;
  logic [FLIT_W-1:0] comb_flit;
  logic rx_valid, rx_last, rx_ready, tx_valid, tx_last, tx_ready;
  logic [FLIT_W-1:0] rx_flit, tx_flit;
  logic nc_we, nc_cached, am_we, ac_we, ac_to_core;
  logic [31:0] nc_addr;
  logic [15:0] am_src, ac_key;
  logic [NPORTS-1:0] am_ports, ac_ports;
  logic [2:0] am_rank, ac_rank, ac_rank_up;
  logic [3:0] ac_count;
  logic irq_valid;
  irq_e irq_cause;
  logic [15:0] irq_key;
  logic [7:0] rhbd_level_map;
  logic rhbd_relay;
  logic rhbd_rank0;
  logic [NPORTS-1:0] rhbd_ports;
  int checks = 0, failures = 0;
  longint cyc = 0;

  jump1_node dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // mechanism counters
  int n_mc_full = 0, n_mc_partial = 0, n_in_blocked = 0, n_vc1 = 0, n_ack_gen = 0,
      n_nack_gen = 0, n_gen_miss = 0, n_up_ack = 0, n_col_done = 0, n_col_miss = 0,
      n_to_core = 0, n_core_mc = 0, n_comb = 0, n_rhbd = 0;

  // ------------------------------------------------------------ link drivers
  // sources: 0..7 torus links, 8 = link 9, 9 = combining input
  logic [FLIT_W-1:0] txq [10][$];
  longint            last_acc [10];
  logic              s_valid [10];
  logic              s_ready [10];
  logic [FLIT_W-1:0] s_flit  [10];

  always_comb begin
    for (int i = 0; i < 10; i++) begin
      s_valid[i] = (txq[i].size() != 0);
      s_flit[i]  = s_valid[i] ? txq[i][0] : '0;
    end
    for (int i = 0; i < 8; i++) begin
      net_in_valid[i] = s_valid[i];
      net_in_flit[i]  = s_flit[i];
      s_ready[i]      = net_in_ready[i];
    end
    mbp1_in_valid = s_valid[8]; mbp1_in_flit = s_flit[8]; s_ready[8] = mbp1_in_ready;
    comb_valid    = s_valid[9]; comb_flit    = s_flit[9]; s_ready[9] = comb_ready;
  end

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < 10; i++) begin
      if (s_valid[i] && s_ready[i]) begin
        void'(txq[i].pop_front());
        last_acc[i] <= cyc;
      end else if (s_valid[i] && !s_ready[i]) n_in_blocked++;
    end

  task automatic put(input int src, input pkt_t p);
    foreach (p[k]) txq[src].push_back(p[k]);
  endtask

  task automatic wait_sent(input int src);
    while (txq[src].size() != 0) @(negedge clk);
  endtask

  function automatic pkt_t make(ptype_e t, logic [2:0] rank, int len, bit vc,
                                logic [NPORTS-1:0] ports, logic [15:0] src,
                                logic [15:0] key, logic [31:0] addr);
    pkt_t p;
    p.push_back(make_hdr0(t, rank, 4'(len - 1), vc, ports));
    p.push_back({src, 4'h0, key});
    p.push_back({4'h0, addr});
    for (int k = 3; k < len; k++) p.push_back({$urandom, 4'($urandom)});
    return p;
  endfunction

  // ------------------------------------------------------------ monitors
  // outputs: 0..7 torus links, 8 = link 9
  pkt_t   got [9][$];
  longint got_first [9][$];
  logic [FLIT_W-1:0] cur [9][$];
  longint cur_first [9];
  bit     hold [9];
  pkt_t   rx_pkts [$];
  logic [FLIT_W-1:0] rxcur [$];
  int     irqs [$];
  logic [15:0] irq_keys [$];
  logic   o_valid [9];
  logic [FLIT_W-1:0] o_flit [9];
  logic   o_ready [9];

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      o_valid[i] = net_out_valid[i]; o_flit[i] = net_out_flit[i];
      net_out_ready[i] = o_ready[i];
    end
    o_valid[8] = mbp1_out_valid; o_flit[8] = mbp1_out_flit; mbp1_out_ready = o_ready[8];
  end
  always @(negedge clk) for (int i = 0; i < 9; i++) o_ready[i] <= !hold[i];

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 9; i++) begin
      if (o_valid[i] && o_ready[i]) begin
        if (cur[i].size() == 0) cur_first[i] = cyc;
        cur[i].push_back(o_flit[i]);
        if (cur[i].size() == int'(cur[i][0][14:11]) + 1) begin
          got[i].push_back(cur[i]);
          got_first[i].push_back(cur_first[i]);
          cur[i].delete();
        end
      end
    end
    if (rx_valid && rx_ready) begin
      rxcur.push_back(rx_flit);
      if (rx_last) begin rx_pkts.push_back(rxcur); rxcur.delete(); end
    end
    if (irq_valid) begin irqs.push_back(int'(irq_cause)); irq_keys.push_back(irq_key); end
  end

  function automatic bit same(pkt_t a, pkt_t b);
    bit r;
    r = (a.size() == b.size());
    for (int k = 0; k < a.size() && r; k++) r = (a[k] == b[k]);
    return r;
  endfunction

  task automatic clear_all();
    for (int i = 0; i < 9; i++) begin got[i].delete(); got_first[i].delete(); end
    rx_pkts.delete(); irqs.delete(); irq_keys.delete();
  endtask

  task automatic settle(input int n = 60); repeat (n) @(negedge clk); endtask

  task automatic core_send(input pkt_t p);
    foreach (p[k]) begin
      tx_valid = 1; tx_flit = p[k]; tx_last = (k == p.size() - 1);
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      @(negedge clk);
    end
    tx_valid = 0; tx_last = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, q;
    bit ok;
    longint t_req;
    for (int i = 0; i < 9; i++) hold[i] = 0;
    tx_valid = 0; tx_flit = '0; tx_last = 0; rx_ready = 1;
    nc_we = 0; am_we = 0; ac_we = 0; nc_addr = '0; nc_cached = 0; am_src = '0; am_ports = '0;
    am_rank = '0; ac_rank = '0; ac_key = '0; ac_count = '0; ac_to_core = 0; ac_ports = '0;
    ac_rank_up = '0; rhbd_level_map = '0; rhbd_relay = 0; rhbd_rank0 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // tables: lines 0x1000 (cached) and 0x2000 (not cached); cluster 9 answers via link 1
    nc_we = 1; nc_addr = 32'h1000; nc_cached = 1; @(negedge clk);
    nc_addr = 32'h2000; nc_cached = 0; @(negedge clk); nc_we = 0;
    am_we = 1; am_src = 16'd9; am_ports = 10'b00_0000_0010; am_rank = 3'd0; @(negedge clk);
    am_we = 0;

    // ---- 1. multicast coherent request: links 4, 5 and the local interface
    p = make(PT_COH_REQ, 0, 3, 0, 10'b01_0011_0000, 16'd9, 16'h0111, 32'h1000);
    put(0, p);
    wait_sent(0);
    t_req = last_acc[0];
    settle();
    ok = got[4].size() == 1 && got[5].size() == 1 && same(got[4][0], p) && same(got[5][0], p);
    chk(ok, "request copied to links 4 and 5");
    chk(got[4].size() == 1 && got[5].size() == 1 && got_first[4][0] == got_first[5][0],
        "copies leave together");
    if (ok) n_mc_full++;
    chk(got[1].size() == 1 && got[1][0][0][35:33] == PT_ACK && got[1][0][1][15:0] == 16'h0111,
        "ACK generated and sent back on link 1");
    if (got[1].size() == 1) begin
      n_ack_gen++;
      $display("request last flit to ACK header on link: %0d edges", got_first[1][0] - t_req);
      // the last request flit reaches the interface 4 edges after entering the
      // router, the reply leaves the interface 4 edges later, the router adds 4
      chk(got_first[1][0] - t_req == 12, "hardware ACK turnaround");
    end
    clear_all();

    // ---- 2. NACK for an uncached line, VC1, with a body
    p = make(PT_COH_REQ, 0, 8, 1, 10'b01_0000_0000, 16'd9, 16'h0112, 32'h2000);
    put(2, p);
    n_vc1++;
    settle();
    chk(got[1].size() == 1 && got[1][0][0][35:33] == PT_NACK, "NACK generated");
    if (got[1].size() == 1) n_nack_gen++;
    clear_all();

    // ---- 3. partial multicast: link 6 stalled with a packet already queued
    hold[6] = 1;
    put(3, make(PT_DATA, 0, 5, 0, 10'b00_0100_0000, 16'd1, 16'h0, 32'h0));
    settle(20);
    p = make(PT_DATA, 0, 10, 0, 10'b00_1100_0000, 16'd2, 16'h0, 32'h0);
    put(0, p);
    settle(40);
    chk(got[7].size() == 1 && same(got[7][0], p), "free link 7 served while 6 is blocked");
    chk(got[6].size() == 0, "blocked link 6 has sent nothing");
    hold[6] = 0;
    settle();
    chk(got[6].size() == 2 && same(got[6][1], p), "link 6 gets its copy later");
    if (got[6].size() == 2 && got[7].size() == 1 && got_first[6][1] > got_first[7][0]) n_mc_partial++;
    chk(n_mc_partial == 1, "partial multicast observed");
    clear_all();

    // ---- 4. acknowledgement collection: 3 rank-0 ACKs -> one upward ACK on link 7
    ac_we = 1; ac_rank = 3'd0; ac_key = 16'h0C01; ac_count = 4'd3; ac_to_core = 0;
    ac_ports = 10'b00_1000_0000; ac_rank_up = 3'd1; @(negedge clk);
    ac_rank = 3'd2; ac_key = 16'h0C02; ac_count = 4'd2; ac_to_core = 1; @(negedge clk);
    ac_we = 0;
    put(0, make(PT_ACK, 0, 3, 1, 10'b01_0000_0000, 16'd10, 16'h0C01, 32'h1000));
    put(2, make(PT_ACK, 0, 3, 1, 10'b01_0000_0000, 16'd11, 16'h0C01, 32'h1000));
    put(3, make(PT_NACK, 0, 3, 1, 10'b01_0000_0000, 16'd12, 16'h0C01, 32'h1000));
    settle();
    chk(got[7].size() == 1 && got[7][0][0][35:33] == PT_NACK && got[7][0][0][17:15] == 3'd1 &&
        got[7][0][1][15:0] == 16'h0C01, "one combined upward reply (NACK seen)");
    if (got[7].size() == 1) n_up_ack++;
    chk(irqs.size() == 0, "no interrupt during collection");
    // ---- 5. completion interrupt (upper-rank entry)
    put(4, make(PT_ACK, 2, 3, 1, 10'b01_0000_0000, 16'd13, 16'h0C02, 32'h1000));
    put(5, make(PT_ACK, 2, 3, 1, 10'b01_0000_0000, 16'd14, 16'h0C02, 32'h1000));
    settle();
    chk(irqs.size() == 1 && irqs[0] == IRQ_COL_DONE && irq_keys[0] == 16'h0C02, "completion irq");
    if (irqs.size() == 1) n_col_done++;
    clear_all();

    // ---- 6. misses and ordinary packets go to the core
    p = make(PT_COH_REQ, 0, 3, 0, 10'b01_0000_0000, 16'd200, 16'h0D01, 32'h1000);
    put(1, p);
    settle();
    chk(irqs.size() == 1 && irqs[0] == IRQ_GEN_MISS, "generator miss irq");
    ok = rx_pkts.size() == 1 && same(rx_pkts[0], p);
    chk(ok, "missed request to the core");
    if (ok) n_gen_miss++;
    clear_all();
    p = make(PT_ACK, 0, 3, 1, 10'b01_0000_0000, 16'd201, 16'h0D02, 32'h1000);
    put(1, p);
    settle();
    chk(irqs.size() == 1 && irqs[0] == IRQ_COL_MISS, "collector miss irq");
    if (irqs.size() == 1) n_col_miss++;
    clear_all();
    p = make(PT_DATA, 0, 16, 0, 10'b01_0000_0000, 16'd202, 16'h0, 32'h1000);
    put(8, p);
    settle();
    ok = rx_pkts.size() == 1 && same(rx_pkts[0], p) && irqs.size() == 0;
    chk(ok, "16-flit packet from link 9 to the core");
    if (ok) n_to_core++;
    clear_all();

    // ---- 7. core multicast with links taken from one directory level
    rhbd_level_map = 8'b1010_0100;   // N, W and SE wanted, step 1
    rhbd_relay = 0;
    #1;
    chk(rhbd_ports == 10'b00_1101_0000, "directory level to links");
    p = make(PT_DATA, 0, 7, 0, rhbd_ports | 10'b10_0000_0000, 16'd3, 16'h0, 32'h5000);
    core_send(p);
    settle();
    ok = got[4].size() == 1 && got[6].size() == 1 && got[7].size() == 1 && got[8].size() == 1 &&
         same(got[4][0], p) && same(got[6][0], p) && same(got[7][0], p) && same(got[8][0], p) &&
         got[5].size() == 0;
    chk(ok, "core multicast reaches N, W, S and link 9");
    if (ok) begin n_core_mc++; n_rhbd++; end
    clear_all();

    // ---- 7b. the lowest level of the tree goes over the rank-0 torus
    rhbd_level_map = 8'b0100_0001;   // E and SS wanted, step 1
    rhbd_rank0 = 1;
    #1;
    chk(rhbd_ports == 10'b00_0000_1010, "rank-0 directory level to links");
    p = make(PT_DATA, 0, 4, 0, rhbd_ports | 10'b10_0000_0000, 16'd3, 16'h0, 32'h5040);
    core_send(p);
    settle();
    ok = got[1].size() == 1 && got[3].size() == 1 && got[8].size() == 1 &&
         same(got[1][0], p) && same(got[3][0], p) && same(got[8][0], p) &&
         got[5].size() == 0 && got[7].size() == 0;
    chk(ok, "core multicast reaches rank-0 E, rank-0 S and link 9");
    if (ok) n_rhbd++;
    rhbd_rank0 = 0;
    clear_all();

    // ---- 8. combining input
    p = make(PT_ACK, 1, 3, 1, 10'b00_0000_1000, 16'd3, 16'h0E01, 32'h0);
    put(9, p);
    settle();
    ok = got[3].size() == 1 && same(got[3][0], p);
    chk(ok, "combining input to link 3");
    if (ok) n_comb++;
    clear_all();

    // ---- 9. load: many multicasts at once from all links, both VCs
    begin
      int exp_cnt [9];
      for (int i = 0; i < 9; i++) exp_cnt[i] = 0;
      for (int n = 0; n < 40; n++) begin
        automatic int src = n % 9;
        automatic logic [NPORTS-1:0] m = NPORTS'($urandom) & 10'b10_1111_1111;
        automatic bit vc = 1'($urandom);
        if (m == '0) m = 10'b1;
        if (vc) n_vc1++;
        put(src, make(PT_DATA, 0, $urandom_range(3, 16), vc, m, 16'(n), 16'h0, 32'h0));
        for (int o = 0; o < 8; o++) if (m[o]) exp_cnt[o]++;
        if (m[9]) exp_cnt[8]++;
      end
      settle(3000);
      ok = 1;
      for (int o = 0; o < 9; o++) if (got[o].size() != exp_cnt[o]) ok = 0;
      chk(ok, "all copies of the load delivered");
      clear_all();
    end

    // ---- mechanisms
    chk(n_mc_full > 0, "multicast");       chk(n_mc_partial > 0, "partial multicast");
    chk(n_in_blocked > 0, "blocked input"); chk(n_vc1 > 0, "virtual channel 1");
    chk(n_ack_gen > 0, "ACK generation");   chk(n_nack_gen > 0, "NACK generation");
    chk(n_gen_miss > 0, "generator miss");  chk(n_up_ack > 0, "upward ACK");
    chk(n_col_done > 0, "completion irq");  chk(n_col_miss > 0, "collector miss");
    chk(n_to_core > 0, "packet to core");   chk(n_core_mc > 0, "core multicast");
    chk(n_comb > 0, "combining input");     chk(n_rhbd > 0, "directory-level routing");
    $display("mechanisms: mc=%0d partial=%0d blocked=%0d vc1=%0d ack=%0d nack=%0d genmiss=%0d up=%0d done=%0d colmiss=%0d core=%0d coremc=%0d comb=%0d rhbd=%0d",
             n_mc_full, n_mc_partial, n_in_blocked, n_vc1, n_ack_gen, n_nack_gen, n_gen_miss,
             n_up_ack, n_col_done, n_col_miss, n_to_core, n_core_mc, n_comb, n_rhbd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
