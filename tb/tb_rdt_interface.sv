// tb_rdt_interface: the RDT Interface alone, with the router side and the
// core side driven and watched by the testbench.
//  - coherent request, line cached      -> ACK back on the Ackmap links
//  - coherent request, line not cached  -> NACK
//  - coherent request with a body       -> reply, body dropped
//  - coherent request from unknown source -> interrupt, packet to the core
//  - ordinary packet                    -> to the core unchanged
//  - three ACKs for a registered key    -> one ACK for the next hierarchy
//  - two ACKs for a key marked for the core -> completion interrupt
//  - ACK with an unregistered key       -> interrupt, packet to the core
//  - packet written by the core         -> to the router unchanged
// The turnaround of a hardware reply (last request flit taken at edge t,
// first reply flit driven from edge t+4) is checked with a free link.
module tb_rdt_interface;
  import jump1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] my_cluster = 16'd3;
  logic rin_valid, rin_ready, rout_valid, rout_ready;
  logic [FLIT_W-1:0] rin_flit, rout_flit, rx_flit, tx_flit;
  logic rx_valid, rx_last, rx_ready, tx_valid, tx_last, tx_ready;
  logic nc_we, nc_cached, am_we, ac_we, ac_to_core;
  logic [31:0] nc_addr;
  logic [15:0] am_src, ac_key;
  logic [NPORTS-1:0] am_ports, ac_ports;
  logic [2:0] am_rank, ac_rank, ac_rank_up;
  logic [3:0] ac_count;
  logic irq_valid;
  irq_e irq_cause;
  logic [15:0] irq_key;
  int checks = 0, failures = 0;
  longint cyc = 0;

  rdt_interface dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ monitors
  typedef logic [FLIT_W-1:0] pkt_t [$];
  pkt_t   rout_pkts [$];
  pkt_t   rx_pkts [$];
  logic [FLIT_W-1:0] rcur [$];
  logic [FLIT_W-1:0] xcur [$];
  longint rout_first [$];
  int     irqs [$];
  logic [15:0] irq_keys [$];
  bit     rand_ready = 0;

  always @(negedge clk) begin
    rout_ready <= rand_ready ? 1'($urandom) : 1'b1;
    rx_ready   <= rand_ready ? 1'($urandom) : 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (rout_valid && rcur.size() == 0) rout_first.push_back(cyc);
    if (rout_valid && rout_ready) begin
      rcur.push_back(rout_flit);
      if (rcur.size() == int'(rcur[0][14:11]) + 1) begin
        rout_pkts.push_back(rcur);
        rcur.delete();
      end
    end
    if (rx_valid && rx_ready) begin
      xcur.push_back(rx_flit);
      if (rx_last) begin rx_pkts.push_back(xcur); xcur.delete(); end
    end
    if (irq_valid) begin irqs.push_back(int'(irq_cause)); irq_keys.push_back(irq_key); end
  end

  // ------------------------------------------------------------ drivers
  function automatic pkt_t make(ptype_e t, logic [2:0] rank, int len, logic [15:0] src,
                                logic [15:0] key, logic [31:0] addr);
    pkt_t p;
    p.push_back(make_hdr0(t, rank, 4'(len - 1), 1'b0, 10'b01_0000_0000));
    p.push_back({src, 4'h0, key});
    p.push_back({4'h0, addr});
    for (int k = 3; k < len; k++) p.push_back({$urandom, 4'($urandom)});
    return p;
  endfunction

  longint last_in;
  task automatic put(input pkt_t p);
    foreach (p[k]) begin
      rin_valid = 1; rin_flit = p[k];
      @(posedge clk);
      while (!rin_ready) @(posedge clk);
      last_in = cyc;
      @(negedge clk);
    end
    rin_valid = 0;
  endtask

  task automatic core_send(input pkt_t p);
    foreach (p[k]) begin
      tx_valid = 1; tx_flit = p[k]; tx_last = (k == p.size() - 1);
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      @(negedge clk);
    end
    tx_valid = 0; tx_last = 0;
  endtask

  bit ok;
  task automatic settle(); repeat (30) @(negedge clk); endtask

  function automatic bit same(pkt_t a, pkt_t b);
    bit r;
    r = (a.size() == b.size());
    for (int k = 0; k < a.size() && r; k++) r = (a[k] == b[k]);
    return r;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, q;
    hdr0_t h0;
    rin_valid = 0; rin_flit = '0; tx_valid = 0; tx_flit = '0; tx_last = 0;
    nc_we = 0; am_we = 0; ac_we = 0; nc_addr = '0; nc_cached = 0; am_src = '0; am_ports = '0;
    am_rank = '0; ac_rank = '0; ac_key = '0; ac_count = '0; ac_to_core = 0; ac_ports = '0;
    ac_rank_up = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // tables
    nc_we = 1; nc_addr = 32'h0000_1000; nc_cached = 1; @(negedge clk);
    nc_addr = 32'h0000_2000; nc_cached = 0; @(negedge clk); nc_we = 0;
    am_we = 1; am_src = 16'd9; am_ports = 10'b00_0000_0001; am_rank = 3'd0; @(negedge clk);
    am_we = 0;
    ac_we = 1; ac_rank = 3'd0; ac_key = 16'h0A02; ac_count = 4'd3; ac_to_core = 0;
    ac_ports = 10'b00_0010_0000; ac_rank_up = 3'd1; @(negedge clk);
    ac_rank = 3'd1; ac_key = 16'h0A03; ac_count = 4'd2; ac_to_core = 1; @(negedge clk);
    ac_we = 0;

    // cached line -> ACK, turnaround
    put(make(PT_COH_REQ, 0, 3, 16'd9, 16'h0101, 32'h0000_1000));
    settle();
    chk(rout_pkts.size() == 1, "one reply");
    if (rout_pkts.size() == 1) begin
      h0 = hdr0_t'(rout_pkts[0][0]);
      chk(h0.ptype == PT_ACK && h0.route_lo.ports == 10'b1 && h0.route_hi.ports == 10'b1,
          "ACK to the Ackmap links");
      chk(rout_pkts[0][1] == {16'd3, 4'h0, 16'h0101} && rout_pkts[0][2] == {4'h0, 32'h1000},
          "reply key and address");
      chk(rout_first[0] - last_in == 4, "reply turnaround");
      $display("reply turnaround: %0d edges", rout_first[0] - last_in);
    end
    rout_pkts.delete();
    // uncached line -> NACK, with a body that must be dropped
    put(make(PT_COH_REQ, 0, 6, 16'd9, 16'h0102, 32'h0000_2000));
    settle();
    chk(rout_pkts.size() == 1 && rout_pkts[0][0][35:33] == PT_NACK, "NACK for uncached line");
    chk(rx_pkts.size() == 0 && irqs.size() == 0, "request consumed in hardware");
    rout_pkts.delete();
    // unknown source -> miss
    p = make(PT_COH_REQ, 0, 3, 16'd77, 16'h0103, 32'h0000_1000);
    put(p);
    settle();
    chk(irqs.size() == 1 && irqs[0] == IRQ_GEN_MISS && irq_keys[0] == 16'h0103, "generator miss irq");
    ok = (rx_pkts.size() == 1) && same(rx_pkts[0], p);
    chk(ok, "missed request handed to the core");
    chk(rout_pkts.size() == 0, "no reply on a miss");
    irqs.delete(); irq_keys.delete(); rx_pkts.delete();
    // random back-pressure from here on
    rand_ready = 1;
    // ordinary packet
    p = make(PT_DATA, 0, 9, 16'd5, 16'h0, 32'h0000_3000);
    put(p);
    settle();
    ok = (rx_pkts.size() == 1) && same(rx_pkts[0], p) && irqs.size() == 0;
    chk(ok, "data packet to the core");
    rx_pkts.delete();
    // three rank-0 ACKs -> upward ACK
    for (int i = 0; i < 3; i++) put(make(PT_ACK, 0, 3, 16'(20 + i), 16'h0A02, 32'h0000_1000));
    settle();
    chk(rout_pkts.size() == 1, "one upward acknowledgement");
    if (rout_pkts.size() == 1) begin
      h0 = hdr0_t'(rout_pkts[0][0]);
      chk(h0.ptype == PT_ACK && h0.route_lo.ports == 10'b00_0010_0000 && h0.rank == 3'd1 &&
          rout_pkts[0][1][15:0] == 16'h0A02, "upward ACK fields");
    end
    chk(irqs.size() == 0 && rx_pkts.size() == 0, "collection in hardware");
    rout_pkts.delete();
    // two upper-rank ACKs (one NACK) -> completion interrupt
    put(make(PT_ACK, 1, 3, 16'd30, 16'h0A03, 32'h0000_1000));
    put(make(PT_NACK, 1, 3, 16'd31, 16'h0A03, 32'h0000_1000));
    settle();
    chk(irqs.size() == 1 && irqs[0] == IRQ_COL_DONE && irq_keys[0] == 16'h0A03, "completion irq");
    chk(rout_pkts.size() == 0, "no upward ack for a core entry");
    irqs.delete(); irq_keys.delete();
    // unregistered key
    p = make(PT_ACK, 0, 3, 16'd40, 16'h0BBB, 32'h0);
    put(p);
    settle();
    chk(irqs.size() == 1 && irqs[0] == IRQ_COL_MISS, "collector miss irq");
    ok = (rx_pkts.size() == 1) && same(rx_pkts[0], p);
    chk(ok, "missed ACK handed to the core");
    irqs.delete(); rx_pkts.delete();
    // core sends, while a request is being answered
    p = make(PT_DATA, 0, 12, 16'd3, 16'h0, 32'h0000_4000);
    fork
      core_send(p);
      put(make(PT_COH_REQ, 0, 3, 16'd9, 16'h0104, 32'h0000_1000));
    join
    settle();
    chk(rout_pkts.size() == 2, "reply and core packet both sent");
    if (rout_pkts.size() == 2)
      begin ok = same(rout_pkts[0], p) || same(rout_pkts[1], p); chk(ok, "core packet unchanged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
