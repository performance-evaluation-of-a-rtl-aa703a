// tb_rdt_router: one router slice.
//  1. unicast latency: a header accepted at clock edge a is first seen on the
//     output link at edge a+4 (store, grant, crossbar, output buffer);
//  2. a multicast reaches all its links at the same cycle when all are free;
//  3. partial multicast: with one destination buffer held full, the copies
//     for the free links leave first and the last copy follows later;
//  4. random traffic from all eleven inputs (ten links and the combining
//     input) to random link sets, under random link back-pressure, checked
//     by a scoreboard: every copy arrives exactly once and unchanged.
module tb_rdt_router;
  import jump1_pkg::*;
  localparam int W = SLICE_W, NP = NPORTS, NI = NP + 1;
  logic clk = 0, rst_n = 0;
  logic         in_valid [NP];
  logic [W-1:0] in_flit  [NP];
  logic         in_ready [NP];
  logic         out_valid[NP];
  logic [W-1:0] out_flit [NP];
  logic         out_ready[NP];
  logic         comb_valid, comb_ready;
  logic [W-1:0] comb_flit;
  int checks = 0, failures = 0;
  longint cyc = 0;

  rdt_router dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- stimulus
  logic [W-1:0] txq [NI][$];
  logic         d_valid [NI];
  logic [W-1:0] d_flit  [NI];
  logic         d_ready [NI];
  longint       accept_cyc [NI];

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      d_valid[i] = (txq[i].size() != 0);
      d_flit[i]  = d_valid[i] ? txq[i][0] : '0;
    end
    for (int p = 0; p < NP; p++) begin
      in_valid[p] = d_valid[p];
      in_flit[p]  = d_flit[p];
      d_ready[p]  = in_ready[p];
    end
    comb_valid = d_valid[NP];
    comb_flit  = d_flit[NP];
    d_ready[NP] = comb_ready;
  end

  always @(posedge clk) begin
    for (int i = 0; i < NI; i++)
      if (d_valid[i] && d_ready[i]) begin
        void'(txq[i].pop_front());
        accept_cyc[i] <= cyc;
      end
  end

  // packet store for the scoreboard: id -> flits
  logic [W-1:0] pkt_store [int][$];
  int           expect_cnt [NP][int];   // outstanding copies per output and id
  int           outstanding = 0;
  int           next_id = 1;

  function automatic logic [W-1:0] hdr(int len, bit vc, logic [NP-1:0] p);
    route_t r;
    r = '{len_m1: 4'(len - 1), vc: vc, ports: p};
    return {3'b000, r};
  endfunction

  task automatic send(input int src, input int len, input bit vc, input logic [NP-1:0] p,
                      output int id);
    logic [W-1:0] f [$];
    id = next_id++;
    f.push_back(hdr(len, vc, p));
    if (len > 1) f.push_back(W'(id));
    for (int k = 2; k < len; k++) f.push_back(W'($urandom));
    pkt_store[id] = f;
    for (int o = 0; o < NP; o++) if (p[o]) begin
      expect_cnt[o][id] = expect_cnt[o].exists(id) ? expect_cnt[o][id] + 1 : 1;
      outstanding++;
    end
    foreach (f[k]) txq[src].push_back(f[k]);
  endtask

  // ---------------------------------------------------------------- receive
  logic [W-1:0] rxbuf [NP][$];
  int           rx_len [NP];
  longint       first_seen [NP];
  longint       done_cyc [NP][int];
  bit           rand_ready = 0;
  bit           hold [NP];

  always @(negedge clk)
    for (int p = 0; p < NP; p++)
      out_ready[p] <= !hold[p] && (rand_ready ? ($urandom_range(3) != 0) : 1'b1);

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (out_valid[p] && first_seen[p] < 0) first_seen[p] = cyc;
      if (out_valid[p] && out_ready[p]) begin
        if (rxbuf[p].size() == 0) rx_len[p] = int'(out_flit[p][14:11]) + 1;
        rxbuf[p].push_back(out_flit[p]);
        if (rxbuf[p].size() == rx_len[p]) begin
          int id;
          id = (rx_len[p] > 1) ? int'(rxbuf[p][1]) : -1;
          checks++;
          if (id < 0 || !expect_cnt[p].exists(id) || expect_cnt[p][id] == 0) begin
            failures++;
            $display("FAIL unexpected packet on link %0d", p);
          end else begin
            automatic bit same = (rxbuf[p].size() == pkt_store[id].size());
            for (int k = 0; k < rxbuf[p].size() && same; k++)
              if (rxbuf[p][k] != pkt_store[id][k]) same = 0;
            if (!same) begin failures++; $display("FAIL corrupted packet %0d on link %0d", id, p); end
            expect_cnt[p][id]--;
            outstanding--;
            done_cyc[p][id] = cyc;
          end
          rxbuf[p].delete();
        end
      end
    end
  end

  task automatic drain(input int max_cycles, input string what);
    int n = 0;
    while (outstanding != 0 && n < max_cycles) begin @(negedge clk); n++; end
    chk(outstanding == 0, {what, ": all copies delivered"});
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int id, id2, id3;
    automatic longint t0;
    automatic int mc_full = 0, mc_partial = 0, mc_rand = 0;
    for (int p = 0; p < NP; p++) begin hold[p] = 0; first_seen[p] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. unicast latency: header accepted at the edge sampling cyc == t0
    t0 = cyc;
    send(0, 4, 0, 10'b00_0000_1000, id);
    drain(100, "unicast");
    chk(first_seen[3] - t0 == 4, "header on the output link 4 edges after acceptance");
    $display("unicast header latency: %0d edges", first_seen[3] - t0);

    // 2. multicast to three free links: identical arrival times
    send(1, 6, 0, 10'b01_0001_0100, id);
    drain(100, "multicast");
    chk(done_cyc[2][id] == done_cyc[4][id] && done_cyc[4][id] == done_cyc[8][id],
        "copies leave together when all links are free");
    mc_full++;

    // 3. partial multicast: link 5 is stalled and its VC0 buffer holds a packet
    hold[5] = 1;
    send(2, 4, 0, 10'b00_0010_0000, id2);
    repeat (10) @(negedge clk);
    send(3, 5, 0, 10'b00_1110_0000, id3);
    repeat (30) @(negedge clk);
    chk(expect_cnt[6][id3] == 0 && expect_cnt[7][id3] == 0, "free links served first");
    chk(expect_cnt[5][id3] == 1, "blocked link still pending");
    hold[5] = 0;
    drain(200, "partial multicast");
    chk(done_cyc[5][id3] > done_cyc[6][id3], "last copy sent later");
    mc_partial++;

    // 4. random traffic under back-pressure, both VCs, combining input too
    rand_ready = 1;
    for (int n = 0; n < 300; n++) begin
      automatic int src = $urandom_range(NI - 1);
      automatic logic [NP-1:0] p = NP'($urandom);
      if (p == '0) p = NP'(1) << $urandom_range(NP - 1);
      send(src, $urandom_range(2, MAX_FLITS), 1'($urandom), p, id);
      if ($countones(p) > 1) mc_rand++;
      if ((n % 20) == 19) repeat (40) @(negedge clk);
    end
    drain(20000, "random traffic");
    chk(mc_rand > 50, "random traffic held multicasts");
    $display("multicasts: full=%0d partial=%0d random=%0d", mc_full, mc_partial, mc_rand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
