// tb_packet_manager: a multicast packet is granted its outputs in two goes;
// the bit-map must shrink by exactly the granted links, the packet must be
// replayed whole each time, the VC buffer must refuse a new packet until the
// bit-map is empty, the other VC must stay usable, and the first flit must
// leave the cycle after the grant (before the body has fully arrived).
module tb_packet_manager;
  import jump1_pkg::*;
  localparam int W = SLICE_W;
  logic clk = 0, rst_n = 0;
  logic            in_valid;
  logic [W-1:0]    in_flit;
  logic            in_ready;
  logic [NPORTS-1:0] req_map, grant;
  logic            req_vc;
  logic            x_valid, x_last, x_vc;
  logic [W-1:0]    x_flit;
  int checks = 0, failures = 0;

  packet_manager dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] hdr(int len, bit vc, logic [NPORTS-1:0] p);
    route_t r;
    r = '{len_m1: 4'(len - 1), vc: vc, ports: p};
    return {3'b000, r};
  endfunction

  logic [W-1:0] pa [5];
  logic [W-1:0] pb [2];
  logic [W-1:0] got [$];
  int           last_seen;
  logic         got_vc;

  always @(posedge clk) if (rst_n && x_valid) begin
    got.push_back(x_flit);
    got_vc = x_vc;
    if (x_last) last_seen++;
  end

  task automatic expect_stream(input logic [W-1:0] p [], input bit vc, input string what);
    got.delete();
    last_seen = 0;
    while (last_seen == 0) @(negedge clk);
    chk(got.size() == p.size(), {what, ": length"});
    for (int i = 0; i < p.size() && i < got.size(); i++)
      chk(got[i] == p[i], {what, ": flit"});
    chk(got_vc == vc, {what, ": vc"});
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_flit = '0; grant = '0; last_seen = 0;
    pa[0] = hdr(5, 0, 10'b00_0010_0101);
    for (int i = 1; i < 5; i++) pa[i] = W'($urandom);
    pb[0] = hdr(2, 1, 10'b00_1000_0000);
    pb[1] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // header of A
    in_valid = 1; in_flit = pa[0];
    #1 chk(in_ready, "empty VC0 accepts a header");
    @(negedge clk);
    in_flit = pa[1];
    chk(req_map == 10'b00_0010_0101 && req_vc == 0, "request carries the bit-map");
    grant = 10'b00_0000_0100;                        // only link 2 is free
    @(negedge clk);
    grant = '0;
    in_flit = pa[2];
    chk(x_valid && x_flit == pa[0], "header leaves the cycle after the grant");
    chk(req_map == '0, "no request while streaming");
    @(negedge clk); in_flit = pa[3];
    @(negedge clk); in_flit = pa[4];
    @(negedge clk); in_valid = 0;
    got.delete(); got.push_back(pa[0]); got.push_back(pa[1]); got.push_back(pa[2]);
    repeat (3) @(negedge clk);
    chk(req_map == 10'b00_0010_0001 && req_vc == 0, "granted bit cleared, others remain");
    // a new packet on VC0 is refused, VC1 is accepted
    in_valid = 1; in_flit = hdr(3, 0, 10'b1);
    #1 chk(!in_ready, "occupied VC0 refuses a header");
    in_flit = pb[0];
    #1 chk(in_ready, "VC1 accepts");
    @(negedge clk); in_flit = pb[1];
    @(negedge clk); in_valid = 0;
    // round robin: VC1 goes next
    chk(req_vc == 1 && req_map == 10'b00_1000_0000, "VC1 requested after VC0 was served");
    grant = 10'b00_1000_0000;
    fork
      expect_stream(pb, 1, "packet B");
      begin @(negedge clk); grant = '0; end
    join
    @(negedge clk);
    chk(req_vc == 0 && req_map == 10'b00_0010_0001, "VC0 asks again for the rest");
    grant = 10'b00_0010_0001;
    fork
      expect_stream(pa, 0, "packet A replay");
      begin @(negedge clk); grant = '0; end
    join
    @(negedge clk);
    chk(req_map == '0, "bit-map empty");
    in_valid = 1; in_flit = hdr(3, 0, 10'b1);
    #1 chk(in_ready, "VC0 free again");
    @(negedge clk);
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
