// tb_ack_generator: fills both caches, then checks ACK for a cached line,
// NACK for an uncached one, a miss for an unknown line, a miss for an
// unknown source, a miss for an entry overwritten by a conflicting tag, the
// reply header fields, and the one-cycle lookup latency.
module tb_ack_generator;
  import jump1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] my_cluster = 16'h0042;
  logic nc_we, nc_cached, am_we, req_valid, resp_valid, resp_hit;
  logic [31:0] nc_addr, req_addr;
  logic [15:0] am_src, req_src, req_key;
  logic [NPORTS-1:0] am_ports;
  logic [2:0] am_rank;
  logic [FLIT_W-1:0] resp_hdr [HDR_FLITS];
  int checks = 0, failures = 0;

  ack_generator dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic nc_write(input logic [31:0] a, input bit c);
    nc_we = 1; nc_addr = a; nc_cached = c; @(negedge clk); nc_we = 0;
  endtask
  task automatic am_write(input logic [15:0] s, input logic [NPORTS-1:0] p, input logic [2:0] r);
    am_we = 1; am_src = s; am_ports = p; am_rank = r; @(negedge clk); am_we = 0;
  endtask

  // issue one request; the response must come exactly one cycle later
  task automatic lookup(input logic [15:0] s, input logic [31:0] a, input logic [15:0] k,
                        input bit exp_hit, input ptype_e exp_t,
                        input logic [NPORTS-1:0] exp_p, input logic [2:0] exp_r,
                        input string what);
    hdr0_t h0; hdr1_t h1; hdr2_t h2;
    @(negedge clk);                       // idle cycle: previous response gone
    req_valid = 1; req_src = s; req_addr = a; req_key = k;
    #1 chk(!resp_valid, {what, ": no early response"});
    @(negedge clk);
    req_valid = 0;
    chk(resp_valid, {what, ": response after one cycle"});
    chk(resp_hit == exp_hit, {what, ": hit/miss"});
    if (exp_hit) begin
      h0 = hdr0_t'(resp_hdr[0]); h1 = hdr1_t'(resp_hdr[1]); h2 = hdr2_t'(resp_hdr[2]);
      chk(h0.ptype == exp_t, {what, ": ACK/NACK"});
      chk(h0.route_lo.ports == exp_p && h0.route_hi == h0.route_lo, {what, ": return links"});
      chk(h0.route_lo.len_m1 == 4'd2 && h0.rank == exp_r, {what, ": length and rank"});
      chk(h1.src == my_cluster && h1.key == k && h2.addr == a, {what, ": key/addr/src"});
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nc_we = 0; am_we = 0; req_valid = 0;
    nc_addr = '0; nc_cached = 0; am_src = '0; am_ports = '0; am_rank = '0;
    req_src = '0; req_addr = '0; req_key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup(16'd7, 32'h0001_0040, 16'h11, 0, PT_ACK, '0, '0, "empty caches miss");
    nc_write(32'h0001_0040, 1);
    nc_write(32'h0002_0080, 0);
    am_write(16'd7, 10'b00_0000_1001, 3'd0);
    am_write(16'd300, 10'b00_0100_0000, 3'd2);
    lookup(16'd7, 32'h0001_0040, 16'h21, 1, PT_ACK,  10'b00_0000_1001, 3'd0, "cached line");
    lookup(16'd300, 32'h0002_0080, 16'h22, 1, PT_NACK, 10'b00_0100_0000, 3'd2, "uncached line");
    lookup(16'd7, 32'h0003_0040, 16'h23, 0, PT_ACK, '0, '0, "other line, same set");
    lookup(16'd8, 32'h0001_0040, 16'h24, 0, PT_ACK, '0, '0, "unknown source");
    // source 7 + 512 maps onto the same Ackmap entry and replaces it
    am_write(16'd519, 10'b10_0000_0000, 3'd1);
    lookup(16'd7, 32'h0001_0040, 16'h25, 0, PT_ACK, '0, '0, "replaced Ackmap entry");
    lookup(16'd519, 32'h0001_0040, 16'h26, 1, PT_ACK, 10'b10_0000_0000, 3'd1, "new Ackmap entry");
    // back-to-back requests
    req_valid = 1; req_src = 16'd300; req_addr = 32'h0001_0040; req_key = 16'h31;
    @(negedge clk);
    req_src = 16'd519; req_addr = 32'h0002_0080; req_key = 16'h32;
    chk(resp_valid && resp_hit && resp_hdr[0][35:33] == PT_ACK, "pipelined 1");
    @(negedge clk);
    req_valid = 0;
    chk(resp_valid && resp_hit && resp_hdr[0][35:33] == PT_NACK &&
        resp_hdr[1][15:0] == 16'h32, "pipelined 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
