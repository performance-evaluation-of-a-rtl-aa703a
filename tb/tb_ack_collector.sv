// tb_ack_collector: registered counts are decremented per acknowledgement;
// the last one frees the entry and either builds one upward acknowledgement
// (NACK if any NACK was collected) or flags the core; unknown keys miss;
// the rank selects the bank; acknowledgements are taken every other cycle.
module tb_ack_collector;
  import jump1_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] my_cluster = 16'h0005;
  logic reg_we, reg_to_core, ack_valid, ack_ready, ack_nack;
  logic [2:0] reg_rank, reg_rank_up, ack_rank;
  logic [15:0] reg_key, ack_key;
  logic [3:0] reg_count;
  logic [NPORTS-1:0] reg_ports;
  logic [31:0] ack_addr;
  logic resp_valid, resp_miss, resp_done, resp_to_core;
  logic [FLIT_W-1:0] resp_hdr [HDR_FLITS];
  int checks = 0, failures = 0;

  ack_collector dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic register(input logic [2:0] rank, input logic [15:0] key, input int cnt,
                          input bit core, input logic [NPORTS-1:0] p, input logic [2:0] up);
    reg_we = 1; reg_rank = rank; reg_key = key; reg_count = 4'(cnt);
    reg_to_core = core; reg_ports = p; reg_rank_up = up;
    @(negedge clk);
    reg_we = 0;
  endtask

  // send one acknowledgement and return what came back
  task automatic ack(input logic [2:0] rank, input logic [15:0] key, input bit nack,
                     output bit miss, output bit done, output bit core);
    ack_valid = 1; ack_rank = rank; ack_key = key; ack_nack = nack; ack_addr = 32'hABC0;
    #1 chk(ack_ready, "ready when idle");
    @(negedge clk);
    ack_valid = 0;
    chk(resp_valid && !ack_ready, "response one cycle later, busy");
    miss = resp_miss; done = resp_done; core = resp_to_core;
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m, d, c;
    hdr0_t h0;
    reg_we = 0; ack_valid = 0; ack_nack = 0; ack_rank = '0; ack_key = '0; ack_addr = '0;
    reg_rank = '0; reg_key = '0; reg_count = '0; reg_to_core = 0; reg_ports = '0; reg_rank_up = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ack(3'd0, 16'h1234, 0, m, d, c);
    chk(m, "unknown key misses");
    @(negedge clk);
    // three rank-0 acknowledgements, then one upward ACK on links 4 and 5
    register(3'd0, 16'h1234, 3, 0, 10'b00_0011_0000, 3'd1);
    for (int i = 0; i < 3; i++) begin
      ack(3'd0, 16'h1234, 0, m, d, c);
      chk(!m && (d == (i == 2)) && !c, "count down rank-0");
      if (i == 2) begin
        h0 = hdr0_t'(resp_hdr[0]);
        chk(h0.ptype == PT_ACK && h0.route_lo.ports == 10'b00_0011_0000 && h0.rank == 3'd1,
            "upward ACK header");
        chk(resp_hdr[1][15:0] == 16'h1234 && resp_hdr[1][35:20] == my_cluster,
            "upward ACK key and source");
      end
      @(negedge clk);
    end
    ack(3'd0, 16'h1234, 0, m, d, c);
    chk(m, "entry freed after completion");
    @(negedge clk);
    // same key on the upper bank is separate; one NACK makes the upward reply a NACK
    register(3'd2, 16'h1234, 2, 0, 10'b00_0100_0000, 3'd3);
    register(3'd0, 16'h1234, 1, 1, '0, '0);
    ack(3'd2, 16'h1234, 1, m, d, c);
    chk(!m && !d, "upper bank first");
    @(negedge clk);
    ack(3'd0, 16'h1234, 0, m, d, c);
    chk(!m && d && c, "rank-0 entry completes to the core");
    @(negedge clk);
    ack(3'd1, 16'h1234, 0, m, d, c);
    chk(!m && d && !c && resp_hdr[0][35:33] == PT_NACK, "NACK merged upward");
    @(negedge clk);
    // tag mismatch in the same set
    register(3'd0, 16'h0134, 1, 1, '0, '0);
    ack(3'd0, 16'h1334, 0, m, d, c);
    chk(m, "tag mismatch misses");
    @(negedge clk);
    ack(3'd0, 16'h0134, 0, m, d, c);
    chk(!m && d && c, "right tag completes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
