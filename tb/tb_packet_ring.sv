// tb_packet_ring: three packets fit, a fourth waits; packets appear only
// when complete and come out whole and in order under random read stalls.
module tb_packet_ring;
  import jump1_pkg::*;
  localparam int W = FLIT_W;
  logic clk = 0, rst_n = 0;
  logic         wr_valid, wr_last, wr_ready;
  logic [W-1:0] wr_flit;
  logic         rd_valid, rd_last, rd_ready;
  logic [W-1:0] rd_flit;
  int checks = 0, failures = 0;

  packet_ring dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] exp_q [$];
  int           exp_len [$];

  task automatic write_pkt(input int len, input int tag);
    for (int i = 0; i < len; i++) begin
      wr_valid = 1; wr_last = (i == len - 1); wr_flit = W'(tag * 64 + i);
      #1;
      while (!wr_ready) begin @(negedge clk); #1; end
      exp_q.push_back(wr_flit);
      @(negedge clk);
    end
    wr_valid = 0; wr_last = 0;
    exp_len.push_back(len);
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; wr_last = 0; wr_flit = '0; rd_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // a packet is invisible until its last flit is written
    wr_valid = 1; wr_flit = W'(64); wr_last = 0; exp_q.push_back(wr_flit);
    @(negedge clk);
    chk(!rd_valid, "partial packet not visible");
    wr_flit = W'(65); wr_last = 1; exp_q.push_back(wr_flit);
    @(negedge clk);
    wr_valid = 0; wr_last = 0; exp_len.push_back(2);
    chk(rd_valid, "complete packet visible");
    write_pkt(16, 2);
    write_pkt(5, 3);
    chk(!wr_ready, "full after three packets");
    // read everything with random stalls while a fourth packet waits
    fork
      write_pkt(4, 4);
      begin
        automatic int n = 0;
        automatic int pk = 0;
        automatic int k = 0;
        while (pk < 4) begin
          rd_ready = 1'($urandom);
          @(posedge clk);
          if (rd_valid && rd_ready) begin
            chk(rd_flit == exp_q[n], "flit content");
            k++;
            if (rd_last) begin
              chk(k == exp_len[pk], "packet length");
              k = 0;
              pk++;
            end
            n++;
          end
          @(negedge clk);
        end
        rd_ready = 0;
      end
    join
    @(negedge clk);
    chk(!rd_valid && wr_ready, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
