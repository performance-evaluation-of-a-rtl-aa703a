// tb_output_buffer: packets written on both VCs under a random link ready
// must leave whole, one packet at a time, in the order they became ready;
// out_free must drop with the first written flit and rise after the last
// flit has left; cut-through must start before the write has finished.
module tb_output_buffer;
  import jump1_pkg::*;
  localparam int W = SLICE_W;
  logic clk = 0, rst_n = 0;
  logic           w_valid, w_last, w_vc;
  logic [W-1:0]   w_flit;
  logic [NUM_VC-1:0] out_free;
  logic           out_valid, out_ready;
  logic [W-1:0]   out_flit;
  int checks = 0, failures = 0;

  output_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] exp_q [$];
  logic [W-1:0] got_q [$];
  bit  rand_ready = 0;
  int  first_out_t = -1;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got_q.push_back(out_flit);
      if (first_out_t < 0) first_out_t = $time;
    end
  end
  always @(negedge clk) out_ready <= rand_ready ? 1'($urandom) : 1'b1;

  task automatic write_pkt(input bit vc, input int len, input int tag);
    for (int i = 0; i < len; i++) begin
      w_valid = 1; w_vc = vc; w_last = (i == len - 1);
      w_flit  = W'(tag * 32 + i);
      exp_q.push_back(w_flit);
      @(negedge clk);
    end
    w_valid = 0; w_last = 0;
  endtask

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wstart;
    w_valid = 0; w_last = 0; w_vc = 0; w_flit = '0; out_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(out_free == 2'b11, "both VCs free after reset");
    wstart = $time;
    fork
      write_pkt(0, 8, 1);
      begin @(negedge clk); chk(out_free == 2'b10, "VC0 taken by the first flit"); end
    join
    chk(first_out_t >= 0 && first_out_t < wstart + 8 * 10, "cut-through starts before the write ends");
    repeat (12) @(negedge clk);
    chk(out_free == 2'b11, "VC0 free after the last flit left");
    // both VCs loaded, random back-pressure
    rand_ready = 1;
    write_pkt(1, 3, 2);
    write_pkt(0, 16, 3);
    repeat (80) @(negedge clk);
    chk(out_free == 2'b11, "all drained");
    chk(got_q.size() == exp_q.size(), "flit count");
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      chk(got_q[i] == exp_q[i], "flit order and content");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
