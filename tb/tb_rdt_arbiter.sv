// tb_rdt_arbiter: directed checks of output allocation: one winner per
// output, lock until the owner's last flit, round-robin order, the VC-free
// mask and several outputs won by one input in one cycle.
module tb_rdt_arbiter;
  import jump1_pkg::*;
  localparam int NIN = XBAR_IN, NOUT = NPORTS;
  logic clk = 0, rst_n = 0;
  logic [NOUT-1:0]        req_map [NIN];
  logic                   req_vc  [NIN];
  logic [NUM_VC-1:0]      out_free[NOUT];
  logic                   done    [NIN];
  logic [NOUT-1:0]        grant   [NIN];
  logic [$clog2(NIN)-1:0] owner   [NOUT];
  logic [NOUT-1:0]        locked;
  int checks = 0, failures = 0;

  rdt_arbiter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle_all();
    for (int i = 0; i < NIN; i++) begin req_map[i] = '0; req_vc[i] = 0; done[i] = 0; end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle_all();
    for (int o = 0; o < NOUT; o++) out_free[o] = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // two inputs want output 3
    @(negedge clk);
    req_map[2] = 10'b1 << 3; req_map[5] = 10'b1 << 3;
    #1 chk(grant[2] == (10'b1 << 3) && grant[5] == '0, "first winner is input 2");
    @(negedge clk);
    req_map[2] = '0;                                   // input 2 now busy
    chk(locked[3] && owner[3] == 2, "output 3 locked to 2");
    #1 chk(grant[5] == '0, "no grant while locked");
    repeat (3) begin @(negedge clk); #1 chk(grant[5] == '0 && locked[3], "lock holds"); end
    done[2] = 1;
    @(negedge clk);
    done[2] = 0;
    chk(!locked[3], "unlocked after done");
    #1 chk(grant[5] == (10'b1 << 3), "input 5 wins next");
    @(negedge clk);
    req_map[5] = '0;
    done[5] = 1;
    @(negedge clk);
    done[5] = 0;
    // round robin: pointer at 5, both ask again -> 2 wins (after wrap)... but 7 also asks
    req_map[2] = 10'b1 << 3; req_map[5] = 10'b1 << 3; req_map[7] = 10'b1 << 3;
    #1 chk(grant[7] == (10'b1 << 3) && grant[2] == '0 && grant[5] == '0, "round robin picks 7");
    @(negedge clk);
    idle_all();
    done[7] = 1;
    @(negedge clk);
    idle_all();
    // VC-free mask
    out_free[0] = 2'b01;
    req_map[1] = 10'b1; req_vc[1] = 1;
    #1 chk(grant[1] == '0, "VC1 buffer full: no grant");
    out_free[0] = 2'b11;
    #1 chk(grant[1] == 10'b1, "VC1 buffer free: grant");
    @(negedge clk);
    idle_all();
    done[1] = 1;
    @(negedge clk);
    idle_all();
    // multicast: one input wins three outputs at once
    req_map[7] = 10'b10_0000_0011;
    #1 chk(grant[7] == 10'b10_0000_0011, "three outputs granted together");
    @(negedge clk);
    idle_all();
    chk(locked == 10'b10_0000_0011 && owner[0] == 7 && owner[1] == 7 && owner[9] == 7,
        "all three locked to input 7");
    done[7] = 1;
    @(negedge clk);
    idle_all();
    chk(locked == '0, "all released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
