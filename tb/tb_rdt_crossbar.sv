// tb_rdt_crossbar: random owner/lock patterns; every output must carry the
// flit, last and VC of its owner when locked and be idle otherwise.
module tb_rdt_crossbar;
  import jump1_pkg::*;
  localparam int NIN = XBAR_IN, NOUT = NPORTS, W = SLICE_W;
  logic                   in_valid [NIN];
  logic [W-1:0]           in_flit  [NIN];
  logic                   in_last  [NIN];
  logic                   in_vc    [NIN];
  logic [$clog2(NIN)-1:0] owner    [NOUT];
  logic [NOUT-1:0]        locked;
  logic                   out_valid[NOUT];
  logic [W-1:0]           out_flit [NOUT];
  logic                   out_last [NOUT];
  logic                   out_vc   [NOUT];
  int checks = 0, failures = 0;

  rdt_crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NIN; i++) begin
        in_valid[i] = 1'($urandom);
        in_flit[i]  = W'($urandom);
        in_last[i]  = 1'($urandom);
        in_vc[i]    = 1'($urandom);
      end
      for (int o = 0; o < NOUT; o++) owner[o] = 4'($urandom_range(NIN - 1));
      locked = NOUT'($urandom);
      #1;
      for (int o = 0; o < NOUT; o++) begin
        automatic int s = owner[o];
        checks++;
        if (out_valid[o] !== (locked[o] && in_valid[s]) ||
            (locked[o] && (out_flit[o] !== in_flit[s] || out_last[o] !== in_last[s] ||
                           out_vc[o] !== in_vc[s]))) begin
          failures++;
          $display("FAIL t=%0d out=%0d owner=%0d", t, o, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
