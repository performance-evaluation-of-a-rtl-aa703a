// rdt_arbiter: allocates the crossbar outputs of one router slice.
//
// Every output link has a round-robin pointer. In a cycle where an output is
// not carrying a packet, it is granted to the first requesting input (after
// the last winner) whose requested virtual channel has an empty output
// buffer. One input can win several outputs in the same cycle; it then sends
// one stream that the crossbar copies to all of them. A granted output stays
// locked to its owner until the owner signals the last flit (done).
//
// Interface: req_map/req_vc from each input (only while that input is idle),
// out_free per output and VC from the output buffers; grant is combinational
// in the request cycle; owner/locked are registered and steer the crossbar
// from the next cycle on. The source only names the arbiter; the
// round-robin policy and this timing are choices of this design.
module rdt_arbiter
  import jump1_pkg::*;
#(
  parameter int NIN  = XBAR_IN,
  parameter int NOUT = NPORTS,
  parameter int NVC  = NUM_VC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NOUT-1:0]        req_map [NIN],
  input  logic                   req_vc  [NIN],
  input  logic [NVC-1:0]         out_free[NOUT],
  input  logic                   done    [NIN],
  output logic [NOUT-1:0]        grant   [NIN],
  output logic [$clog2(NIN)-1:0] owner   [NOUT],
  output logic [NOUT-1:0]        locked
);
  localparam int IW = $clog2(NIN);

  logic [IW-1:0] ptr [NOUT];
  logic [IW-1:0] win [NOUT];
  logic          win_ok [NOUT];

  always_comb begin
    for (int i = 0; i < NIN; i++) grant[i] = '0;
    for (int o = 0; o < NOUT; o++) begin
      win[o]    = '0;
      win_ok[o] = 1'b0;
      if (!locked[o]) begin
        // scan from ptr+1 around the ring; the first hit wins
        for (int k = NIN; k >= 1; k--) begin
          automatic int i = (int'(ptr[o]) + k) % NIN;
          if (req_map[i][o] && out_free[o][req_vc[i]]) begin
            win[o]    = IW'(i);
            win_ok[o] = 1'b1;
          end
        end
        if (win_ok[o]) grant[win[o]][o] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= '0;
      for (int o = 0; o < NOUT; o++) begin
        ptr[o]   <= IW'(NIN - 1);
        owner[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NOUT; o++) begin
        if (locked[o]) begin
          if (done[owner[o]]) locked[o] <= 1'b0;
        end else if (win_ok[o]) begin
          locked[o] <= 1'b1;
          owner[o]  <= win[o];
          ptr[o]    <= win[o];
        end
      end
    end
  end

  // A granted output must have been free; each output has at most one owner.
  for (genvar o = 0; o < NOUT; o++) begin : g_chk
    a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                  win_ok[o] |-> !locked[o]);
  end
endmodule
