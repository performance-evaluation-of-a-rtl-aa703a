// rdt_crossbar: the 11 x 10 crossbar of one router slice.
//
// Each of the ten outputs is a multiplexer over the eleven inputs (ten link
// packet managers and the ack combining input). An output follows the input
// the arbiter locked it to; an unlocked output carries nothing. An input that
// owns several outputs is copied to all of them, which is how a multicast
// packet leaves to several links at once. Purely combinational.
// The 11 x 10 shape is printed in the router block diagram (the text says
// 10 x 10 for the link count alone; the eleventh input is the combining
// cache's); flit width, last and VC tags are this design's.
module rdt_crossbar
  import jump1_pkg::*;
#(
  parameter int NIN  = XBAR_IN,
  parameter int NOUT = NPORTS,
  parameter int W    = SLICE_W
) (
  input  logic                   in_valid [NIN],
  input  logic [W-1:0]           in_flit  [NIN],
  input  logic                   in_last  [NIN],
  input  logic                   in_vc    [NIN],
  input  logic [$clog2(NIN)-1:0] owner    [NOUT],
  input  logic [NOUT-1:0]        locked,
  output logic                   out_valid[NOUT],
  output logic [W-1:0]           out_flit [NOUT],
  output logic                   out_last [NOUT],
  output logic                   out_vc   [NOUT]
);
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out_valid[o] = locked[o] && in_valid[owner[o]];
      out_flit[o]  = in_flit[owner[o]];
      out_last[o]  = in_last[owner[o]];
      out_vc[o]    = in_vc[owner[o]];
    end
  end
endmodule
