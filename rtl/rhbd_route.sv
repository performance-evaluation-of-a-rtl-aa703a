// rhbd_route: one level of the multicast tree that the reduced hierarchical
// bit-map directory builds on the RDT network.
//
// At a node that owns a rank-i torus, a level of the bit-map has eight bits,
// one per tree child, in the printed order N E W S M SE SW SS (bit 7 = N).
// The eight children are reached in two steps. Step 1, at the node itself:
// copies go to its rank-i neighbours N, E and W, to itself (M) if its bit is
// set, and to the S neighbour whenever any of S, SE, SW or SS is wanted.
// Step 2, at that S neighbour (relay = 1): it keeps a copy if S is set and
// forwards east to SE, west to SW and south to SS, again over rank-i links.
// The result is the set of router output links for this step: the four links
// of the level's torus and, for a local copy, the link of the first
// management processor. The pattern is repeated from the highest rank down
// to rank 0; rank0 = 1 selects the rank-0 torus links (0-3) for the lowest
// level, otherwise the upper-rank links (4-7) are used. The second
// management processor's link is never chosen here. Combinational.
// The bit order, the two steps and which node relays are printed in the
// fat-tree figure; the mapping onto router link numbers is this design's.
module rhbd_route
  import jump1_pkg::*;
(
  input  logic [7:0]        level_map,
  input  logic              relay,
  input  logic              rank0,
  output logic [NPORTS-1:0] ports
);
  logic n, e, w, s, m, se, sw, ss;
  assign {n, e, w, s, m, se, sw, ss} = level_map;

  // the four torus links of this level, in the order N, E, W, S
  logic [3:0] nesw;

  always_comb begin
    nesw  = '0;
    ports = '0;
    if (!relay) begin
      nesw[0] = n;
      nesw[1] = e;
      nesw[2] = w;
      nesw[3] = s | se | sw | ss;
      ports[P_MBP0] = m;
    end else begin
      nesw[1] = se;
      nesw[2] = sw;
      nesw[3] = ss;
      ports[P_MBP0] = s;
    end
    if (rank0) ports[P_RANK0_S:P_RANK0_N] = nesw;
    else       ports[P_UP_S:P_UP_N]       = nesw;
  end
endmodule
