// jump1_pkg: sizes, packet header layout and message types shared by the
// RDT router slice and the RDT Interface of the DSM management processor.
//
// A packet is 1..16 flits. On the processor side a flit is 36 bits; each of
// the two bit-sliced router chips carries 18 of them. Every packet starts with
// a 3-flit header. Flit 0 holds the routing field twice, once in each 18-bit
// half, so that both router slices see it and take identical decisions (this
// replication is a choice of this design; the bit-slice mode itself, the
// 16-flit maximum and the 3-flit header follow the source description).
package jump1_pkg;

  localparam int NPORTS    = 10;  // router links: 4 rank-0, 4 upper rank, 2 MBP
  localparam int XBAR_IN   = 11;  // crossbar inputs: 10 links + ack combining input
  localparam int SLICE_W   = 18;  // flit width of one router chip
  localparam int FLIT_W    = 36;  // flit width of a bit-sliced router pair
  localparam int MAX_FLITS = 16;  // maximum packet length
  localparam int HDR_FLITS = 3;   // header length
  localparam int NUM_VC    = 2;   // virtual channels per link

  // Router port numbering (assumed order)
  localparam int P_RANK0_N = 0, P_RANK0_E = 1, P_RANK0_W = 2, P_RANK0_S = 3;
  localparam int P_UP_N    = 4, P_UP_E    = 5, P_UP_W    = 6, P_UP_S    = 7;
  localparam int P_MBP0    = 8, P_MBP1    = 9;

  // Routing field, bits [14:0] of each 18-bit slice of header flit 0.
  typedef struct packed {
    logic [3:0]        len_m1;  // packet length in flits, minus one
    logic              vc;      // virtual channel
    logic [NPORTS-1:0] ports;   // multicast bit-map of output links
  } route_t;                    // 15 bits

  typedef enum logic [2:0] {
    PT_DATA    = 3'd0,  // any packet handled by the MBP core
    PT_COH_REQ = 3'd1,  // coherent message answered by the Ack Generator
    PT_ACK     = 3'd2,  // acknowledgement
    PT_NACK    = 3'd3   // not-acknowledgement
  } ptype_e;

  typedef struct packed {
    ptype_e     ptype;     // [35:33]
    route_t     route_hi;  // [32:18] copy for the upper slice
    logic [2:0] rank;      // [17:15] hierarchy (torus rank) of an ack
    route_t     route_lo;  // [14:0]  copy for the lower slice
  } hdr0_t;

  typedef struct packed {
    logic [15:0] src;      // source cluster number
    logic [3:0]  rsv;
    logic [15:0] key;      // key of the acknowledgement collection
  } hdr1_t;

  typedef struct packed {
    logic [3:0]  rsv;
    logic [31:0] addr;     // DSM address
  } hdr2_t;

  // Interrupt causes raised towards the MBP core
  typedef enum logic [1:0] {
    IRQ_NONE      = 2'd0,
    IRQ_GEN_MISS  = 2'd1,  // Net Cache or Ackmap Cache miss
    IRQ_COL_MISS  = 2'd2,  // Ack Cache miss
    IRQ_COL_DONE  = 2'd3   // all acknowledgements of a key collected
  } irq_e;

  function automatic hdr0_t make_hdr0(ptype_e t, logic [2:0] rank, logic [3:0] len_m1,
                                      logic vc, logic [NPORTS-1:0] ports);
    route_t r;
    r = '{len_m1: len_m1, vc: vc, ports: ports};
    return '{ptype: t, route_hi: r, rank: rank, route_lo: r};
  endfunction

endpackage
