// ack_generator: automatic answer to coherent messages (Ack Generator).
//
// Two direct-mapped caches are read in parallel when a coherent request
// arrives. The Net Cache, indexed by the DSM line address, tells whether the
// line is held in this cluster's caches. The Ackmap Cache, indexed by the
// source cluster number, gives the bit-map of the return path (here: the
// router output links and the rank of the reply). If both hit, a 3-flit
// reply header is built: ACK when the line is cached, NACK when it is not.
// A miss in either cache is reported instead, and the caller hands the
// packet to the MBP core and interrupts it.
//
// Timing: req_valid in cycle t gives resp_valid in cycle t+1 (one read of the
// tables). One request per cycle. The cache tables are written by the MBP
// core through nc_we/am_we (entries are valid after the write).
// From the source: the two caches, their keys and contents, 512 entries,
// direct mapping, ACK/NACK selection, miss handling. Own choices: tag
// widths, the 64-byte line offset, reply virtual channel 1, field layout.
// Several reply-header bits are fixed (the type's upper bits, length,
// virtual channel, reserved fields), so those output bits never change.
module ack_generator
  import jump1_pkg::*;
#(
  parameter int NC_ENTRIES = 512,
  parameter int AM_ENTRIES = 512,
  parameter int LINE_OFF   = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       my_cluster,
  // table maintenance
  input  logic              nc_we,
  input  logic [31:0]       nc_addr,
  input  logic              nc_cached,
  input  logic              am_we,
  input  logic [15:0]       am_src,
  input  logic [NPORTS-1:0] am_ports,
  input  logic [2:0]        am_rank,
  // request
  input  logic              req_valid,
  input  logic [15:0]       req_src,
  input  logic [15:0]       req_key,
  input  logic [31:0]       req_addr,
  // response
  output logic              resp_valid,
  output logic              resp_hit,
  output logic [FLIT_W-1:0] resp_hdr [HDR_FLITS]
);
  localparam int NCI = $clog2(NC_ENTRIES);
  localparam int NCT = 32 - NCI - LINE_OFF;
  localparam int AMI = $clog2(AM_ENTRIES);
  localparam int AMT = 16 - AMI;

  typedef struct packed {
    logic [NCT-1:0] tag;
    logic           cached;
  } nc_entry_t;

  typedef struct packed {
    logic [AMT-1:0]    tag;
    logic [NPORTS-1:0] ports;
    logic [2:0]        rank;
  } am_entry_t;

  nc_entry_t nc_mem [NC_ENTRIES];
  am_entry_t am_mem [AM_ENTRIES];
  logic [NC_ENTRIES-1:0] nc_vld;
  logic [AM_ENTRIES-1:0] am_vld;

  function automatic logic [NCI-1:0] nc_idx(logic [31:0] a);
    return a[LINE_OFF +: NCI];
  endfunction
  function automatic logic [NCT-1:0] nc_tag(logic [31:0] a);
    return a[31 -: NCT];
  endfunction

  // table writes
  always_ff @(posedge clk) begin
    if (nc_we) nc_mem[nc_idx(nc_addr)] <= '{tag: nc_tag(nc_addr), cached: nc_cached};
    if (am_we) am_mem[am_src[AMI-1:0]] <= '{tag: am_src[15 -: AMT], ports: am_ports, rank: am_rank};
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nc_vld <= '0;
      am_vld <= '0;
    end else begin
      if (nc_we) nc_vld[nc_idx(nc_addr)] <= 1'b1;
      if (am_we) am_vld[am_src[AMI-1:0]] <= 1'b1;
    end
  end

  // lookup stage
  nc_entry_t  nc_q;
  am_entry_t  am_q;
  logic       nc_v_q, am_v_q;
  logic [15:0] src_q, key_q;
  logic [31:0] addr_q;

  always_ff @(posedge clk) begin
    if (req_valid) begin
      nc_q   <= nc_mem[nc_idx(req_addr)];
      am_q   <= am_mem[req_src[AMI-1:0]];
      nc_v_q <= nc_vld[nc_idx(req_addr)];
      am_v_q <= am_vld[req_src[AMI-1:0]];
      src_q  <= req_src;
      key_q  <= req_key;
      addr_q <= req_addr;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) resp_valid <= 1'b0;
    else        resp_valid <= req_valid;
  end

  logic nc_hit, am_hit;
  assign nc_hit   = nc_v_q && (nc_q.tag == nc_tag(addr_q));
  assign am_hit   = am_v_q && (am_q.tag == src_q[15 -: AMT]);
  assign resp_hit = nc_hit && am_hit;

  always_comb begin
    hdr1_t h1;
    hdr2_t h2;
    h1 = '{src: my_cluster, rsv: '0, key: key_q};
    h2 = '{rsv: '0, addr: addr_q};
    resp_hdr[0] = make_hdr0(nc_q.cached ? PT_ACK : PT_NACK, am_q.rank,
                            4'(HDR_FLITS - 1), 1'b1, am_q.ports);
    resp_hdr[1] = h1;
    resp_hdr[2] = h2;
  end
endmodule
