// ack_collector: combining of returning acknowledgements (Ack Collector).
//
// The Ack Cache has one direct-mapped bank per tree hierarchy: bank 0 for
// acknowledgements travelling on the rank-0 torus, bank 1 for those of the
// upper-rank tori. Before a multicast is sent, the MBP core registers under
// the packet's key the number of acknowledgements expected, and what to do
// when they are all in: either send one acknowledgement further up the tree
// (to the stored output links and rank) or interrupt the core. Each arriving
// ACK or NACK looks its key up and decrements the count. At zero the entry is
// freed and the action taken; a NACK among the collected ones turns the
// upward reply into a NACK. A key that is not in the cache is a miss.
//
// Timing: ack_valid in cycle t is read in t, the count is updated at t+1 and
// resp_valid is high in t+1. ack_ready is low in t+1, so acknowledgements are
// taken at most every second cycle and a read never sees a stale count.
// From the source: key lookup, registered count, decrement, upward ack or
// interrupt at zero, interrupt on miss, direct mapping per hierarchy, the
// 256 entries per bank printed in the block diagram. Own choices: the entry
// layout, the two-bank split by rank, NACK merging, the registration port.
// Several bits of the upward header are fixed (the type's upper bits,
// length, virtual channel, reserved fields), so those outputs never change.
module ack_collector
  import jump1_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int BANKS   = 2,
  parameter int CW      = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       my_cluster,
  // registration by the MBP core
  input  logic              reg_we,
  input  logic [2:0]        reg_rank,     // hierarchy whose acks are counted
  input  logic [15:0]       reg_key,
  input  logic [CW-1:0]     reg_count,
  input  logic              reg_to_core,  // interrupt instead of an upward ack
  input  logic [NPORTS-1:0] reg_ports,    // upward ack: output links
  input  logic [2:0]        reg_rank_up,  // upward ack: its rank
  // arriving acknowledgement
  input  logic              ack_valid,
  output logic              ack_ready,
  input  logic [15:0]       ack_key,
  input  logic [2:0]        ack_rank,
  input  logic              ack_nack,
  input  logic [31:0]       ack_addr,
  // result
  output logic              resp_valid,
  output logic              resp_miss,
  output logic              resp_done,    // count reached zero
  output logic              resp_to_core, // ... and the core is to be told
  output logic [FLIT_W-1:0] resp_hdr [HDR_FLITS]
);
  localparam int IW = $clog2(ENTRIES);
  localparam int TW = 16 - IW;
  localparam int BW = (BANKS > 1) ? $clog2(BANKS) : 1;

  typedef struct packed {
    logic [TW-1:0]     tag;
    logic [CW-1:0]     count;
    logic              to_core;
    logic              nack;
    logic [NPORTS-1:0] ports;
    logic [2:0]        rank_up;
  } entry_t;

  entry_t mem [BANKS][ENTRIES];
  logic [ENTRIES-1:0] vld [BANKS];

  function automatic logic [BW-1:0] bank_of(logic [2:0] r);
    return (r == 3'd0) ? BW'(0) : BW'(BANKS - 1);
  endfunction

  // stage 1 registers
  logic          s1;
  entry_t        e_q;
  logic          v_q;
  logic [BW-1:0] b_q;
  logic [15:0]   key_q;
  logic          nack_q;
  logic [31:0]   addr_q;

  assign ack_ready = !s1;

  logic   hit, zero;
  entry_t e_new;
  always_comb begin
    hit   = v_q && (e_q.tag == key_q[15 -: TW]);
    e_new = e_q;
    e_new.count = e_q.count - 1'b1;
    e_new.nack  = e_q.nack | nack_q;
    zero  = hit && (e_q.count <= CW'(1));
  end

  always_ff @(posedge clk) begin
    if (ack_valid && ack_ready) begin
      e_q    <= mem[bank_of(ack_rank)][ack_key[IW-1:0]];
      v_q    <= vld[bank_of(ack_rank)][ack_key[IW-1:0]];
      b_q    <= bank_of(ack_rank);
      key_q  <= ack_key;
      nack_q <= ack_nack;
      addr_q <= ack_addr;
    end
    if (s1 && hit && !zero) mem[b_q][key_q[IW-1:0]] <= e_new;
    if (reg_we)
      mem[bank_of(reg_rank)][reg_key[IW-1:0]] <=
        '{tag: reg_key[15 -: TW], count: reg_count, to_core: reg_to_core, nack: 1'b0,
          ports: reg_ports, rank_up: reg_rank_up};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      for (int b = 0; b < BANKS; b++) vld[b] <= '0;
    end else begin
      s1 <= ack_valid && ack_ready;
      if (s1 && zero) vld[b_q][key_q[IW-1:0]] <= 1'b0;
      if (reg_we) vld[bank_of(reg_rank)][reg_key[IW-1:0]] <= 1'b1;
    end
  end

  assign resp_valid   = s1;
  assign resp_miss    = s1 && !hit;
  assign resp_done    = s1 && zero;
  assign resp_to_core = s1 && zero && e_q.to_core;

  always_comb begin
    hdr1_t h1;
    hdr2_t h2;
    h1 = '{src: my_cluster, rsv: '0, key: key_q};
    h2 = '{rsv: '0, addr: addr_q};
    resp_hdr[0] = make_hdr0(e_new.nack ? PT_NACK : PT_ACK, e_q.rank_up,
                            4'(HDR_FLITS - 1), 1'b1, e_q.ports);
    resp_hdr[1] = h1;
    resp_hdr[2] = h2;
  end

  // Registration must not hit the entry being updated in the same cycle.
  a_no_reg_clash: assert property (@(posedge clk) disable iff (!rst_n)
      (reg_we && s1) |-> (bank_of(reg_rank) != b_q) || (reg_key[IW-1:0] != key_q[IW-1:0]));
endmodule
