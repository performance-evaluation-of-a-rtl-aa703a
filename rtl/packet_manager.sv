// packet_manager: input side of one router link (the "Packet Manager" of the
// router chip).
//
// Each virtual channel owns a buffer that holds one packet of the maximum
// size, so a packet blocked downstream is parked entirely inside the chip.
// The routing field of the header loads a multicast bit-map of the output
// links that still need a copy. Whenever the arbiter finds some of the
// wanted output buffers empty, the packet is streamed through the crossbar to
// all of them at once and their bits are cleared; the rest is sent later.
// The buffer is released when the bit-map is empty. Forwarding may start as
// soon as the header is stored, while the body is still arriving (wormhole
// style); the read pointer simply waits for the write pointer.
//
// Interface: in_* is the link (valid/ready, one packet at a time, a new
// packet is accepted only if its VC buffer is free). req_map/req_vc go to the
// arbiter while the read side is idle; grant returns in the same cycle and
// the transfer starts in the next one. x_* feeds one crossbar input and is
// never back-pressured, because only empty output buffers are granted.
// From the source: one max-size buffer per VC, the bit-map and its clearing.
// Own choices: handshake, VC taken from the header, round-robin between VCs.
module packet_manager
  import jump1_pkg::*;
#(
  parameter int W         = SLICE_W,
  parameter int MAXF      = MAX_FLITS,
  parameter int NVC       = NUM_VC,
  parameter int NOUT      = NPORTS
) (
  input  logic            clk,
  input  logic            rst_n,
  // link input
  input  logic            in_valid,
  input  logic [W-1:0]    in_flit,
  output logic            in_ready,
  // arbiter
  output logic [NOUT-1:0] req_map,
  output logic            req_vc,
  input  logic [NOUT-1:0] grant,
  // crossbar input
  output logic            x_valid,
  output logic [W-1:0]    x_flit,
  output logic            x_last,
  output logic            x_vc
);
  localparam int PW = $clog2(MAXF + 1);

  logic [W-1:0]    mem [NVC][MAXF];
  logic [PW-1:0]   wr_cnt [NVC];
  logic [PW-1:0]   len    [NVC];
  logic [NOUT-1:0] map    [NVC];
  logic [NVC-1:0]  occ;

  // input side
  logic            in_busy;
  logic            in_vc;
  route_t          in_route;
  assign in_route = route_t'(in_flit[14:0]);

  always_comb begin
    if (in_busy) in_ready = 1'b1;
    else         in_ready = !occ[in_route.vc];
  end

  // read side
  logic            rd_busy, rd_vc, rr;
  logic [PW-1:0]   rd_ptr;
  logic [NOUT-1:0] gmap;
  logic            cand_ok [NVC];
  logic            pick;
  logic            pick_ok;

  always_comb begin
    for (int v = 0; v < NVC; v++)
      cand_ok[v] = occ[v] && (map[v] != '0) && (wr_cnt[v] != '0);
    if (cand_ok[rr])       begin pick = rr;  pick_ok = 1'b1; end
    else if (cand_ok[!rr]) begin pick = !rr; pick_ok = 1'b1; end
    else                   begin pick = rr;  pick_ok = 1'b0; end
    req_vc  = pick;
    req_map = (!rd_busy && pick_ok) ? map[pick] : '0;
  end

  assign x_valid = rd_busy && (rd_ptr < wr_cnt[rd_vc]);
  assign x_flit  = mem[rd_vc][rd_ptr[$clog2(MAXF)-1:0]];
  assign x_last  = (rd_ptr == len[rd_vc] - 1'b1);
  assign x_vc    = rd_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ     <= '0;
      in_busy <= 1'b0;
      in_vc   <= 1'b0;
      rd_busy <= 1'b0;
      rd_vc   <= 1'b0;
      rr      <= 1'b0;
      rd_ptr  <= '0;
      gmap    <= '0;
      for (int v = 0; v < NVC; v++) begin
        wr_cnt[v] <= '0;
        len[v]    <= '0;
        map[v]    <= '0;
      end
    end else begin
      // ---- write side
      if (in_valid && in_ready) begin
        if (!in_busy) begin
          mem[in_route.vc][0] <= in_flit;
          wr_cnt[in_route.vc] <= PW'(1);
          len[in_route.vc]    <= PW'(in_route.len_m1) + 1'b1;
          map[in_route.vc]    <= in_route.ports;
          occ[in_route.vc]    <= 1'b1;
          in_vc               <= in_route.vc;
          in_busy             <= (in_route.len_m1 != '0);
        end else begin
          mem[in_vc][wr_cnt[in_vc][$clog2(MAXF)-1:0]] <= in_flit;
          wr_cnt[in_vc] <= wr_cnt[in_vc] + 1'b1;
          if (wr_cnt[in_vc] + 1'b1 == len[in_vc]) in_busy <= 1'b0;
        end
      end
      // ---- read side
      if (!rd_busy) begin
        if (grant != '0) begin
          rd_busy <= 1'b1;
          rd_vc   <= pick;
          rr      <= !pick;
          gmap    <= grant;
          rd_ptr  <= '0;
        end
      end else if (x_valid) begin
        rd_ptr <= rd_ptr + 1'b1;
        if (x_last) begin
          rd_busy <= 1'b0;
          map[rd_vc] <= map[rd_vc] & ~gmap;
          if ((map[rd_vc] & ~gmap) == '0) occ[rd_vc] <= 1'b0;
        end
      end
    end
  end

  // Grants stay inside the request.
  a_grant_in_req: assert property (@(posedge clk) disable iff (!rst_n)
                                   (grant & ~req_map) == '0);
endmodule
