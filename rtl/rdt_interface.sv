// rdt_interface: network side of the DSM management processor (MBP-light's
// RDT Interface): packet handler, Ack Generator and Ack Collector.
//
// Every packet from the router is first parsed for its 3-flit header. Then:
//  * a coherent request is answered in hardware by the Ack Generator, which
//    queues an ACK or NACK reply; the request itself is consumed;
//  * an ACK or NACK is counted by the Ack Collector, which may queue one
//    acknowledgement for the next hierarchy up or interrupt the core;
//  * any other packet, and any request or acknowledgement that misses in
//    the caches, goes to the receiver ring for the MBP core; a miss also
//    raises an interrupt.
// Towards the router, generated replies go before packets the core has
// placed in the sender ring; each source sends a whole packet at a time.
//
// Interfaces: rin_*/rout_* are 36-bit flit streams to and from the pair of
// router slices (valid/ready); rx_*/tx_* are flit streams with a last flag to
// the MBP core; nc_*, am_*, ac_* write the Net Cache, Ackmap Cache and Ack
// Cache; irq_* is a one-cycle interrupt pulse with its cause and key.
// Timing: a header-only coherent request whose last flit arrives in cycle t
// has its reply's first flit on rout in cycle t+4 if the link is free.
// The split into packet handler, Ack Generator and Ack Collector, the three
// packet buffers on each side and the hardware/miss behaviour follow the
// source; the classification by a type field, the priorities and the
// interrupt port are choices of this design.
module rdt_interface
  import jump1_pkg::*;
#(
  parameter int NC_ENTRIES = 512,
  parameter int AM_ENTRIES = 512,
  parameter int AC_ENTRIES = 256,
  parameter int RING_SLOTS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       my_cluster,
  // from / to the router pair
  input  logic              rin_valid,
  input  logic [FLIT_W-1:0] rin_flit,
  output logic              rin_ready,
  output logic              rout_valid,
  output logic [FLIT_W-1:0] rout_flit,
  input  logic              rout_ready,
  // MBP core: receiver and sender
  output logic              rx_valid,
  output logic [FLIT_W-1:0] rx_flit,
  output logic              rx_last,
  input  logic              rx_ready,
  input  logic              tx_valid,
  input  logic [FLIT_W-1:0] tx_flit,
  input  logic              tx_last,
  output logic              tx_ready,
  // MBP core: cache maintenance
  input  logic              nc_we,
  input  logic [31:0]       nc_addr,
  input  logic              nc_cached,
  input  logic              am_we,
  input  logic [15:0]       am_src,
  input  logic [NPORTS-1:0] am_ports,
  input  logic [2:0]        am_rank,
  input  logic              ac_we,
  input  logic [2:0]        ac_rank,
  input  logic [15:0]       ac_key,
  input  logic [3:0]        ac_count,
  input  logic              ac_to_core,
  input  logic [NPORTS-1:0] ac_ports,
  input  logic [2:0]        ac_rank_up,
  // MBP core: interrupt
  output logic              irq_valid,
  output irq_e              irq_cause,
  output logic [15:0]       irq_key
);
  typedef enum logic [2:0] {
    R_HDR, R_LOOK_G, R_WAIT_G, R_LOOK_C, R_WAIT_C, R_FWD_HDR, R_FWD_BODY, R_DROP
  } rstate_e;
  typedef enum logic [1:0] {T_IDLE, T_GEN, T_COL, T_SND} tstate_e;

  rstate_e rst_q;
  logic [FLIT_W-1:0] h [HDR_FLITS];
  logic [1:0]  hcnt;
  logic [4:0]  rem;
  hdr0_t h0;
  hdr1_t h1;
  hdr2_t h2;
  assign h0 = hdr0_t'(h[0]);
  assign h1 = hdr1_t'(h[1]);
  assign h2 = hdr2_t'(h[2]);

  // ------------------------------------------------------------ submodules
  logic              g_req, g_resp, g_hit;
  logic [FLIT_W-1:0] g_hdr [HDR_FLITS];
  logic              c_req, c_ready, c_resp, c_miss, c_done, c_core;
  logic [FLIT_W-1:0] c_hdr [HDR_FLITS];

  ack_generator #(.NC_ENTRIES(NC_ENTRIES), .AM_ENTRIES(AM_ENTRIES)) u_gen (
    .clk, .rst_n, .my_cluster,
    .nc_we, .nc_addr, .nc_cached, .am_we, .am_src, .am_ports, .am_rank,
    .req_valid(g_req), .req_src(h1.src), .req_key(h1.key), .req_addr(h2.addr),
    .resp_valid(g_resp), .resp_hit(g_hit), .resp_hdr(g_hdr)
  );

  ack_collector #(.ENTRIES(AC_ENTRIES)) u_col (
    .clk, .rst_n, .my_cluster,
    .reg_we(ac_we), .reg_rank(ac_rank), .reg_key(ac_key), .reg_count(ac_count),
    .reg_to_core(ac_to_core), .reg_ports(ac_ports), .reg_rank_up(ac_rank_up),
    .ack_valid(c_req), .ack_ready(c_ready), .ack_key(h1.key), .ack_rank(h0.rank),
    .ack_nack(h0.ptype == PT_NACK), .ack_addr(h2.addr),
    .resp_valid(c_resp), .resp_miss(c_miss), .resp_done(c_done), .resp_to_core(c_core),
    .resp_hdr(c_hdr)
  );

  logic              rw_valid, rw_last, rw_ready;
  logic [FLIT_W-1:0] rw_flit;
  packet_ring #(.W(FLIT_W), .SLOTS(RING_SLOTS)) u_receiver (
    .clk, .rst_n,
    .wr_valid(rw_valid), .wr_flit(rw_flit), .wr_last(rw_last), .wr_ready(rw_ready),
    .rd_valid(rx_valid), .rd_flit(rx_flit), .rd_last(rx_last), .rd_ready(rx_ready)
  );

  logic              s_valid, s_last, s_ready;
  logic [FLIT_W-1:0] s_flit;
  packet_ring #(.W(FLIT_W), .SLOTS(RING_SLOTS)) u_sender (
    .clk, .rst_n,
    .wr_valid(tx_valid), .wr_flit(tx_flit), .wr_last(tx_last), .wr_ready(tx_ready),
    .rd_valid(s_valid), .rd_flit(s_flit), .rd_last(s_last), .rd_ready(s_ready)
  );

  // ------------------------------------------------------------ reply slots
  logic              gen_full, col_full;
  logic [FLIT_W-1:0] gen_slot [HDR_FLITS];
  logic [FLIT_W-1:0] col_slot [HDR_FLITS];

  // ------------------------------------------------------------ receive FSM
  logic [1:0] fcnt;
  logic       tx_done_gen, tx_done_col;

  always_comb begin
    rin_ready = 1'b0;
    g_req     = 1'b0;
    c_req     = 1'b0;
    rw_valid  = 1'b0;
    rw_flit   = h[fcnt];
    rw_last   = 1'b0;
    unique case (rst_q)
      R_HDR:      rin_ready = 1'b1;
      R_LOOK_G:   g_req = !gen_full;
      R_LOOK_C:   c_req = !col_full;
      R_FWD_HDR:  begin
                    rw_valid = 1'b1;
                    rw_last  = (fcnt == 2'd2) && (rem == '0);
                  end
      R_FWD_BODY: begin
                    rw_valid  = rin_valid;
                    rw_flit   = rin_flit;
                    rw_last   = (rem == 5'd1);
                    rin_ready = rw_ready;
                  end
      R_DROP:     rin_ready = 1'b1;
      default:    ;
    endcase
  end

  hdr0_t      rin_h0;
  logic [4:0] len_in;
  assign rin_h0 = hdr0_t'(rin_flit);
  assign len_in = 5'(rin_h0.route_lo.len_m1) + 5'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_q     <= R_HDR;
      hcnt      <= '0;
      fcnt      <= '0;
      rem       <= '0;
      gen_full  <= 1'b0;
      col_full  <= 1'b0;
      irq_valid <= 1'b0;
      irq_cause <= IRQ_NONE;
      irq_key   <= '0;
      for (int i = 0; i < HDR_FLITS; i++) h[i] <= '0;
    end else begin
      irq_valid <= 1'b0;
      unique case (rst_q)
        R_HDR: if (rin_valid) begin
          h[hcnt] <= rin_flit;
          if (hcnt == 2'd0) rem <= len_in - 5'(HDR_FLITS);
          if (hcnt == 2'(HDR_FLITS - 1)) begin
            hcnt <= '0;
            fcnt <= '0;
            unique case (h0.ptype)
              PT_COH_REQ:      rst_q <= R_LOOK_G;
              PT_ACK, PT_NACK: rst_q <= R_LOOK_C;
              default:         rst_q <= R_FWD_HDR;
            endcase
          end else begin
            hcnt <= hcnt + 1'b1;
          end
        end
        R_LOOK_G: if (!gen_full) rst_q <= R_WAIT_G;
        R_LOOK_C: if (!col_full && c_ready) rst_q <= R_WAIT_C;
        R_WAIT_G: if (g_resp) begin
          if (g_hit) begin
            gen_full <= 1'b1;
            rst_q    <= (rem != '0) ? R_DROP : R_HDR;
          end else begin
            irq_valid <= 1'b1;
            irq_cause <= IRQ_GEN_MISS;
            irq_key   <= h1.key;
            rst_q     <= R_FWD_HDR;
          end
        end
        R_WAIT_C: if (c_resp) begin
          if (c_miss) begin
            irq_valid <= 1'b1;
            irq_cause <= IRQ_COL_MISS;
            irq_key   <= h1.key;
            rst_q     <= R_FWD_HDR;
          end else begin
            if (c_done && c_core) begin
              irq_valid <= 1'b1;
              irq_cause <= IRQ_COL_DONE;
              irq_key   <= h1.key;
            end else if (c_done) begin
              col_full <= 1'b1;
            end
            rst_q <= (rem != '0) ? R_DROP : R_HDR;
          end
        end
        R_FWD_HDR: if (rw_ready) begin
          if (fcnt == 2'(HDR_FLITS - 1)) rst_q <= (rem != '0) ? R_FWD_BODY : R_HDR;
          fcnt <= fcnt + 1'b1;
        end
        R_FWD_BODY: if (rin_valid && rw_ready) begin
          rem <= rem - 1'b1;
          if (rem == 5'd1) rst_q <= R_HDR;
        end
        R_DROP: if (rin_valid) begin
          rem <= rem - 1'b1;
          if (rem == 5'd1) rst_q <= R_HDR;
        end
        default: rst_q <= R_HDR;
      endcase
      if (tx_done_gen) gen_full <= 1'b0;
      if (tx_done_col) col_full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_q == R_WAIT_G && g_resp && g_hit) gen_slot <= g_hdr;
    if (rst_q == R_WAIT_C && c_resp && c_done && !c_core) col_slot <= c_hdr;
  end

  // ------------------------------------------------------------ send FSM
  tstate_e    tst_q;
  logic [1:0] tcnt;

  always_comb begin
    rout_valid = 1'b0;
    rout_flit  = s_flit;
    s_ready    = 1'b0;
    unique case (tst_q)
      T_GEN: begin rout_valid = 1'b1; rout_flit = gen_slot[tcnt]; end
      T_COL: begin rout_valid = 1'b1; rout_flit = col_slot[tcnt]; end
      T_SND: begin rout_valid = s_valid; s_ready = rout_ready; end
      default: ;
    endcase
    tx_done_gen = (tst_q == T_GEN) && rout_ready && (tcnt == 2'(HDR_FLITS - 1));
    tx_done_col = (tst_q == T_COL) && rout_ready && (tcnt == 2'(HDR_FLITS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tst_q <= T_IDLE;
      tcnt  <= '0;
    end else begin
      unique case (tst_q)
        T_IDLE: begin
          tcnt <= '0;
          if (gen_full)     tst_q <= T_GEN;
          else if (col_full) tst_q <= T_COL;
          else if (s_valid)  tst_q <= T_SND;
        end
        T_GEN, T_COL: if (rout_ready) begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == 2'(HDR_FLITS - 1)) tst_q <= T_IDLE;
        end
        T_SND: if (s_valid && rout_ready && s_last) tst_q <= T_IDLE;
        default: tst_q <= T_IDLE;
      endcase
    end
  end

  a_min_len: assert property (@(posedge clk) disable iff (!rst_n)
      (rst_q == R_HDR && rin_valid && hcnt == '0) |-> len_in >= 5'(HDR_FLITS));
endmodule
