// output_buffer: the output side of one router link.
//
// One packet buffer per virtual channel receives a packet from the crossbar.
// A buffer counts as empty (out_free) only while it holds no packet; the
// arbiter grants a crossbar output only towards an empty buffer, so a write
// never meets a full one. The link drains one packet at a time: it starts as
// soon as the header is in and follows the write pointer, so a packet can
// cut through while the crossbar is still delivering it. The buffer frees
// after its last flit has left. Between the VCs the link alternates
// round-robin at packet boundaries.
//
// Interface: w_* from the crossbar (no back-pressure); out_* is the link,
// valid/ready, one packet at a time. The source shows two output buffers per
// link; their depth, handshake and scheduling are choices of this design.
module output_buffer
  import jump1_pkg::*;
#(
  parameter int W    = SLICE_W,
  parameter int MAXF = MAX_FLITS,
  parameter int NVC  = NUM_VC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           w_valid,
  input  logic [W-1:0]   w_flit,
  input  logic           w_last,
  input  logic           w_vc,
  output logic [NVC-1:0] out_free,
  output logic           out_valid,
  output logic [W-1:0]   out_flit,
  input  logic           out_ready
);
  localparam int PW = $clog2(MAXF + 1);
  localparam int AW = $clog2(MAXF);

  logic [W-1:0]  mem [NVC][MAXF];
  logic [PW-1:0] wr_cnt [NVC];
  logic [NVC-1:0] occ, wdone;

  logic          busy, cur, rr;
  logic [PW-1:0] rd_ptr;
  logic          pick, pick_ok;

  always_comb begin
    if (occ[rr] && wr_cnt[rr] != '0)        begin pick = rr;  pick_ok = 1'b1; end
    else if (occ[!rr] && wr_cnt[!rr] != '0) begin pick = !rr; pick_ok = 1'b1; end
    else                                    begin pick = rr;  pick_ok = 1'b0; end
  end

  assign out_free  = ~occ;
  assign out_valid = busy && (rd_ptr < wr_cnt[cur]);
  assign out_flit  = mem[cur][rd_ptr[AW-1:0]];

  logic last_out;
  assign last_out = out_valid && out_ready && wdone[cur] && (rd_ptr + 1'b1 == wr_cnt[cur]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occ    <= '0;
      wdone  <= '0;
      busy   <= 1'b0;
      cur    <= 1'b0;
      rr     <= 1'b0;
      rd_ptr <= '0;
      for (int v = 0; v < NVC; v++) wr_cnt[v] <= '0;
    end else begin
      if (w_valid) begin
        mem[w_vc][wr_cnt[w_vc][AW-1:0]] <= w_flit;
        wr_cnt[w_vc] <= wr_cnt[w_vc] + 1'b1;
        occ[w_vc]    <= 1'b1;
        if (w_last) wdone[w_vc] <= 1'b1;
      end
      if (!busy) begin
        if (pick_ok) begin
          busy   <= 1'b1;
          cur    <= pick;
          rr     <= !pick;
          rd_ptr <= '0;
        end
      end else if (out_valid && out_ready) begin
        rd_ptr <= rd_ptr + 1'b1;
        if (last_out) begin
          busy        <= 1'b0;
          occ[cur]    <= 1'b0;
          wdone[cur]  <= 1'b0;
          wr_cnt[cur] <= '0;
        end
      end
    end
  end

  // The arbiter only writes into an empty buffer or the one being filled.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  w_valid |-> (wr_cnt[w_vc] < PW'(MAXF)) && !wdone[w_vc]);
endmodule
