// packet_ring: a ring of three whole-packet buffers, as used by the receiver
// and by the sender of the RDT Interface packet handler.
//
// The writer fills the slot at the write pointer flit by flit; the flit
// marked last closes the slot and the pointer moves on around the ring. The
// reader sees a packet only once it is complete (store and forward) and
// empties slots in the same order. A new packet is accepted while fewer
// than SLOTS packets are stored.
//
// Interface: wr_* and rd_* are valid/ready flit streams with a last flag.
// The three slots are printed in the interface block diagram ("x3"); the
// slot depth is the maximum packet length; everything else is this design's.
module packet_ring
  import jump1_pkg::*;
#(
  parameter int W     = FLIT_W,
  parameter int SLOTS = 3,
  parameter int MAXF  = MAX_FLITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_flit,
  input  logic         wr_last,
  output logic         wr_ready,
  output logic         rd_valid,
  output logic [W-1:0] rd_flit,
  output logic         rd_last,
  input  logic         rd_ready
);
  localparam int SW = $clog2(SLOTS);
  localparam int AW = $clog2(MAXF);
  localparam int PW = $clog2(MAXF + 1);

  logic [W-1:0]  mem [SLOTS][MAXF];
  logic [PW-1:0] slot_len [SLOTS];
  logic [SW-1:0] wp, rp;
  logic [PW-1:0] wptr, rptr;
  logic [$clog2(SLOTS+1)-1:0] count;

  function automatic logic [SW-1:0] nxt(logic [SW-1:0] p);
    return (p == SW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  assign wr_ready = (count < ($clog2(SLOTS+1))'(SLOTS));
  assign rd_valid = (count != '0);
  assign rd_flit  = mem[rp][rptr[AW-1:0]];
  assign rd_last  = (rptr + 1'b1 == slot_len[rp]);

  logic push, pop;
  assign push = wr_valid && wr_ready && wr_last;
  assign pop  = rd_valid && rd_ready && rd_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; wptr <= '0; rptr <= '0; count <= '0;
      for (int s = 0; s < SLOTS; s++) slot_len[s] <= '0;
    end else begin
      if (wr_valid && wr_ready) begin
        mem[wp][wptr[AW-1:0]] <= wr_flit;
        if (wr_last) begin
          slot_len[wp] <= wptr + 1'b1;
          wptr <= '0;
          wp   <= nxt(wp);
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (rd_valid && rd_ready) begin
        if (rd_last) begin
          rptr <= '0;
          rp   <= nxt(rp);
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  a_max_len: assert property (@(posedge clk) disable iff (!rst_n)
                              (wr_valid && wr_ready && wptr == PW'(MAXF - 1)) |-> wr_last);
endmodule
