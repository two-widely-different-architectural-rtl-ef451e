// command_distributor: passes BBI instructions to the four BBIs of the
// raster engine. Its sources are the output FIFOs of the geometry engine's
// two pipelines and the image block transfer path (the three inputs drawn in
// the graphics subsystem block diagram); how it routes is this design's
// choice, since only its role is published:
//   - the sources are served round robin, one whole instruction at a time,
//     so the words of one instruction are never mixed with another's;
//   - rows are interleaved over the BBIs (BBI k owns rows y mod 4 = k).
//     Spans, texture-mapped spans and block transfers cover one row and go
//     only to the BBI owning the row given in the header, so four BBIs work
//     on four spans at once. Lines, fills, mask and refresh-counter loads,
//     and any instruction with the header's broadcast bit set, go to all
//     four BBIs, each of which draws only its own rows;
//   - a broadcast word is offered to every target at once and retired when
//     each has taken it; a BBI that took it early is not offered it again.
//
// Timing: choosing the source and target costs one clock per instruction
// (the header is latched then); after that each word moves in the clock
// where the last of its targets is ready. Interface: valid/ready streams,
// in_* from the sources, bbi_* to the BBIs with a shared data bus. Reset
// synchronous, active low.
module command_distributor
  import bbi_pkg::*;
#(
  parameter int unsigned N_IN = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   in_valid,
  output logic [N_IN-1:0]   in_ready,
  input  logic [WORD_W-1:0] in_data [N_IN],
  output logic [N_BBI-1:0]  bbi_valid,
  input  logic [N_BBI-1:0]  bbi_ready,
  output logic [WORD_W-1:0] bbi_data
);
  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic              locked;
  logic [SW-1:0]     src, rr, pick;
  logic              any_valid;
  logic [5:0]        left;      // words of the instruction still to move
  logic [N_BBI-1:0]  tgt, taken, took_now;
  logic              word_done;
  header_t           h;

  // Round-robin choice of the next source, starting at rr.
  always_comb begin
    pick      = rr;
    any_valid = 1'b0;
    for (int k = N_IN - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (int'(rr) + k) % N_IN;
      if (in_valid[idx]) begin
        pick      = SW'(idx);
        any_valid = 1'b1;
      end
    end
  end

  assign h         = header_t'(in_data[pick]);
  assign bbi_data  = in_data[src];
  assign bbi_valid = (locked && in_valid[src]) ? (tgt & ~taken) : '0;
  assign took_now  = bbi_valid & bbi_ready;
  assign word_done = locked && in_valid[src] && ((taken | took_now) == tgt);

  always_comb begin
    in_ready = '0;
    if (word_done) in_ready[src] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      src    <= '0;
      rr     <= '0;
      left   <= '0;
      tgt    <= '0;
      taken  <= '0;
    end else if (!locked) begin
      if (any_valid) begin
        locked <= 1'b1;
        src    <= pick;
        rr     <= (int'(pick) == N_IN - 1) ? '0 : pick + 1'b1;
        left   <= 6'(h.nwords) + 6'd1;
        taken  <= '0;
        if (h.bcast || !(h.op inside {OP_SPAN, OP_TSPAN, OP_BLT}))
          tgt <= '1;
        else
          tgt <= N_BBI'(1) << row_owner(h.y);
      end
    end else if (word_done) begin
      taken <= '0;
      left  <= left - 1'b1;
      if (left == 6'd1) locked <= 1'b0;
    end else begin
      taken <= taken | took_now;
    end
  end

  // A word offered to a BBI stays offered until that BBI takes it.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (locked && in_valid[src] && !word_done) |=> (in_valid[src] && bbi_data == $past(bbi_data)));
endmodule
