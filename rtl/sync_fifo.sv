// sync_fifo: the first-in first-out buffer placed between the stages of each
// geometry-engine pipeline. Each stage processor reads its input FIFO (the
// output FIFO of the stage before), processes the data and writes its own
// output FIFO. The published size is 512 words of 32 bits; both are
// parameters here.
//
// Interface: valid/ready on both sides. A word is written when wr_valid and
// wr_ready are both high at a clock edge, and read when rd_valid and
// rd_ready are both high. rd_data shows the oldest word whenever rd_valid is
// high (first-word fall-through). A write into an empty FIFO is visible at
// the read side one clock later. A full FIFO raises wr_ready only while a
// word is read in the same clock.
// The reset (synchronous, active low) empties it. The storage is a plain
// array so that it maps onto a dual-port RAM; the occupancy count is kept
// alongside (this design's choice).
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign rd_valid = (count != '0);
  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || rd_ready;
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A write to a full FIFO is only accepted together with a read.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (count == DEPTH[$clog2(DEPTH+1)-1:0] && do_wr) |-> do_rd);

endmodule
