// bbi_xy_channel: the XY channel of a BBI. It takes the X, Y start point,
// the span length and (for lines) the slope, and produces the coordinates of
// each pixel in turn, which the address generator turns into memory
// addresses, plus a coverage value used for antialiased lines. These inputs
// and outputs are the ones published for the XY channel; how it steps is
// this design's choice:
//   - rectangle mode (spans, fills, block transfers): X runs from x0 for
//     len pixels; then Y advances by one and X restarts, for rows rows
//     (rows is 1 except for fills);
//   - line mode: the major axis (X, or Y when ymajor) moves one pixel per
//     step, forwards or backwards as xneg/yneg say; the minor axis adds the
//     signed 16.16 slope. The pixel lies at the integer part of the minor
//     coordinate and its coverage is 255 minus the top eight fraction bits,
//     so a line through pixel corners gets full coverage (one pixel per step,
//     no second pixel on the far side: a simplification).
//
// Timing: load takes the operands at the clock edge, step advances to the
// next pixel. x, y, coverage, last (this is the final pixel) and empty
// (length or row count zero) are combinational from the registers.
module bbi_xy_channel
  import bbi_pkg::*;
(
  input  logic           clk,
  input  logic           load,
  input  logic           step,
  input  logic           line,
  input  logic [X_W-1:0] x0,
  input  logic [Y_W-1:0] y0,
  input  logic [11:0]    len,
  input  logic [11:0]    rows,
  input  logic [31:0]    slope,
  input  logic           ymajor,
  input  logic           xneg,
  input  logic           yneg,
  output logic [X_W-1:0] x,
  output logic [Y_W-1:0] y,
  output logic [7:0]     coverage,
  output logic           last,
  output logic           empty
);
  localparam logic signed [31:0] ONE = 32'sd1 <<< PFRAC;

  logic signed [31:0] px, py, slope_r;
  logic [X_W-1:0]     x_start;
  logic [11:0]        len_r, cnt, rows_left;
  logic               line_r, ymajor_r, xneg_r, yneg_r;

  assign x     = px[PFRAC +: X_W];
  assign y     = py[PFRAC +: Y_W];
  assign last  = (cnt == 12'd1) && (rows_left <= 12'd1);
  assign empty = (len_r == '0) || (rows_left == '0);

  always_comb begin
    if (!line_r)     coverage = 8'd255;
    else if (ymajor_r) coverage = ~px[PFRAC-1 -: 8];
    else               coverage = ~py[PFRAC-1 -: 8];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      px        <= 32'(x0) <<< PFRAC;
      py        <= 32'(y0) <<< PFRAC;
      slope_r   <= $signed(slope);
      x_start   <= x0;
      len_r     <= len;
      cnt       <= len;
      rows_left <= line ? 12'd1 : rows;
      line_r    <= line;
      ymajor_r  <= ymajor;
      xneg_r    <= xneg;
      yneg_r    <= yneg;
    end else if (step) begin
      if (line_r) begin
        cnt <= cnt - 1'b1;
        if (ymajor_r) begin
          py <= yneg_r ? py - ONE : py + ONE;
          px <= px + slope_r;
        end else begin
          px <= xneg_r ? px - ONE : px + ONE;
          py <= py + slope_r;
        end
      end else if (cnt == 12'd1) begin
        cnt       <= len_r;
        rows_left <= rows_left - 1'b1;
        px        <= 32'(x_start) <<< PFRAC;
        py        <= py + ONE;
      end else begin
        cnt <= cnt - 1'b1;
        px  <= px + ONE;
      end
    end
  end
endmodule
