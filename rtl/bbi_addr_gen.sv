// bbi_addr_gen: the address generator of a BBI. It forms the row and column
// addresses of the frame buffer and Z buffer for the current pixel, the
// address of the texel in the texture store, and selects which of the two
// frame buffers is drawn into and which is refreshed to the screen (double
// buffering). It also holds the screen refresh counter, loaded by the
// "screen refresh counter load" instruction and advanced by one row for every
// display refresh transfer. Those duties follow the published description;
// the address layout is this design's choice:
//   - frame buffer address = {buffer, row y, column x} (1 + 10 + 11 bits);
//   - Z buffer address     = {row y, column x}; only columns below 1280
//     have a Z value;
//   - texel address        = {drawing buffer, row v, column 1280 + u};
//   - rows are interleaved over the four BBIs: this BBI owns rows with
//     y mod 4 = BBI_ID, and draws only those. Columns 1280..2047 (texture
//     store) are written by every BBI, so each holds a full texture copy;
//   - loading the refresh counter also sets the displayed buffer; the
//     drawing buffer is always the other one.
//
// Timing: rfsh_load and xfer_step act at the clock edge; the addresses are
// combinational. Reset (synchronous, active low) displays buffer 0 from row 0.
module bbi_addr_gen
  import bbi_pkg::*;
#(
  parameter logic [1:0] BBI_ID = 2'd0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [X_W-1:0]       x,
  input  logic [Y_W-1:0]       y,
  input  logic [9:0]           u,
  input  logic [Y_W-1:0]       v,
  input  logic                 rfsh_load,
  input  logic                 rfsh_buf,
  input  logic [Y_W-1:0]       rfsh_row,
  input  logic                 xfer_step,
  output logic [FB_ADDR_W-1:0] fb_addr,
  output logic [Z_ADDR_W-1:0]  z_addr,
  output logic [FB_ADDR_W-1:0] tex_addr,
  output logic [FB_ADDR_W-1:0] xfer_addr,
  output logic                 on_screen,
  output logic                 owned,
  output logic                 disp_buf,
  output logic                 draw_buf
);
  logic [Y_W-1:0] row_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      disp_buf <= 1'b0;
      row_cnt  <= '0;
    end else if (rfsh_load) begin
      disp_buf <= rfsh_buf;
      row_cnt  <= rfsh_row;
    end else if (xfer_step) begin
      row_cnt  <= row_cnt + 1'b1;
    end
  end

  assign draw_buf  = !disp_buf;
  assign on_screen = (x < X_W'(SCREEN_W));
  assign owned     = !on_screen || (row_owner(y) == BBI_ID);
  assign fb_addr   = {draw_buf, y, x};
  assign z_addr    = {y, x};
  assign tex_addr  = {draw_buf, v, X_W'(X_W'(SCREEN_W) + X_W'(u))};
  assign xfer_addr = {disp_buf, row_cnt, X_W'(0)};
endmodule
