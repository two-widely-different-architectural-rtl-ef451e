// bbi_uv_interp: the U, V interpolator of a BBI, which produces the texture
// coordinates of each pixel of a texture-mapped span. As published, U and V
// are interpolated quadratically (the other channels linearly); this design
// does it by forward differencing: per pixel U += dU, then dU += d2U (same
// for V), so U follows a second-order polynomial in the pixel index.
// Values are signed 16.16 fixed point (this design's choice). The texel
// coordinates are the integer parts, clamped to the texture store:
// u to 0..767 (the 768 columns right of the visible screen), v to 0..1023.
//
// Timing: load/step act at the clock edge; u and v are combinational.
module bbi_uv_interp
  import bbi_pkg::*;
(
  input  logic           clk,
  input  logic           load,
  input  logic           step,
  input  logic [31:0]    u0, du0, d2u,
  input  logic [31:0]    v0, dv0, d2v,
  output logic [9:0]     u,
  output logic [Y_W-1:0] v
);
  logic signed [31:0] ua, dua, va, dva;
  logic signed [31:0] d2u_r, d2v_r;

  always_ff @(posedge clk) begin
    if (load) begin
      ua <= $signed(u0);  dua <= $signed(du0);  d2u_r <= $signed(d2u);
      va <= $signed(v0);  dva <= $signed(dv0);  d2v_r <= $signed(d2v);
    end else if (step) begin
      ua  <= ua + dua;
      dua <= dua + d2u_r;
      va  <= va + dva;
      dva <= dva + d2v_r;
    end
  end

  function automatic logic [10:0] clamp(logic signed [31:0] p, int unsigned lim);
    logic signed [15:0] ip;
    ip = p[31:PFRAC];
    if (ip < 0)                        return '0;
    else if (int'(ip) > int'(lim) - 1) return 11'(lim - 1);
    else                               return ip[10:0];
  endfunction

  logic [10:0] uc, vc;
  assign uc = clamp(ua, TEX_W);
  assign vc = clamp(va, FB_ROWS);
  assign u  = uc[9:0];
  assign v  = vc[Y_W-1:0];
endmodule
