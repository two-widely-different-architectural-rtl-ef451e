// bbi_color_channel: one of the R, G, B and A channels of a BBI. Each
// channel has a linear interpolator (the value is advanced by adding its X
// derivative once per pixel), an alpha blending unit, and a selector that
// picks the new pixel value from four candidates: the pixel data delivered
// with the instruction, the interpolator output, the blending unit output,
// or the masked value. That structure follows the published description of
// the BBI. The arithmetic is this design's own:
//   - the value is unsigned 8.12 fixed point, the derivative signed 20.12;
//     the accumulator is 32-bit signed and the 8-bit output saturates at 0
//     and 255;
//   - when use_tex is high (texture-mapped spans) the texel component
//     replaces the interpolated value;
//   - blend = (base*a + old*(256-a)) >> 8 with a = alpha + alpha[7], so
//     alpha 255 gives the new value and 0 keeps the old one;
//   - masked = (pre & mask) | (old & ~mask), where pre is the input pixel
//     data when mask_input is high (bit plane transfer) and base otherwise;
//   - alpha_info = base scaled by coverage when aa is high, base otherwise.
//     The A channel's alpha_info is the blending factor of all channels.
//
// Timing: load sets the accumulator to start at the clock edge; step adds
// delta. All outputs are combinational from the accumulator and the inputs.
module bbi_color_channel
  import bbi_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic        step,
  input  logic [31:0] start,
  input  logic [31:0] delta,
  input  logic [7:0]  input_val,
  input  logic [7:0]  old_val,
  input  logic [7:0]  tex_val,
  input  logic        use_tex,
  input  logic [7:0]  alpha,
  input  logic [7:0]  mask,
  input  logic        mask_input,
  input  logic [7:0]  coverage,
  input  logic        aa,
  input  src_sel_e    src,
  output logic [7:0]  interp_val,
  output logic [7:0]  alpha_info,
  output logic [7:0]  new_val
);
  logic signed [31:0] acc;
  logic [7:0]         base, blend, masked, pre;
  logic [8:0]         a9, c9;
  logic [16:0]        bsum;
  logic [16:0]        cprod;

  always_ff @(posedge clk) begin
    if (load)      acc <= $signed(start);
    else if (step) acc <= acc + $signed(delta);
  end

  // Saturate the integer part to 0..255.
  always_comb begin
    if (acc < 0)                            interp_val = 8'd0;
    else if (acc >= (32'sd256 <<< CFRAC))   interp_val = 8'd255;
    else                                    interp_val = acc[CFRAC +: 8];
  end

  assign base = use_tex ? tex_val : interp_val;

  assign a9    = {1'b0, alpha} + {8'd0, alpha[7]};
  assign bsum  = base * a9 + old_val * (17'd256 - 17'(a9));
  assign blend = bsum[15:8] | {8{bsum[16]}};

  assign pre    = mask_input ? input_val : base;
  assign masked = (pre & mask) | (old_val & ~mask);

  assign c9         = {1'b0, coverage} + {8'd0, coverage[7]};
  assign cprod      = base * c9;
  assign alpha_info = aa ? cprod[15:8] | {8{cprod[16]}} : base;

  always_comb begin
    unique case (src)
      SRC_INPUT:  new_val = input_val;
      SRC_INTERP: new_val = base;
      SRC_BLEND:  new_val = blend;
      SRC_MASKED: new_val = masked;
    endcase
  end
endmodule
