// bbi_z_channel: the Z channel of a BBI. It interpolates the depth of the
// new pixel linearly along the span (value plus X derivative per pixel) and
// compares it with the depth read from the Z buffer to decide whether the
// new colour and Z value are written. The interpolate-and-compare structure
// follows the published description; the rest is this design's choice:
//   - Z is unsigned 24.8 fixed point, the derivative signed 24.8; the
//     24-bit result saturates at 0 and 2^24-1. The stored 24 bits are read
//     as one number, 8-bit base above the 16-bit offset;
//   - a smaller Z is nearer: the test passes when new Z < old Z;
//   - with ztest low the test always passes.
//
// Timing: load/step act at the clock edge; new_z and pass are combinational.
module bbi_z_channel
  import bbi_pkg::*;
(
  input  logic           clk,
  input  logic           load,
  input  logic           step,
  input  logic [31:0]    start,
  input  logic [31:0]    delta,
  input  logic [Z_W-1:0] old_z,
  input  logic           ztest,
  output logic [Z_W-1:0] new_z,
  output logic           pass
);
  logic signed [33:0] acc;

  always_ff @(posedge clk) begin
    if (load)      acc <= $signed({2'b00, start});
    else if (step) acc <= acc + 34'($signed(delta));
  end

  always_comb begin
    if (acc < 0)                                new_z = '0;
    else if (acc >= (34'sd1 <<< (Z_W + ZFRAC))) new_z = '1;
    else                                        new_z = acc[ZFRAC +: Z_W];
  end

  assign pass = !ztest || (new_z < old_z);
endmodule
