// bbi_pkg: types and constants shared by the raster engine of the graphics
// subsystem (command distributor and bit-blit interpolators, BBI).
//
// An instruction reaches a BBI as a header word followed by NWORDS data
// words; the BBI stores word i in register i of one of its two input register
// files. The seven instructions, the frame-buffer geometry (2048 x 1024 x 32
// bits, 1280 visible columns, the rest texture store) and the 24-bit Z value
// follow the published description. The word layout, the fixed-point formats
// and the register numbering below are this design's own choices.
//
// Header word (register 0):
//   [31:29] opcode     [28:27] new-value source   [26] Z test enable
//   [25]    Z write    [24]    antialias (coverage) [23] Y-major line
//   [22]    X step negative  [21] Y step negative  [20:16] data words
//   [15]    broadcast to all BBIs  [14:10] reserved  [9:0] Y start
package bbi_pkg;

  localparam int unsigned WORD_W     = 32;
  localparam int unsigned NREGS      = 32;   // registers per input register file
  localparam int unsigned N_BBI      = 4;    // BBI chips in the raster engine
  localparam int unsigned FB_COLS    = 2048; // frame buffer columns
  localparam int unsigned FB_ROWS    = 1024; // frame buffer rows
  localparam int unsigned SCREEN_W   = 1280; // visible columns; 1280..2047 hold textures
  localparam int unsigned TEX_W      = FB_COLS - SCREEN_W; // 768
  localparam int unsigned X_W        = 11;
  localparam int unsigned Y_W        = 10;
  localparam int unsigned Z_W        = 24;   // 8-bit base and 16-bit offset
  localparam int unsigned FB_ADDR_W  = 1 + Y_W + X_W; // {buffer, row, column}
  localparam int unsigned Z_ADDR_W   = Y_W + X_W;
  localparam int unsigned CFRAC      = 12;   // fraction bits of colour/alpha values
  localparam int unsigned ZFRAC      = 8;    // fraction bits of Z values
  localparam int unsigned PFRAC      = 16;   // fraction bits of U, V, slope and line minor axis

  typedef enum logic [2:0] {
    OP_SPAN  = 3'd0,  // scan conversion of a general span
    OP_TSPAN = 3'd1,  // scan conversion of a texture-mapped span
    OP_LINE  = 3'd2,  // general (3-D, optionally antialiased) line drawing
    OP_FILL  = 3'd3,  // colour and Z-value fill of a rectangle
    OP_BLT   = 3'd4,  // bit plane and block image transfer
    OP_MASK  = 3'd5,  // mask register load
    OP_RFSH  = 3'd6   // screen refresh counter load
  } opcode_e;

  typedef enum logic [1:0] {
    SRC_INPUT  = 2'd0, // pixel data delivered with the instruction
    SRC_INTERP = 2'd1, // interpolator (or texel) output
    SRC_BLEND  = 2'd2, // alpha blending unit output
    SRC_MASKED = 2'd3  // new value through the plane mask, old value elsewhere
  } src_sel_e;

  typedef struct packed {
    opcode_e           op;
    src_sel_e          src;
    logic              zen;
    logic              zwr;
    logic              aa;
    logic              ymajor;
    logic              xneg;
    logic              yneg;
    logic [4:0]        nwords;
    logic              bcast;
    logic [4:0]        rsvd;
    logic [Y_W-1:0]    y;
  } header_t;

  // Register numbers inside an input register file.
  localparam int unsigned R_HDR   = 0;
  localparam int unsigned R_X     = 1;  // [10:0] X start; OP_MASK: mask; OP_RFSH: [31] buffer, [9:0] row
  localparam int unsigned R_LEN   = 2;  // [11:0] length / width, [27:16] height (fill)
  localparam int unsigned R_R     = 3;  // R, G, B, A(T) start values, unsigned 8.12
  localparam int unsigned R_DR    = 7;  // their X derivatives, signed 20.12
  localparam int unsigned R_Z     = 11; // Z start, unsigned 24.8
  localparam int unsigned R_DZ    = 12; // Z derivative, signed 24.8
  localparam int unsigned R_U     = 13; // U, dU, d2U (signed 16.16)
  localparam int unsigned R_V     = 16; // V, dV, d2V (signed 16.16)
  localparam int unsigned R_SLOPE = 19; // line minor-axis step per pixel, signed 16.16
  localparam int unsigned R_CONST = 20; // pixel word used as the input value outside OP_BLT
  localparam int unsigned R_PIX   = 3;  // OP_BLT: first pixel word
  localparam int unsigned MAX_BLT = NREGS - R_PIX; // 29 pixels per block transfer

  // Packed frame-buffer pixel: alpha in the top byte, then R, G, B.
  function automatic logic [31:0] pack_pixel(logic [7:0] a, logic [7:0] r,
                                             logic [7:0] g, logic [7:0] b);
    return {a, r, g, b};
  endfunction

  // Owner of a screen row: rows are interleaved over the BBIs.
  function automatic logic [1:0] row_owner(logic [Y_W-1:0] y);
    return y[1:0];
  endfunction

  // Memory cycle requested of a frame or Z buffer.
  typedef enum logic [2:0] {
    MC_IDLE  = 3'd0,
    MC_READ  = 3'd1,
    MC_WRITE = 3'd2,
    MC_MREF  = 3'd3, // memory (DRAM) refresh cycle
    MC_XFER  = 3'd4  // display refresh: row transfer to the serial port
  } mem_cycle_e;

endpackage
