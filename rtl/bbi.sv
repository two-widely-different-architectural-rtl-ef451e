// bbi: one bit-blit interpolator, the rendering chip of the raster engine.
// It receives instructions (spans, texture-mapped spans, lines, fills,
// block transfers, mask and refresh-counter loads) from the command
// distributor, interpolates the pixel values of each, and reads and writes
// its own frame buffer and Z buffer. Its parts are those of the published
// block diagram: two input register files filled by the command input state
// machine while the command execution state machine works from the other;
// R, G, B and A channels (interpolator, alpha blending, four-way new-value
// select); a Z channel with depth compare; a quadratic U, V interpolator; an
// XY channel; an address generator with double-buffer select; a memory
// interface that also runs memory and display refresh cycles.
//
// This design's own choices, beyond those of its parts: the pixel word is
// {A, R, G, B}; the plane mask register (reset to all ones) masks by byte
// lane, one byte per channel; the A channel's alpha output (scaled by line
// coverage when antialiasing) is the blending factor of all four channels;
// for a texture-mapped span the texel comes from the drawing buffer's
// texture store; the input pixel value is register R_PIX + pixel index for a
// block transfer and register R_CONST otherwise. The interrupt request of the
// system controller drawn in the block diagram is taken to be the memory
// refresh (mref_req) and display refresh (dref_req) requests.
//
// Interface: cmd_valid/cmd_ready/cmd_data word stream from the command
// distributor; frame/Z buffer ports with a cycle type per clock and read
// data one clock after a read (see bbi_mem_if); busy is high while an
// instruction is held or running; disp_buf is the frame buffer being
// displayed (the other one is drawn into). Reset synchronous, active low.
module bbi
  import bbi_pkg::*;
#(
  parameter logic [1:0] BBI_ID = 2'd0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [WORD_W-1:0]    cmd_data,
  input  logic                 mref_req,
  input  logic                 dref_req,
  output mem_cycle_e           fb_cyc,
  output logic [FB_ADDR_W-1:0] fb_maddr,
  output logic [31:0]          fb_mwdata,
  input  logic [31:0]          fb_mrdata,
  output mem_cycle_e           z_cyc,
  output logic [Z_ADDR_W-1:0]  z_maddr,
  output logic [Z_W-1:0]       z_mwdata,
  input  logic [Z_W-1:0]       z_mrdata,
  output logic                 disp_buf,
  output logic                 busy
);
  // ---------------- instruction fetch ----------------
  logic                     load, load_bank, rbank;
  logic [$clog2(NREGS)-1:0] load_idx;
  logic [WORD_W-1:0]        load_data;
  logic [1:0]               ready, done;
  logic [WORD_W-1:0]        regs [NREGS];
  header_t                  hdr;

  bbi_cmd_input_fsm u_in (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_data,
    .load, .load_bank, .load_idx, .load_data, .ready, .done
  );

  bbi_input_regfile u_rf (
    .clk, .we(load), .wbank(load_bank), .widx(load_idx), .wdata(load_data),
    .rbank, .rregs(regs)
  );

  assign hdr = header_t'(regs[R_HDR]);

  // ---------------- execution control ----------------
  logic       xy_last, xy_empty, owned, on_screen, z_pass;
  logic       ch_load, ch_step, mask_load, rfsh_load;
  logic [4:0] pix_idx;
  logic       mem_req, fb_sel_tex, tex_issue, old_issue, gnt;
  mem_cycle_e fb_op, z_op;

  bbi_cmd_exec_fsm u_exec (
    .clk, .rst_n, .ready, .done, .rbank, .hdr,
    .xy_last, .xy_empty, .owned, .on_screen, .z_pass,
    .ch_load, .ch_step, .mask_load, .rfsh_load, .pix_idx,
    .mem_req, .fb_op, .z_op, .fb_sel_tex, .tex_issue, .old_issue, .gnt, .busy
  );

  // ---------------- memory read data capture ----------------
  logic [31:0]    fb_rdata, old_r, tex_r, old_px, tex_px;
  logic [Z_W-1:0] z_rdata, oldz_r, old_z;
  logic           old_fresh, tex_fresh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      old_fresh <= 1'b0;
      tex_fresh <= 1'b0;
    end else begin
      old_fresh <= old_issue && gnt;
      tex_fresh <= tex_issue && gnt;
    end
    if (old_fresh) begin
      old_r  <= fb_rdata;
      oldz_r <= z_rdata;
    end
    if (tex_fresh) tex_r <= fb_rdata;
  end

  assign old_px = old_fresh ? fb_rdata : old_r;
  assign old_z  = old_fresh ? z_rdata  : oldz_r;
  assign tex_px = tex_fresh ? fb_rdata : tex_r;

  // ---------------- plane mask register ----------------
  logic [31:0] mask;
  always_ff @(posedge clk) begin
    if (!rst_n)         mask <= '1;
    else if (mask_load) mask <= regs[R_X];
  end

  // ---------------- channels ----------------
  logic        is_fill;
  logic [31:0] in_pix;
  logic [7:0]  coverage;
  logic [7:0]  a_info;
  logic [7:0]  new_c [4];   // A, R, G, B
  logic [7:0]  info [4];

  assign is_fill = (hdr.op == OP_FILL);
  assign in_pix  = (hdr.op == OP_BLT) ? regs[5'(R_PIX) + pix_idx] : regs[R_CONST];

  // Channel c = 0..3 is A, R, G, B: byte lane 3-c of the pixel word; its
  // start value is register R_R + (c+3)%4 (R, G, B, A order in the file).
  for (genvar c = 0; c < 4; c++) begin : g_ch
    localparam int unsigned LANE = 3 - c;
    localparam int unsigned REG  = (c == 0) ? 3 : c - 1;
    bbi_color_channel u_ch (
      .clk,
      .load      (ch_load),
      .step      (ch_step),
      .start     (regs[R_R + REG]),
      .delta     (is_fill ? 32'd0 : regs[R_DR + REG]),
      .input_val (in_pix[8*LANE +: 8]),
      .old_val   (old_px[8*LANE +: 8]),
      .tex_val   (tex_px[8*LANE +: 8]),
      .use_tex   (hdr.op == OP_TSPAN),
      .alpha     (a_info),
      .mask      (mask[8*LANE +: 8]),
      .mask_input(hdr.op == OP_BLT),
      .coverage  (c == 0 ? coverage : 8'd255),
      .aa        (c == 0 ? hdr.aa : 1'b0),
      .src       (hdr.src),
      .interp_val(),
      .alpha_info(info[c]),
      .new_val   (new_c[c])
    );
  end

  assign a_info = info[0];

  logic [Z_W-1:0] new_z;
  bbi_z_channel u_z (
    .clk, .load(ch_load), .step(ch_step),
    .start(regs[R_Z]), .delta(is_fill ? 32'd0 : regs[R_DZ]),
    .old_z, .ztest(hdr.zen && on_screen), .new_z, .pass(z_pass)
  );

  logic [9:0]     tu;
  logic [Y_W-1:0] tv;
  bbi_uv_interp u_uv (
    .clk, .load(ch_load), .step(ch_step),
    .u0(regs[R_U]), .du0(regs[R_U+1]), .d2u(regs[R_U+2]),
    .v0(regs[R_V]), .dv0(regs[R_V+1]), .d2v(regs[R_V+2]),
    .u(tu), .v(tv)
  );

  logic [X_W-1:0] px;
  logic [Y_W-1:0] py;
  bbi_xy_channel u_xy (
    .clk, .load(ch_load), .step(ch_step),
    .line  (hdr.op == OP_LINE),
    .x0    (regs[R_X][X_W-1:0]),
    .y0    (hdr.y),
    .len   (regs[R_LEN][11:0]),
    .rows  (is_fill ? regs[R_LEN][27:16] : 12'd1),
    .slope (regs[R_SLOPE]),
    .ymajor(hdr.ymajor), .xneg(hdr.xneg), .yneg(hdr.yneg),
    .x(px), .y(py), .coverage, .last(xy_last), .empty(xy_empty)
  );

  // ---------------- addresses and memory ----------------
  logic [FB_ADDR_W-1:0] fb_addr, tex_addr, xfer_addr;
  logic [Z_ADDR_W-1:0]  z_addr;
  logic                 xfer_step;

  bbi_addr_gen #(.BBI_ID(BBI_ID)) u_ag (
    .clk, .rst_n, .x(px), .y(py), .u(tu), .v(tv),
    .rfsh_load, .rfsh_buf(regs[R_X][31]), .rfsh_row(regs[R_X][Y_W-1:0]),
    .xfer_step, .fb_addr, .z_addr, .tex_addr, .xfer_addr,
    .on_screen, .owned, .disp_buf, .draw_buf()
  );

  bbi_mem_if u_mem (
    .clk, .rst_n,
    .req(mem_req), .fb_op, .fb_addr(fb_sel_tex ? tex_addr : fb_addr),
    .fb_wdata(pack_pixel(new_c[0], new_c[1], new_c[2], new_c[3])),
    .z_op, .z_addr, .z_wdata(new_z), .gnt, .fb_rdata, .z_rdata,
    .mref_req, .dref_req, .xfer_addr, .xfer_step,
    .fb_cyc, .fb_maddr, .fb_mwdata, .fb_mrdata,
    .z_cyc, .z_maddr, .z_mwdata, .z_mrdata
  );
endmodule
