// bbi_cmd_exec_fsm: the command execution state machine of a BBI. It takes
// the instruction from whichever input register file the command input
// state machine has marked ready (alternating between the two), interprets
// it, and sequences the channels, the address generator and the memory
// interface pixel by pixel; when the instruction is finished it hands the
// file back with done. The seven instructions are the published ones; the
// per-pixel sequence is this design's choice:
//
//   SETUP  load the interpolators and the XY channel from the register file
//          (OP_MASK and OP_RFSH load their register and finish here)
//   PIX    a pixel this BBI does not own is skipped in one clock; otherwise
//          issue the texel read (texture-mapped span), or the frame/Z buffer
//          read when the new value depends on the old pixel (Z test, alpha
//          blending, plane masking), or go straight to the write
//   RD     texture-mapped span only: issue the frame/Z buffer read (when
//          needed; the texel is taken from the read data here)
//   WR     the new pixel and Z are on the channel outputs: write the colour
//          when the Z test passes and Z too when Z writing is enabled, step
//          all channels, and return to PIX or finish after the last pixel
//   FIN    done to the command input state machine
//
// So a pixel takes 1 clock (plain write), 2 (read-modify-write) or 3
// (texture, read-modify-write) when the memory interface does not stall.
// Every memory cycle waits for gnt.
module bbi_cmd_exec_fsm
  import bbi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] ready,
  output logic [1:0] done,
  output logic       rbank,
  input  header_t    hdr,
  // XY channel / address generator status
  input  logic       xy_last,
  input  logic       xy_empty,
  input  logic       owned,
  input  logic       on_screen,
  input  logic       z_pass,
  // channel control
  output logic       ch_load,
  output logic       ch_step,
  output logic       mask_load,
  output logic       rfsh_load,
  output logic [4:0] pix_idx,
  // memory interface
  output logic       mem_req,
  output mem_cycle_e fb_op,
  output mem_cycle_e z_op,
  output logic       fb_sel_tex,
  output logic       tex_issue,
  output logic       old_issue,
  input  logic       gnt,
  output logic       busy
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_PIX, S_RD, S_WR, S_FIN} state_e;
  state_e state;
  logic   cur;

  logic need_read, need_z, wr_fb, wr_z, any_wr, plain, wr_now;
  assign need_z    = hdr.zen && on_screen;
  assign need_read = need_z || hdr.src == SRC_BLEND || hdr.src == SRC_MASKED;
  assign wr_fb     = z_pass;
  assign wr_z      = z_pass && hdr.zwr && on_screen;
  assign any_wr    = wr_fb || wr_z;
  // A pixel that needs no read is written in S_PIX itself.
  assign plain     = !xy_empty && owned && hdr.op != OP_TSPAN && !need_read;
  assign wr_now    = (state == S_WR) || (state == S_PIX && plain);

  assign rbank = cur;
  assign busy  = (state != S_IDLE) || (ready != '0);

  always_comb begin
    ch_load    = 1'b0;
    ch_step    = 1'b0;
    mask_load  = 1'b0;
    rfsh_load  = 1'b0;
    mem_req    = 1'b0;
    fb_op      = MC_IDLE;
    z_op       = MC_IDLE;
    fb_sel_tex = 1'b0;
    tex_issue  = 1'b0;
    old_issue  = 1'b0;
    done       = '0;
    unique case (state)
      S_IDLE: ;
      S_SETUP: begin
        mask_load = (hdr.op == OP_MASK);
        rfsh_load = (hdr.op == OP_RFSH);
        ch_load   = !(hdr.op inside {OP_MASK, OP_RFSH});
      end
      S_PIX: begin
        if (xy_empty) begin
          // nothing to draw
        end else if (!owned) begin
          ch_step = 1'b1;
        end else if (hdr.op == OP_TSPAN) begin
          mem_req    = 1'b1;
          fb_op      = MC_READ;
          fb_sel_tex = 1'b1;
          tex_issue  = 1'b1;
        end else if (need_read) begin
          mem_req   = 1'b1;
          fb_op     = MC_READ;
          z_op      = need_z ? MC_READ : MC_IDLE;
          old_issue = 1'b1;
        end
      end
      S_RD: begin
        if (need_read) begin
          mem_req   = 1'b1;
          fb_op     = MC_READ;
          z_op      = need_z ? MC_READ : MC_IDLE;
          old_issue = 1'b1;
        end
      end
      S_WR: ;
      S_FIN: done[cur] = 1'b1;
      default: ;
    endcase
    if (wr_now) begin
      if (any_wr) begin
        mem_req = 1'b1;
        fb_op   = wr_fb ? MC_WRITE : MC_IDLE;
        z_op    = wr_z  ? MC_WRITE : MC_IDLE;
        ch_step = gnt;
      end else begin
        ch_step = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur     <= 1'b0;
      pix_idx <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (ready[cur]) state <= S_SETUP;
        S_SETUP: begin
          pix_idx <= '0;
          state   <= (hdr.op inside {OP_MASK, OP_RFSH}) ? S_FIN : S_PIX;
        end
        S_PIX: begin
          if (xy_empty)                 state <= S_FIN;
          else if (!owned) begin
            pix_idx <= pix_idx + 1'b1;
            state   <= xy_last ? S_FIN : S_PIX;
          end
          else if (hdr.op == OP_TSPAN)  state <= gnt ? S_RD : S_PIX;
          else if (need_read)           state <= gnt ? S_WR : S_PIX;
          else if (ch_step) begin
            pix_idx <= pix_idx + 1'b1;
            state   <= xy_last ? S_FIN : S_PIX;
          end
        end
        S_RD: if (!need_read || gnt) state <= S_WR;
        S_WR: if (ch_step) begin
          pix_idx <= pix_idx + 1'b1;
          state   <= xy_last ? S_FIN : S_PIX;
        end
        S_FIN: begin
          cur   <= !cur;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
