// vram_model: behavioural model of one BBI's frame buffer and Z buffer
// VRAMs, for simulation only. Each buffer takes one cycle per clock from the
// BBI's memory interface and returns read data on the next clock. Storage is
// sparse (associative arrays, unwritten words read as zero), so the full
// 2 x 2048 x 1024 x 32-bit frame buffer and 2048 x 1024 x 24-bit Z address
// space can be used without allocating it. Memory refresh and row transfer
// cycles are counted; the last row-transfer address is kept.
module vram_model
  import bbi_pkg::*;
(
  input  logic                 clk,
  input  mem_cycle_e           fb_cyc,
  input  logic [FB_ADDR_W-1:0] fb_maddr,
  input  logic [31:0]          fb_mwdata,
  output logic [31:0]          fb_mrdata,
  input  mem_cycle_e           z_cyc,
  input  logic [Z_ADDR_W-1:0]  z_maddr,
  input  logic [Z_W-1:0]       z_mwdata,
  output logic [Z_W-1:0]       z_mrdata
);
  logic [31:0]    fb [int unsigned];
  logic [Z_W-1:0] zb [int unsigned];
  int unsigned    n_mref = 0, n_xfer = 0, n_fb_wr = 0, n_z_wr = 0;
  logic [FB_ADDR_W-1:0] last_xfer = '0;

  initial begin
    fb_mrdata = '0;
    z_mrdata  = '0;
  end

  always @(posedge clk) begin
    case (fb_cyc)
      MC_READ:  fb_mrdata <= fb.exists(fb_maddr) ? fb[fb_maddr] : 32'd0;
      MC_WRITE: begin fb[fb_maddr] = fb_mwdata; n_fb_wr++; end
      MC_MREF:  n_mref++;
      MC_XFER:  begin n_xfer++; last_xfer = fb_maddr; end
      default: ;
    endcase
    case (z_cyc)
      MC_READ:  z_mrdata <= zb.exists(z_maddr) ? zb[z_maddr] : '0;
      MC_WRITE: begin zb[z_maddr] = z_mwdata; n_z_wr++; end
      default: ;
    endcase
  end

  function automatic logic [31:0] rd_fb(int unsigned a);
    return fb.exists(a) ? fb[a] : 32'd0;
  endfunction
  function automatic logic [Z_W-1:0] rd_z(int unsigned a);
    return zb.exists(a) ? zb[a] : '0;
  endfunction
endmodule
