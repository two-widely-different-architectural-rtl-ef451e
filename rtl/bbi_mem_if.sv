// bbi_mem_if: the memory interface of a BBI, between its drawing datapath
// and the VRAMs of its frame buffer and Z buffer. It issues the read and
// write cycles of the drawing datapath and, on request of the system
// controller, memory refresh cycles and display refresh (row transfer)
// cycles, for which it generates the memory control. That much follows the
// published description. VRAM timing (RAS/CAS, serial port clocking) is not
// modelled: each buffer is treated as a synchronous memory that takes one
// cycle command per clock and returns read data on the next clock (this
// design's choice).
//
// Interface: the datapath holds req high with the wanted cycle of each
// buffer (fb_op, z_op: MC_IDLE, MC_READ or MC_WRITE); gnt says the cycle was
// issued at this clock edge. A memory refresh request (mref_req, one-clock
// pulse) or display refresh request (dref_req) is remembered and served
// before drawing: a memory refresh cycle goes to both buffers, a row
// transfer of the displayed buffer's current refresh row to the frame buffer
// only; drawing waits (gnt low) during that clock. xfer_step tells the
// address generator to advance its refresh counter. Reset (synchronous,
// active low) clears the pending requests.
module bbi_mem_if
  import bbi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // drawing datapath
  input  logic                 req,
  input  mem_cycle_e           fb_op,
  input  logic [FB_ADDR_W-1:0] fb_addr,
  input  logic [31:0]          fb_wdata,
  input  mem_cycle_e           z_op,
  input  logic [Z_ADDR_W-1:0]  z_addr,
  input  logic [Z_W-1:0]       z_wdata,
  output logic                 gnt,
  output logic [31:0]          fb_rdata,
  output logic [Z_W-1:0]       z_rdata,
  // system controller requests
  input  logic                 mref_req,
  input  logic                 dref_req,
  input  logic [FB_ADDR_W-1:0] xfer_addr,
  output logic                 xfer_step,
  // memories
  output mem_cycle_e           fb_cyc,
  output logic [FB_ADDR_W-1:0] fb_maddr,
  output logic [31:0]          fb_mwdata,
  input  logic [31:0]          fb_mrdata,
  output mem_cycle_e           z_cyc,
  output logic [Z_ADDR_W-1:0]  z_maddr,
  output logic [Z_W-1:0]       z_mwdata,
  input  logic [Z_W-1:0]       z_mrdata
);
  logic mref_pend, dref_pend;
  logic do_mref, do_xfer;

  assign do_mref   = mref_pend;
  assign do_xfer   = dref_pend && !mref_pend;
  assign gnt       = req && !mref_pend && !dref_pend;
  assign xfer_step = do_xfer;
  assign fb_rdata  = fb_mrdata;
  assign z_rdata   = z_mrdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mref_pend <= 1'b0;
      dref_pend <= 1'b0;
    end else begin
      mref_pend <= mref_req || (mref_pend && !do_mref);
      dref_pend <= dref_req || (dref_pend && !do_xfer);
    end
  end

  always_comb begin
    fb_cyc    = MC_IDLE;
    fb_maddr  = fb_addr;
    fb_mwdata = fb_wdata;
    z_cyc     = MC_IDLE;
    z_maddr   = z_addr;
    z_mwdata  = z_wdata;
    if (do_mref) begin
      fb_cyc = MC_MREF;
      z_cyc  = MC_MREF;
    end else if (do_xfer) begin
      fb_cyc   = MC_XFER;
      fb_maddr = xfer_addr;
    end else if (gnt) begin
      fb_cyc = fb_op;
      z_cyc  = z_op;
    end
  end
endmodule
