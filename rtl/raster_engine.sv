// raster_engine: the back end of the graphics subsystem, four bit-blit
// interpolators (BBI) working in parallel behind the command distributor,
// each with its own frame buffer (double buffered) and Z buffer. The
// geometry engine delivers spans and other drawing instructions; the
// distributor sends each one-row instruction to the BBI that owns the row
// (rows interleaved by y mod 4, this design's choice) and the others to all
// four. The VRAMs themselves are outside: each BBI's frame and Z buffer port
// is brought out (cycle type, address, write data; read data one clock after
// a read cycle).
//
// Interface: in_* are the distributor's source streams (valid/ready);
// mref_req / dref_req are the system controller's memory refresh and
// display refresh requests, given to all BBIs; busy is high while any BBI
// holds or runs an instruction. Reset synchronous, active low.
module raster_engine
  import bbi_pkg::*;
#(
  parameter int unsigned N_IN = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_IN-1:0]      in_valid,
  output logic [N_IN-1:0]      in_ready,
  input  logic [WORD_W-1:0]    in_data [N_IN],
  input  logic                 mref_req,
  input  logic                 dref_req,
  output mem_cycle_e           fb_cyc    [N_BBI],
  output logic [FB_ADDR_W-1:0] fb_maddr  [N_BBI],
  output logic [31:0]          fb_mwdata [N_BBI],
  input  logic [31:0]          fb_mrdata [N_BBI],
  output mem_cycle_e           z_cyc     [N_BBI],
  output logic [Z_ADDR_W-1:0]  z_maddr   [N_BBI],
  output logic [Z_W-1:0]       z_mwdata  [N_BBI],
  input  logic [Z_W-1:0]       z_mrdata  [N_BBI],
  output logic [N_BBI-1:0]     disp_buf,
  output logic                 busy
);
  logic [N_BBI-1:0]  bbi_valid, bbi_ready, bbi_busy;
  logic [WORD_W-1:0] bbi_data;

  command_distributor #(.N_IN(N_IN)) u_dist (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .bbi_valid, .bbi_ready, .bbi_data
  );

  for (genvar k = 0; k < N_BBI; k++) begin : g_bbi
    bbi #(.BBI_ID(2'(k))) u_bbi (
      .clk, .rst_n,
      .cmd_valid(bbi_valid[k]), .cmd_ready(bbi_ready[k]), .cmd_data(bbi_data),
      .mref_req, .dref_req,
      .fb_cyc(fb_cyc[k]), .fb_maddr(fb_maddr[k]), .fb_mwdata(fb_mwdata[k]),
      .fb_mrdata(fb_mrdata[k]),
      .z_cyc(z_cyc[k]), .z_maddr(z_maddr[k]), .z_mwdata(z_mwdata[k]),
      .z_mrdata(z_mrdata[k]),
      .disp_buf(disp_buf[k]), .busy(bbi_busy[k])
    );
  end

  assign busy = (|bbi_busy) || (|in_valid);
endmodule
