// uwgsp4_graphics: the drawing datapath of a graphics subsystem that splits
// 3-D image generation into a programmable geometry engine and a raster
// engine of four span-interpolating chips. The geometry engine is a head
// processor feeding two identical four-stage pipelines (transformation,
// lighting, clipping, span generation), each stage a floating-point
// microprocessor that reads its input FIFO and writes its output FIFO. The
// raster engine turns the spans and other instructions into pixels.
//
// What is synthesizable logic here: the five 512 x 32 FIFOs of each
// pipeline, the command distributor and the four BBIs. The processors are
// off-the-shelf parts running firmware, so their sides of the FIFOs are
// brought out as ports: FIFO j of pipeline p is written by the head
// processor (j = 0) or by stage j (j = 1..4), and read by stage j+1 (j =
// 0..3); FIFO 4 of each pipeline feeds the command distributor. A third
// distributor input carries instructions from the image block transfer path
// (images moved from shared memory to the frame buffer). The frame and Z
// buffer VRAMs of each BBI, and the system controller's refresh requests,
// are ports too.
//
// Interface: every stream is valid/ready; a word moves when both are high at
// a clock edge. Reset synchronous, active low. One clock (40 MHz in the
// published design) runs everything.
module uwgsp4_graphics
  import bbi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,  // words per geometry-engine FIFO
  parameter int unsigned N_PIPE     = 2,    // geometry pipelines
  parameter int unsigned N_STAGE    = 4     // processors per pipeline
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor side of the geometry-engine FIFOs
  input  logic                 ge_wr_valid [N_PIPE][N_STAGE+1],
  output logic                 ge_wr_ready [N_PIPE][N_STAGE+1],
  input  logic [WORD_W-1:0]    ge_wr_data  [N_PIPE][N_STAGE+1],
  output logic                 ge_rd_valid [N_PIPE][N_STAGE],
  input  logic                 ge_rd_ready [N_PIPE][N_STAGE],
  output logic [WORD_W-1:0]    ge_rd_data  [N_PIPE][N_STAGE],
  // instructions from the image block transfer path
  input  logic                 ibt_valid,
  output logic                 ibt_ready,
  input  logic [WORD_W-1:0]    ibt_data,
  // system controller
  input  logic                 mref_req,
  input  logic                 dref_req,
  // frame buffer and Z buffer of each BBI
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
  localparam int unsigned N_IN = N_PIPE + 1;
  localparam int unsigned CW   = $clog2(FIFO_DEPTH + 1);

  logic [N_IN-1:0]   d_valid, d_ready;
  logic [WORD_W-1:0] d_data [N_IN];
  logic [N_PIPE-1:0] fifo_busy;

  for (genvar p = 0; p < N_PIPE; p++) begin : g_pipe
    logic [CW-1:0] cnt [N_STAGE+1];
    logic          nonempty;
    for (genvar j = 0; j <= N_STAGE; j++) begin : g_fifo
      logic             rv, rr;
      logic [WORD_W-1:0] rd;
      sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .wr_valid(ge_wr_valid[p][j]), .wr_ready(ge_wr_ready[p][j]),
        .wr_data(ge_wr_data[p][j]),
        .rd_valid(rv), .rd_ready(rr), .rd_data(rd), .count(cnt[j])
      );
      if (j < N_STAGE) begin : g_stage
        assign ge_rd_valid[p][j] = rv;
        assign ge_rd_data[p][j]  = rd;
        assign rr                = ge_rd_ready[p][j];
      end else begin : g_out
        assign d_valid[p] = rv;
        assign d_data[p]  = rd;
        assign rr         = d_ready[p];
      end
    end
    always_comb begin
      nonempty = 1'b0;
      for (int j = 0; j <= N_STAGE; j++) nonempty |= (cnt[j] != '0);
    end
    assign fifo_busy[p] = nonempty;
  end

  assign d_valid[N_PIPE] = ibt_valid;
  assign d_data[N_PIPE]  = ibt_data;
  assign ibt_ready       = d_ready[N_PIPE];

  logic re_busy;
  raster_engine #(.N_IN(N_IN)) u_re (
    .clk, .rst_n,
    .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .mref_req, .dref_req,
    .fb_cyc, .fb_maddr, .fb_mwdata, .fb_mrdata,
    .z_cyc, .z_maddr, .z_mwdata, .z_mrdata,
    .disp_buf, .busy(re_busy)
  );

  assign busy = re_busy || (|fifo_busy);
endmodule
