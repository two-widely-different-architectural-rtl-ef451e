// uwgsp4: top level of this design. It places the two synthesizable parts of
// the UWGSP4 system side by side: the graphics subsystem (geometry-engine
// FIFOs, command distributor, four BBIs; see uwgsp4_graphics) and the shared
// memory with its crossbar (see shared_memory).
//
// In the published system the two meet through processors and buses that are
// not built here: the vector processing units and the system controller move
// data between the shared memory and the graphics subsystem, and the image
// block transfer path feeds images from the shared memory to the distributor.
// Those parts are software-driven processors, so this top brings both
// subsystems' interfaces out unchanged and connects only the clock and reset.
// The sm_ prefix marks the shared-memory ports; all other ports are those of
// uwgsp4_graphics with the same meaning and timing.
//
// Interface and timing: one clock (40 MHz in the published design), reset
// synchronous and active low; every stream is valid/ready.
module uwgsp4
  import bbi_pkg::*;
  import smem_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512,  // words per geometry-engine FIFO
  parameter int unsigned N_PIPE     = 2,    // geometry pipelines
  parameter int unsigned N_STAGE    = 4,    // processors per pipeline
  parameter int unsigned SM_ADDR_W  = 17,   // shared-memory word-address bits
  parameter int unsigned MOD_CYCLE  = 4     // clocks a memory module stays busy
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // graphics subsystem
  input  logic                 ge_wr_valid [N_PIPE][N_STAGE+1],
  output logic                 ge_wr_ready [N_PIPE][N_STAGE+1],
  input  logic [WORD_W-1:0]    ge_wr_data  [N_PIPE][N_STAGE+1],
  output logic                 ge_rd_valid [N_PIPE][N_STAGE],
  input  logic                 ge_rd_ready [N_PIPE][N_STAGE],
  output logic [WORD_W-1:0]    ge_rd_data  [N_PIPE][N_STAGE],
  input  logic                 ibt_valid,
  output logic                 ibt_ready,
  input  logic [WORD_W-1:0]    ibt_data,
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
  output logic                 busy,
  // shared memory, one set per port controller
  input  logic                 sm_cmd_valid   [N_PORT],
  output logic                 sm_cmd_ready   [N_PORT],
  input  logic                 sm_cmd_write   [N_PORT],
  input  logic [SM_ADDR_W-1:0] sm_cmd_base    [N_PORT],
  input  logic [SM_ADDR_W-1:0] sm_cmd_stride  [N_PORT],
  input  logic [15:0]          sm_cmd_count   [N_PORT],
  input  logic [SM_ADDR_W-1:0] sm_cmd_stride2 [N_PORT],
  input  logic [15:0]          sm_cmd_count2  [N_PORT],
  input  logic                 sm_wr_valid    [N_PORT],
  output logic                 sm_wr_ready    [N_PORT],
  input  logic [DATA_W-1:0]    sm_wr_data     [N_PORT],
  output logic                 sm_rd_valid    [N_PORT],
  output logic [DATA_W-1:0]    sm_rd_data     [N_PORT],
  output logic                 sm_busy        [N_PORT]
);
  uwgsp4_graphics #(.FIFO_DEPTH(FIFO_DEPTH), .N_PIPE(N_PIPE), .N_STAGE(N_STAGE)) u_gfx (
    .clk, .rst_n,
    .ge_wr_valid, .ge_wr_ready, .ge_wr_data,
    .ge_rd_valid, .ge_rd_ready, .ge_rd_data,
    .ibt_valid, .ibt_ready, .ibt_data,
    .mref_req, .dref_req,
    .fb_cyc, .fb_maddr, .fb_mwdata, .fb_mrdata,
    .z_cyc, .z_maddr, .z_mwdata, .z_mrdata,
    .disp_buf, .busy
  );

  shared_memory #(.ADDR_W(SM_ADDR_W), .MOD_CYCLE(MOD_CYCLE)) u_smem (
    .clk, .rst_n,
    .cmd_valid(sm_cmd_valid), .cmd_ready(sm_cmd_ready), .cmd_write(sm_cmd_write),
    .cmd_base(sm_cmd_base), .cmd_stride(sm_cmd_stride), .cmd_count(sm_cmd_count),
    .cmd_stride2(sm_cmd_stride2), .cmd_count2(sm_cmd_count2),
    .wr_valid(sm_wr_valid), .wr_ready(sm_wr_ready), .wr_data(sm_wr_data),
    .rd_valid(sm_rd_valid), .rd_data(sm_rd_data), .busy(sm_busy)
  );
endmodule
