// shared_memory: the shared memory and interconnection network of UWGSP4:
// eight port controllers, the 8 x 8 x 40-bit crossbar and eight memory
// controllers with four interleaved modules each (32-way interleaving).
// Every port controller accepts one strided access command at a time and
// streams its words through the crossbar; up to eight words move per clock,
// one per memory controller.
//
// The structure and counts follow the published block diagram and text. In
// the full system each port controller serves two vector processing units
// over a high-speed bus; those buses and units are outside this module, so
// each port's command and data streams are brought out as ports. Memory
// size (ADDR_W word-address bits, 2^17 words = 512 Kbyte by default) and the
// module cycle time are assumptions.
//
// Interface per port p: cmd_* (see smem_port_ctrl), wr_valid/wr_ready/
// wr_data for write data, rd_valid/rd_data for read data (no back-pressure:
// the reader must take each word), busy. Reset synchronous, active low.
module shared_memory
  import smem_pkg::*;
#(
  parameter int unsigned ADDR_W    = 17,
  parameter int unsigned MOD_CYCLE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid   [N_PORT],
  output logic              cmd_ready   [N_PORT],
  input  logic              cmd_write   [N_PORT],
  input  logic [ADDR_W-1:0] cmd_base    [N_PORT],
  input  logic [ADDR_W-1:0] cmd_stride  [N_PORT],
  input  logic [15:0]       cmd_count   [N_PORT],
  input  logic [ADDR_W-1:0] cmd_stride2 [N_PORT],
  input  logic [15:0]       cmd_count2  [N_PORT],
  input  logic              wr_valid    [N_PORT],
  output logic              wr_ready    [N_PORT],
  input  logic [DATA_W-1:0] wr_data     [N_PORT],
  output logic              rd_valid    [N_PORT],
  output logic [DATA_W-1:0] rd_data     [N_PORT],
  output logic              busy        [N_PORT]
);
  logic              p_valid [N_PORT], p_gnt [N_PORT], p_rsp_valid [N_PORT];
  logic [ADDR_W-1:0] p_addr  [N_PORT];
  logic [XBAR_W-1:0] p_word  [N_PORT], p_rsp_word [N_PORT];
  logic              m_valid [N_MC], m_rsp_valid [N_MC];
  logic [ADDR_W-1:0] m_addr  [N_MC];
  logic [XBAR_W-1:0] m_word  [N_MC], m_rsp_word [N_MC];
  logic [N_MOD-1:0]  m_free  [N_MC];

  for (genvar p = 0; p < N_PORT; p++) begin : g_pc
    smem_port_ctrl #(.ADDR_W(ADDR_W), .PORT(3'(p))) u_pc (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[p]), .cmd_ready(cmd_ready[p]), .cmd_write(cmd_write[p]),
      .cmd_base(cmd_base[p]), .cmd_stride(cmd_stride[p]), .cmd_count(cmd_count[p]),
      .cmd_stride2(cmd_stride2[p]), .cmd_count2(cmd_count2[p]),
      .wr_valid(wr_valid[p]), .wr_ready(wr_ready[p]), .wr_data(wr_data[p]),
      .rd_valid(rd_valid[p]), .rd_data(rd_data[p]), .busy(busy[p]),
      .req_valid(p_valid[p]), .req_gnt(p_gnt[p]), .req_addr(p_addr[p]), .req_word(p_word[p]),
      .rsp_valid(p_rsp_valid[p]), .rsp_word(p_rsp_word[p])
    );
  end

  smem_crossbar #(.ADDR_W(ADDR_W)) u_xbar (
    .clk, .rst_n,
    .p_valid, .p_gnt, .p_addr, .p_word, .p_rsp_valid, .p_rsp_word,
    .m_valid, .m_addr, .m_word, .m_free, .m_rsp_valid, .m_rsp_word
  );

  for (genvar m = 0; m < N_MC; m++) begin : g_mc
    smem_mem_ctrl #(.ADDR_W(ADDR_W), .MOD_CYCLE(MOD_CYCLE)) u_mc (
      .clk, .rst_n,
      .valid(m_valid[m]), .addr(m_addr[m]), .word(m_word[m]), .free(m_free[m]),
      .rsp_valid(m_rsp_valid[m]), .rsp_word(m_rsp_word[m])
    );
  end
endmodule
