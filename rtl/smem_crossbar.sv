// smem_crossbar: the 8 x 8 crossbar between the port controllers and the
// memory controllers of the shared memory (40-bit words, as published).
//
// Request side: each port controller offers one request (address plus a
// 40-bit word). The target memory controller is address bits [2:0] and the
// module inside it bits [4:3]. Each memory controller grants, round robin,
// one of the ports that want it and whose target module is free, so eight
// transfers can happen in the same clock when the ports address eight
// different controllers. The request path is combinational; the grant comes
// back in the same clock.
//
// Reply side: a memory controller's reply carries the requesting port in
// its tag and is steered back to that port. Because every controller
// replies exactly one clock after it accepted, and a port is granted at most
// once per clock, two replies never meet at one port.
//
// Round-robin arbitration and the busy-module check are this design's
// choices; the document gives the crossbar's size and purpose only.
module smem_crossbar
  import smem_pkg::*;
#(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  // port controller side
  input  logic              p_valid [N_PORT],
  output logic              p_gnt   [N_PORT],
  input  logic [ADDR_W-1:0] p_addr  [N_PORT],
  input  logic [XBAR_W-1:0] p_word  [N_PORT],
  output logic              p_rsp_valid [N_PORT],
  output logic [XBAR_W-1:0] p_rsp_word  [N_PORT],
  // memory controller side
  output logic              m_valid [N_MC],
  output logic [ADDR_W-1:0] m_addr  [N_MC],
  output logic [XBAR_W-1:0] m_word  [N_MC],
  input  logic [N_MOD-1:0]  m_free  [N_MC],
  input  logic              m_rsp_valid [N_MC],
  input  logic [XBAR_W-1:0] m_rsp_word  [N_MC]
);
  logic [2:0] rr   [N_MC];
  logic [2:0] pick [N_MC];
  logic       hit  [N_MC];
  smem_tag_t  rtag [N_MC];   // tag of each controller's reply word

  // Per memory controller: first eligible port at or after rr.
  always_comb begin
    for (int m = 0; m < N_MC; m++) begin
      hit[m]  = 1'b0;
      pick[m] = rr[m];
      for (int k = N_PORT - 1; k >= 0; k--) begin
        int unsigned p;
        p = (int'(rr[m]) + k) % N_PORT;
        if (p_valid[p] && p_addr[p][2:0] == 3'(m) && m_free[m][p_addr[p][4:3]]) begin
          hit[m]  = 1'b1;
          pick[m] = 3'(p);
        end
      end
      m_valid[m] = hit[m];
      m_addr[m]  = p_addr[pick[m]];
      m_word[m]  = p_word[pick[m]];
    end
    for (int p = 0; p < N_PORT; p++) begin
      p_gnt[p]       = 1'b0;
      p_rsp_valid[p] = 1'b0;
      p_rsp_word[p]  = '0;
    end
    for (int m = 0; m < N_MC; m++) begin
      rtag[m] = smem_tag_t'(m_rsp_word[m][XBAR_W-1 -: TAG_W]);
      if (hit[m]) p_gnt[pick[m]] = 1'b1;
      if (m_rsp_valid[m]) begin
        p_rsp_valid[rtag[m].port] = 1'b1;
        p_rsp_word[rtag[m].port]  = m_rsp_word[m];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < N_MC; m++) begin
      if (!rst_n)      rr[m] <= '0;
      else if (hit[m]) rr[m] <= pick[m] + 3'd1;
    end
  end
endmodule
