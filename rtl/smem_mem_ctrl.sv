// smem_mem_ctrl: one memory controller of the shared memory with its four
// memory modules (8 controllers x 4 modules = the published 32-way
// interleaving). Word address bits [4:3] select the module and bits
// [ADDR_W-1:5] the word inside it.
//
// A module is busy for MOD_CYCLE clocks after each access (a memory cycle
// longer than the 25 ns clock); the controller reports which modules are
// free, and the crossbar only sends requests to free modules. With
// MOD_CYCLE = 4 the controller can start an access every clock as long as
// successive requests rotate over its four modules, which is what
// unit-stride vectors do: 8 controllers x 4 bytes x 40 MHz = 1,280 Mbyte/s,
// the published bandwidth. Module size and cycle time are this design's
// assumptions.
//
// Timing: a request (valid, addr, 40-bit word with tag) is accepted in the
// clock it is offered; a write stores at that edge; a read reply (same tag,
// data) is valid the next clock. Reset synchronous, active low; the memory
// arrays are not reset.
module smem_mem_ctrl
  import smem_pkg::*;
#(
  parameter int unsigned ADDR_W    = 17,
  parameter int unsigned MOD_CYCLE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [ADDR_W-1:0] addr,
  input  logic [XBAR_W-1:0] word,
  output logic [N_MOD-1:0]  free,
  output logic              rsp_valid,
  output logic [XBAR_W-1:0] rsp_word
);
  localparam int unsigned WORDS = 1 << (ADDR_W - 5);
  localparam int unsigned CW    = $clog2(MOD_CYCLE + 1);

  // the four modules as one array, module number in the top index bits
  logic [DATA_W-1:0] mem [N_MOD * WORDS];
  logic [CW-1:0]     busy_cnt [N_MOD];
  logic [1:0]        msel;
  logic [ADDR_W-6:0] widx;
  smem_tag_t         tag;

  assign msel = addr[4:3];
  assign widx = addr[ADDR_W-1:5];
  assign tag  = smem_tag_t'(word[XBAR_W-1 -: TAG_W]);

  always_comb begin
    for (int k = 0; k < N_MOD; k++) free[k] = (busy_cnt[k] == '0);
  end

  always_ff @(posedge clk) begin
    if (valid && tag.write) mem[{msel, widx}] <= word[DATA_W-1:0];
    rsp_word <= {word[XBAR_W-1 -: TAG_W], mem[{msel, widx}]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      for (int k = 0; k < N_MOD; k++) busy_cnt[k] <= '0;
    end else begin
      rsp_valid <= valid && !tag.write;
      for (int k = 0; k < N_MOD; k++) begin
        if (valid && msel == 2'(k)) busy_cnt[k] <= CW'(MOD_CYCLE - 1);
        else if (busy_cnt[k] != '0) busy_cnt[k] <= busy_cnt[k] - 1'b1;
      end
    end
  end

  // The crossbar only sends requests to a free module.
  a_free_module: assert property (@(posedge clk) disable iff (!rst_n)
    valid |-> free[msel]);
endmodule
