// bbi_input_regfile: the two input register files of a BBI. While the
// instruction held in one file executes, the command input state machine
// loads the next instruction into the other, so instruction fetch time is
// hidden behind execution (the double-file scheme follows the published
// description; 32 registers of 32 bits per file is this design's choice).
//
// Interface: one write port (we, wbank, widx, wdata), written at the clock
// edge, and one read bank select rbank; rregs shows every register of the
// selected file at once, because the channels take their start values and
// derivatives in parallel. No reset: a file is always written before it is
// marked ready.
module bbi_input_regfile
  import bbi_pkg::*;
(
  input  logic                     clk,
  input  logic                     we,
  input  logic                     wbank,
  input  logic [$clog2(NREGS)-1:0] widx,
  input  logic [WORD_W-1:0]        wdata,
  input  logic                     rbank,
  output logic [WORD_W-1:0]        rregs [NREGS]
);
  logic [WORD_W-1:0] file0 [NREGS];
  logic [WORD_W-1:0] file1 [NREGS];

  always_ff @(posedge clk) begin
    if (we && !wbank) file0[widx] <= wdata;
    if (we &&  wbank) file1[widx] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < NREGS; i++) rregs[i] = rbank ? file1[i] : file0[i];
  end
endmodule
