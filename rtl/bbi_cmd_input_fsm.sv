// bbi_cmd_input_fsm: the command input state machine of a BBI. It takes
// instruction words from the command distributor and loads them into the
// input register file that is free, alternating between the two files. The
// header word (register 0) says how many data words follow; after the last
// one the file is marked ready for the command execution state machine,
// which hands it back with done once the instruction has been carried out.
// The Ready/Done/load exchange is the one drawn in the BBI block diagram;
// the word-serial transfer and the word count in the header are this
// design's choices.
//
// Interface: cmd_valid/cmd_ready/cmd_data from the command distributor, a
// word accepted when valid and ready are high at a clock edge. ready[b] is
// high while file b holds a complete instruction; a one-clock done[b] frees
// it. The next instruction can be accepted into the other file while one
// executes; a third waits (cmd_ready low) until a file is freed. Reset is
// synchronous, active low.
module bbi_cmd_input_fsm
  import bbi_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  logic [WORD_W-1:0]        cmd_data,
  // register file write port
  output logic                     load,
  output logic                     load_bank,
  output logic [$clog2(NREGS)-1:0] load_idx,
  output logic [WORD_W-1:0]        load_data,
  // exchange with the command execution state machine
  output logic [1:0]               ready,
  input  logic [1:0]               done
);
  logic       wbank;
  logic [4:0] left;     // data words still to come for the current file
  logic       in_cmd;   // header taken, data words pending
  header_t    hdr;
  logic [4:0] hdr_count; // data words of the instruction being loaded

  assign hdr       = header_t'(cmd_data);
  assign cmd_ready = !ready[wbank];
  assign load      = cmd_valid && cmd_ready;
  assign load_bank = wbank;
  assign load_data = cmd_data;
  assign load_idx  = in_cmd ? 5'(hdr_count - left + 5'd1) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      left      <= '0;
      in_cmd    <= 1'b0;
      ready     <= '0;
      hdr_count <= '0;
    end else begin
      ready <= ready & ~done;
      if (load) begin
        if (!in_cmd) begin
          hdr_count <= hdr.nwords;
          left      <= hdr.nwords;
          if (hdr.nwords == '0) begin
            ready[wbank] <= 1'b1;
            wbank        <= !wbank;
          end else begin
            in_cmd <= 1'b1;
          end
        end else begin
          left <= left - 1'b1;
          if (left == 5'd1) begin
            in_cmd       <= 1'b0;
            ready[wbank] <= 1'b1;
            wbank        <= !wbank;
          end
        end
      end
    end
  end

  // A file is only handed back after it was marked ready.
  a_done_after_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (done & ~ready) == '0);
endmodule
