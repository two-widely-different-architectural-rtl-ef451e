// smem_port_ctrl: one port controller of the shared memory. It turns a
// single access command into a stream of word requests, so that a scalar, a
// row or column vector, or a 2-D array with arbitrary strides is read or
// written with one command (as published); the command format is this
// design's own.
//
// Command: base address, inner stride and count, outer stride and count,
// and a write flag. The word addresses are base + j*stride2 + i*stride for
// j = 0..count2-1 (outer) and i = 0..count-1 (inner), in that order;
// counts of 0 are taken as 1. For a write, one data word is taken from
// wr_data per request; for a read, the data come back on rd_valid/rd_data
// in request order (the memory controllers answer a fixed number of clocks
// after accepting, so replies cannot overtake each other).
//
// Timing: a request is offered every clock (req_valid) and moves on when the
// crossbar grants it (req_gnt). cmd_ready is high while idle; busy stays
// high until the last read reply is back. Reset synchronous, active low.
module smem_port_ctrl
  import smem_pkg::*;
#(
  parameter int unsigned ADDR_W = 17,
  parameter logic [2:0]  PORT   = 3'd0
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the vector processing units
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_base,
  input  logic [ADDR_W-1:0] cmd_stride,
  input  logic [15:0]       cmd_count,
  input  logic [ADDR_W-1:0] cmd_stride2,
  input  logic [15:0]       cmd_count2,
  // write data and read data
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [DATA_W-1:0] wr_data,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic              busy,
  // crossbar
  output logic              req_valid,
  input  logic              req_gnt,
  output logic [ADDR_W-1:0] req_addr,
  output logic [XBAR_W-1:0] req_word,
  input  logic              rsp_valid,
  input  logic [XBAR_W-1:0] rsp_word
);
  logic              active, write;
  logic [ADDR_W-1:0] row_addr, addr, stride, stride2;
  logic [15:0]       i_left, j_left, count;
  logic [15:0]       pending;          // read replies still to come
  smem_tag_t         tag;
  logic              issue, last_word;

  assign tag       = '{port: PORT, write: write, spare: '0};
  assign req_valid = active && (!write || wr_valid);
  assign req_addr  = addr;
  assign req_word  = {tag, write ? wr_data : '0};
  assign issue     = req_valid && req_gnt;
  assign wr_ready  = active && write && req_gnt;
  assign last_word = (i_left == 16'd1) && (j_left == 16'd1);
  assign cmd_ready = !active;
  assign busy      = active || (pending != '0);
  assign rd_valid  = rsp_valid;
  assign rd_data   = rsp_word[DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      pending <= '0;
    end else begin
      pending <= pending + 16'(issue && !write) - 16'(rsp_valid);
      if (!active) begin
        if (cmd_valid) begin
          active   <= 1'b1;
          write    <= cmd_write;
          addr     <= cmd_base;
          row_addr <= cmd_base;
          stride   <= cmd_stride;
          stride2  <= cmd_stride2;
          count    <= (cmd_count == '0) ? 16'd1 : cmd_count;
          i_left   <= (cmd_count == '0) ? 16'd1 : cmd_count;
          j_left   <= (cmd_count2 == '0) ? 16'd1 : cmd_count2;
        end
      end else if (issue) begin
        if (last_word) begin
          active <= 1'b0;
        end else if (i_left == 16'd1) begin
          i_left   <= count;
          j_left   <= j_left - 1'b1;
          row_addr <= row_addr + stride2;
          addr     <= row_addr + stride2;
        end else begin
          i_left <= i_left - 1'b1;
          addr   <= addr + stride;
        end
      end
    end
  end

  // A reply only comes for a read this port issued.
  a_no_stray_reply: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> (pending != '0));
endmodule
