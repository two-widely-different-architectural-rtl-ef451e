// tb_sync_fifo: self-checking testbench of the geometry-engine FIFO at its
// full 512 x 32 size. Random pushes and pops are compared with a queue
// model; the FIFO is also filled to the brim (wr_ready must drop at exactly
// 512 words, and a write is accepted when full only together with a read)
// and drained to empty. A word written into an empty FIFO must be readable
// one clock later.
module tb_sync_fifo;
  localparam int W = 32, D = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         wr_valid = 1'b0, wr_ready, rd_valid, rd_ready = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Compare at each rising edge, before the FIFO moves.
  always @(posedge clk) if (rst_n) begin
    check(count == model.size(), "count matches model");
    check(rd_valid == (model.size() > 0), "rd_valid when not empty");
    check(wr_ready == (model.size() < D || rd_ready), "wr_ready unless full");
    if (rd_valid && model.size() > 0) check(rd_data == model[0], "read data in order");
    if (rd_valid && rd_ready) void'(model.pop_front());
    if (wr_valid && wr_ready) model.push_back(wr_data);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_valid = ($urandom % 4) != 0;
      wr_data  = $urandom;
      rd_ready = ($urandom % 3) == 0;
    end
    // fill completely
    rd_ready = 1'b0;
    while (model.size() < D) begin
      @(negedge clk);
      wr_valid = 1'b1; wr_data = $urandom;
    end
    @(negedge clk);
    check(!wr_ready && count == D, "full at 512 words");
    // write and read together while full
    wr_valid = 1'b1; wr_data = 32'hCAFE_0001; rd_ready = 1'b1;
    @(negedge clk);
    check(count == D, "still full after simultaneous write and read");
    wr_valid = 1'b0;
    // drain
    while (model.size() > 0) @(negedge clk);
    @(negedge clk);
    check(!rd_valid && count == 0, "empty after draining");
    // latency: write into empty, readable next clock
    rd_ready = 1'b0; wr_valid = 1'b1; wr_data = 32'h1234_5678;
    @(negedge clk);
    wr_valid = 1'b0;
    check(rd_valid && rd_data == 32'h1234_5678, "one-clock fall-through");
    rd_ready = 1'b1;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
