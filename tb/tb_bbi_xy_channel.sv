// tb_bbi_xy_channel: self-checking testbench of the XY channel. Rectangles
// (spans and multi-row fills) must visit x0..x0+len-1 on each of the rows in
// raster order with full coverage; lines in all four directions, X- and
// Y-major, must put pixel i at major = start +/- i and minor = integer part
// of start + i * slope, with coverage 255 minus the top fraction byte.
// The last flag must rise on exactly the final pixel; empty for length 0.
module tb_bbi_xy_channel;
  import bbi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           load = 1'b0, step = 1'b0, line = 1'b0, ymajor = 1'b0, xneg = 1'b0, yneg = 1'b0;
  logic [X_W-1:0] x0 = '0;
  logic [Y_W-1:0] y0 = '0;
  logic [11:0]    len = '0, rows = '0;
  logic [31:0]    slope = '0;
  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  logic [7:0]     coverage;
  logic           last, empty;

  bbi_xy_channel dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      int n, l, r;
      bit is_line;
      is_line = $urandom % 2;
      l = $urandom % 30;
      r = 1 + $urandom % 4;
      @(negedge clk);
      line = is_line; x0 = $urandom; y0 = $urandom; len = 12'(l); rows = 12'(r);
      slope = 32'($signed($urandom % (2 << PFRAC)) - (1 << PFRAC));
      ymajor = $urandom; xneg = $urandom; yneg = $urandom;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      if (is_line) r = 1;
      n = l * r;
      check(empty == (n == 0), "empty flag");
      for (int i = 0; i < n; i++) begin
        int ex, ey;
        logic [7:0] ec;
        if (!is_line) begin
          ex = (int'(x0) + i % l) & 11'h7ff;
          ey = (int'(y0) + i / l) & 10'h3ff;
          ec = 8'd255;
        end else begin
          longint minor;
          if (ymajor) begin
            ey = (yneg ? int'(y0) - i : int'(y0) + i) & 10'h3ff;
            minor = (longint'(x0) << PFRAC) + longint'(i) * longint'($signed(slope));
            ex = int'((minor >>> PFRAC) & 11'h7ff);
          end else begin
            ex = (xneg ? int'(x0) - i : int'(x0) + i) & 11'h7ff;
            minor = (longint'(y0) << PFRAC) + longint'(i) * longint'($signed(slope));
            ey = int'((minor >>> PFRAC) & 10'h3ff);
          end
          ec = ~8'(minor >>> (PFRAC - 8));
        end
        check(int'(x) == ex && int'(y) == ey, $sformatf("pixel %0d position", i));
        check(coverage == ec, "coverage");
        check(last == (i == n - 1), "last flag");
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
