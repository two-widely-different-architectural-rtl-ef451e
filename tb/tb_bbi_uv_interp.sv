// tb_bbi_uv_interp: self-checking testbench of the quadratic U, V
// interpolator. For random second-order coefficients the texel coordinates
// at pixel i must equal the integer part of U0 + i*dU + i*(i-1)/2 * d2U
// (likewise V), clamped to 0..767 and 0..1023.
module tb_bbi_uv_interp;
  import bbi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        load = 1'b0, step = 1'b0;
  logic [31:0] u0 = '0, du0 = '0, d2u = '0, v0 = '0, dv0 = '0, d2v = '0;
  logic [9:0]  u;
  logic [9:0]  v;

  bbi_uv_interp dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int cl(longint p, int lim);
    longint ip;
    ip = longint'($signed(32'(p))) >>> PFRAC;
    if (ip < 0) return 0;
    if (ip > lim - 1) return lim - 1;
    return int'(ip);
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      int len;
      logic [31:0] a0, a1, a2, b0, b1, b2;
      a0 = $urandom % (800 << PFRAC);
      a1 = 32'($signed($urandom % (8 << PFRAC)) - (4 << PFRAC));
      a2 = 32'($signed($urandom % (1 << 12)) - (1 << 11));
      b0 = $urandom % (1100 << PFRAC);
      b1 = 32'($signed($urandom % (8 << PFRAC)) - (4 << PFRAC));
      b2 = 32'($signed($urandom % (1 << 12)) - (1 << 11));
      len = 1 + $urandom % 60;
      @(negedge clk);
      u0 = a0; du0 = a1; d2u = a2; v0 = b0; dv0 = b1; d2v = b2; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < len; i++) begin
        longint ii, eu, ev;
        ii = i;
        eu = longint'($signed(a0)) + ii * longint'($signed(a1)) + (ii * (ii - 1) / 2) * longint'($signed(a2));
        ev = longint'($signed(b0)) + ii * longint'($signed(b1)) + (ii * (ii - 1) / 2) * longint'($signed(b2));
        check(int'(u) == cl(eu, TEX_W), "U texel coordinate");
        check(int'(v) == cl(ev, FB_ROWS), "V texel coordinate");
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
