// tb_bbi_z_channel: self-checking testbench of the Z channel. Random depth
// ramps (including ones that run below zero and above the 24-bit range) are
// stepped; the interpolated Z is compared with start + i * derivative,
// saturated, and the test result with "new Z nearer (smaller) than stored
// Z", or always pass when the test is off.
module tb_bbi_z_channel;
  import bbi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           load = 1'b0, step = 1'b0, ztest = 1'b0;
  logic [31:0]    start = '0, delta = '0;
  logic [Z_W-1:0] old_z = '0, new_z;
  logic           pass;

  bbi_z_channel dut (.*);

  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [31:0] s0, d0;
      int len;
      s0 = $urandom;
      d0 = 32'($signed($urandom % (1 << 28)) - (1 << 27));
      len = 1 + $urandom % 30;
      @(negedge clk);
      start = s0; delta = d0; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < len; i++) begin
        longint acc;
        logic [Z_W-1:0] ez;
        acc = longint'(s0) + longint'(i) * longint'($signed(d0));
        if (acc < 0) ez = '0;
        else if ((acc >>> ZFRAC) > 64'hFF_FFFF) ez = '1;
        else ez = Z_W'(acc >>> ZFRAC);
        // one pixel in four meets a stored depth equal to its own
        old_z = (($urandom % 4) == 0) ? ez : Z_W'($urandom);
        ztest = $urandom;
        #1;
        check(new_z == ez, "interpolated Z");
        check(pass == (!ztest || ez < old_z), "depth test");
        if (ztest && pass) n_pass++;
        if (ztest && !pass) n_fail++;
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
    end
    check(n_pass > 0 && n_fail > 0, "both test outcomes seen");
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
