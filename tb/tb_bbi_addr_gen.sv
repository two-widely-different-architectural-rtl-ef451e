// tb_bbi_addr_gen: self-checking testbench of the address generator of the
// BBI with identifier 2. For random pixels it checks the frame buffer,
// Z buffer and texel addresses and the ownership rule (rows whose number is
// 2 modulo 4 on screen, every row in the texture store); it also loads the
// refresh register and steps the display row counter, checking the display
// and drawing buffer selection and the row-transfer address.
module tb_bbi_addr_gen;
  import bbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [X_W-1:0]       x = '0;
  logic [Y_W-1:0]       y = '0;
  logic [9:0]           u = '0;
  logic [Y_W-1:0]       v = '0;
  logic                 rfsh_load = 1'b0, rfsh_buf = 1'b0, xfer_step = 1'b0;
  logic [Y_W-1:0]       rfsh_row = '0;
  logic [FB_ADDR_W-1:0] fb_addr, tex_addr, xfer_addr;
  logic [Z_ADDR_W-1:0]  z_addr;
  logic                 on_screen, owned, disp_buf, draw_buf;

  bbi_addr_gen #(.BBI_ID(2'd2)) dut (.*);

  int checks = 0, failures = 0;
  bit m_disp = 0;
  int m_row = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      x = $urandom; y = $urandom; u = $urandom % TEX_W; v = $urandom;
      rfsh_load = ($urandom % 50) == 0; rfsh_buf = $urandom; rfsh_row = $urandom;
      xfer_step = !rfsh_load && ($urandom % 3) == 0;
      #1;
      check(disp_buf == m_disp && draw_buf == !m_disp, "display and drawing buffers");
      check(fb_addr == {!m_disp, y, x}, "frame buffer address");
      check(z_addr == {y, x}, "Z address");
      check(tex_addr == {!m_disp, v, X_W'(SCREEN_W + int'(u))}, "texel address");
      check(xfer_addr == {m_disp, Y_W'(m_row), X_W'(0)}, "row transfer address");
      check(on_screen == (x < SCREEN_W), "screen or texture store");
      check(owned == (x >= SCREEN_W || y % 4 == 2), "row ownership");
      if (rfsh_load) begin m_disp = rfsh_buf; m_row = rfsh_row; end
      else if (xfer_step) m_row = (m_row + 1) % FB_ROWS;
    end
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
