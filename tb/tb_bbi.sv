// tb_bbi: self-checking testbench of one BBI (as the chip owning rows with
// y mod 4 = 1) with a behavioural frame/Z buffer. It sends every one of the
// seven instructions (fills, Gouraud spans with Z test, alpha blended and
// plane-masked spans, block transfers into the screen and into the texture
// store, a texture-mapped span with quadratic U/V, X- and Y-major
// antialiased lines, buffer swap by a refresh counter load, an empty span),
// and after each compares every frame and Z buffer word the reference model
// says was written, and the number of writes. It also checks:
//   - rate: a 100-pixel Z-buffered Gouraud span must take at most 8 clocks
//     per pixel, which is what one of four BBIs needs for 200,000
//     100-pixel polygons per second at 40 MHz;
//   - the next instruction is loaded while the current one executes;
//   - memory refresh and display refresh requests are served (row transfer
//     address from the refresh counter) while drawing.
module tb_bbi;
  import bbi_pkg::*;
  import bbi_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 cmd_valid = 1'b0, cmd_ready;
  logic [31:0]          cmd_data = '0;
  logic                 mref_req = 1'b0, dref_req = 1'b0;
  mem_cycle_e           fb_cyc, z_cyc;
  logic [FB_ADDR_W-1:0] fb_maddr;
  logic [31:0]          fb_mwdata, fb_mrdata;
  logic [Z_ADDR_W-1:0]  z_maddr;
  logic [Z_W-1:0]       z_mwdata, z_mrdata;
  logic                 disp_buf, busy;

  localparam int ID = 1;

  bbi #(.BBI_ID(2'(ID))) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_data, .mref_req, .dref_req,
    .fb_cyc, .fb_maddr, .fb_mwdata, .fb_mrdata,
    .z_cyc, .z_maddr, .z_mwdata, .z_mrdata, .disp_buf, .busy
  );

  vram_model mem (
    .clk, .fb_cyc, .fb_maddr, .fb_mwdata, .fb_mrdata,
    .z_cyc, .z_maddr, .z_mwdata, .z_mrdata
  );

  int checks = 0, failures = 0;
  int overlap_loads = 0;
  RefModel ref_m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Count instruction words accepted while another instruction executes.
  always @(posedge clk)
    if (rst_n && cmd_valid && cmd_ready && dut.u_exec.state != dut.u_exec.S_IDLE)
      overlap_loads++;

  task automatic send(word_q q);
    // drive after a rising edge, sample ready at the falling edge
    foreach (q[i]) begin
      cmd_valid <= 1'b1;
      cmd_data  <= q[i];
      @(negedge clk);
      while (!cmd_ready) @(negedge clk);
      @(posedge clk);
    end
  endtask

  task automatic wait_idle();
    cmd_valid <= 1'b0;
    @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic run(word_q q);
    send(q);
    ref_m.exec(q, ID);
  endtask

  // Compare the whole memory with the reference model.
  task automatic compare(string tag);
    int bad = 0;
    int nref = 0;
    foreach (ref_m.fb[key]) begin
      if ((key >> 24) != ID) continue;
      nref++;
      if (mem.rd_fb(key & 24'hFFFFFF) !== ref_m.fb[key]) begin
        if (bad < 5) $display("  %s fb[%h] = %h, expected %h", tag, key & 24'hFFFFFF,
                              mem.rd_fb(key & 24'hFFFFFF), ref_m.fb[key]);
        bad++;
      end
    end
    check(bad == 0, {tag, ": frame buffer contents"});
    check(mem.fb.size() == nref, {tag, ": no frame buffer word written outside the reference"});
    bad = 0; nref = 0;
    foreach (ref_m.zb[key]) begin
      if ((key >> 24) != ID) continue;
      nref++;
      if (mem.rd_z(key & 24'hFFFFFF) !== ref_m.zb[key]) begin
        if (bad < 5) $display("  %s z[%h] = %h, expected %h", tag, key & 24'hFFFFFF,
                              mem.rd_z(key & 24'hFFFFFF), ref_m.zb[key]);
        bad++;
      end
    end
    check(bad == 0, {tag, ": Z buffer contents"});
    check(mem.zb.size() == nref, {tag, ": no Z word written outside the reference"});
  endtask

  initial begin
    int c[4], dc[4], uv[6];
    int t0, t1;
    int unsigned wr0;
    logic [31:0] pix[$];
    word_q q, q2;

    ref_m = new();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // cycles issued before reset took hold do not count
    mem.n_mref = 0;
    mem.n_xfer = 0;

    // 1. colour and Z fill of a background rectangle, Z at the far plane
    run(fill(1, 0, 0, 48, 12, 32'h10_20_30_40, 24'hFF_FFFF));
    wait_idle();
    compare("fill");

    // 2. Gouraud span with Z test and Z write on an owned row
    c  = '{10 << 12, 200 << 12, 50 << 12, 255 << 12};
    dc = '{3 << 12, -(5 << 12), 1 << 11, 0};
    uv = '{default: 0};
    run(span(OP_SPAN, SRC_INTERP, 1, 1, 0, 1, 5, 30, c, dc, 24'h80_0000 << 8, -(24'h01_0000 << 8), uv, 0));
    wait_idle();
    compare("gouraud span");

    // 3. a span partly behind the previous one: some pixels fail the Z test
    c  = '{100 << 12, 100 << 12, 100 << 12, 255 << 12};
    dc = '{0, 0, 0, 0};
    wr0 = mem.n_fb_wr;
    run(span(OP_SPAN, SRC_INTERP, 1, 1, 0, 1, 0, 40, c, dc, 24'h70_0000 << 8, 0, uv, 0));
    wait_idle();
    compare("z-tested span");
    check(mem.n_fb_wr - wr0 < 40 && mem.n_fb_wr - wr0 > 0, "Z test rejected part of the span");

    // 4. alpha-blended span (alpha interpolated from 0 to 255)
    c  = '{250 << 12, 0, 128 << 12, 0};
    dc = '{0, 8 << 12, 0, 9 << 12};
    run(span(OP_SPAN, SRC_BLEND, 0, 0, 0, 5, 2, 30, c, dc, 0, 0, uv, 0));
    wait_idle();
    compare("blended span");

    // 5. plane-masked span, then the mask back to all ones
    run(mask_ld(32'h00FF_00F0));
    c  = '{255 << 12, 255 << 12, 255 << 12, 255 << 12};
    dc = '{0, 0, 0, 0};
    run(span(OP_SPAN, SRC_MASKED, 0, 0, 0, 5, 0, 20, c, dc, 0, 0, uv, 0));
    run(mask_ld(32'hFFFF_FFFF));
    wait_idle();
    compare("masked span");

    // 6. constant input value span (register R_CONST)
    run(span(OP_SPAN, SRC_INPUT, 0, 0, 0, 9, 60, 7, c, dc, 0, 0, uv, 32'hDEAD_BEEF));
    wait_idle();
    compare("input span");

    // 7. block transfer into the screen, then a bit-plane transfer
    pix.delete();
    for (int i = 0; i < 29; i++) pix.push_back($urandom);
    run(blt(SRC_INPUT, 0, 13, 300, pix));
    run(mask_ld(32'hF0F0_0F0F));
    pix.delete();
    for (int i = 0; i < 12; i++) pix.push_back($urandom);
    run(blt(SRC_MASKED, 0, 13, 305, pix));
    run(mask_ld(32'hFFFF_FFFF));
    wait_idle();
    compare("block transfer");

    // 8. texture store: 16 x 16 texels at columns 1280.., rows 0..15
    for (int v = 0; v < 16; v++) begin
      pix.delete();
      for (int u = 0; u < 16; u++) pix.push_back({8'(v * 16 + u), 8'(u * 16), 8'(v * 16), 8'(u + v)});
      run(blt(SRC_INPUT, 1, v, SCREEN_W, pix));
    end
    // texture-mapped span: U quadratic (0.5 + 0.25 i + 0.01 i^2), V linear
    uv = '{32'h0000_8000, 32'h0000_4000, 32'h0000_0290, 32'h0002_0000, 32'h0000_6000, 0};
    run(span(OP_TSPAN, SRC_INTERP, 0, 0, 0, 17, 400, 25, c, dc, 0, 0, uv, 0));
    wait_idle();
    compare("texture span");

    // 9. antialiased X-major line, blended by coverage; Y-major line backwards
    c  = '{255 << 12, 40 << 12, 40 << 12, 255 << 12};
    dc = '{0, 1 << 12, 0, 0};
    run(line(SRC_BLEND, 0, 0, 1, 0, 0, 0, 20, 500, 60, c, dc, 0, 0, 32'sh0000_5555));
    run(line(SRC_INTERP, 1, 1, 0, 1, 0, 1, 60, 600, 40, c, dc, 24'h10 << 8, 0, -32'sh0000_3000));
    wait_idle();
    compare("lines");

    // 10. empty span does nothing
    wr0 = mem.n_fb_wr;
    run(span(OP_SPAN, SRC_INTERP, 0, 0, 0, 1, 0, 0, c, dc, 0, 0, uv, 0));
    wait_idle();
    check(mem.n_fb_wr == wr0, "empty span writes nothing");

    // 11. rate: 100-pixel Z-buffered Gouraud span, sent back to back with a
    //     second one so that its loading overlaps the first one's execution
    run(fill(1, 101, 0, 200, 1, 32'h0, 24'hFF_FFFF));
    wait_idle();
    c  = '{0, 0, 0, 255 << 12};
    dc = '{1 << 12, 2 << 12, 1 << 10, 0};
    q  = span(OP_SPAN, SRC_INTERP, 1, 1, 0, 101, 10, 100, c, dc, 24'h20_0000 << 8, 24'h100 << 8, uv, 0);
    q2 = span(OP_SPAN, SRC_INTERP, 1, 1, 0, 101, 50, 100, c, dc, 24'h10_0000 << 8, 24'h100 << 8, uv, 0);
    overlap_loads = 0;
    t0 = $time / 10;
    send(q);
    ref_m.exec(q, ID);
    send(q2);
    ref_m.exec(q2, ID);
    wait_idle();
    t1 = $time / 10;
    $display("two 100-pixel Z-buffered spans: %0d clocks", t1 - t0);
    check(t1 - t0 <= 2 * 8 * 100, "span rate at least 5 Mpixel/s per BBI at 40 MHz");
    check(overlap_loads > 0, "next instruction loaded during execution");
    compare("rate spans");

    // 12. double buffer: display buffer 1, draw into buffer 0, with memory
    //     refresh and display refresh requests arriving while drawing
    run(rfsh_ld(1, 100));
    wait_idle();
    check(disp_buf == 1'b1, "displayed buffer switched");
    c  = '{30 << 12, 60 << 12, 90 << 12, 255 << 12};
    dc = '{0, 0, 0, 0};
    q  = span(OP_SPAN, SRC_INTERP, 0, 0, 0, 21, 0, 200, c, dc, 0, 0, uv, 0);
    fork
      run(q);
      begin
        repeat (40) @(negedge clk);
        mref_req = 1'b1; @(negedge clk); mref_req = 1'b0;
        repeat (10) @(negedge clk);
        dref_req = 1'b1; @(negedge clk); dref_req = 1'b0;
        repeat (3) @(negedge clk);
        dref_req = 1'b1; @(negedge clk); dref_req = 1'b0;
      end
    join
    wait_idle();
    compare("drawing buffer");
    check(mem.n_mref == 1, $sformatf("memory refresh cycle issued (%0d)", mem.n_mref));
    check(mem.n_xfer == 2, "two display row transfers issued");
    check(mem.last_xfer == FB_ADDR_W'({1'b1, 10'd101, 11'd0}), "row transfer address from refresh counter");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
