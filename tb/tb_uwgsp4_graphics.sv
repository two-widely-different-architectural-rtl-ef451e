// tb_uwgsp4_graphics: end-to-end test of the graphics datapath at its
// default sizes (512-word FIFOs, two pipelines of four stages, four BBIs).
// Behavioural models stand in for the processors: a head processor hands
// each polygon's spans to whichever pipeline has less queued work, and each
// stage processor forwards its input FIFO to its output FIFO (the
// span-generation stage of pipeline I is held back for a while, so the
// FIFOs fill up and push back). An image block transfer source writes an
// image into the screen and a texture into the texture store at the same
// time. Four VRAM models hold the frame and Z buffers.
//
// Checked: the final contents of all four frame and Z buffers against the
// reference model; throughput of Z-buffered Gouraud-shaded 100-pixel
// polygons (at least 200,000 per second at a 40 MHz clock) and of shaded
// 100-pixel lines (at least 250,000 per second); and that every mechanism
// happened at least once: FIFO back-pressure, arbitration between
// distributor sources, routed and broadcast instructions, each of the seven
// instructions, instruction loading overlapped with execution, Z-test
// rejection, memory and display refresh cycles stalling drawing, and the
// double-buffer swap.
module tb_uwgsp4_graphics;
  import bbi_pkg::*;
  import bbi_ref_pkg::*;

  localparam int NP = 2, NS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              ge_wr_valid [NP][NS+1];
  logic              ge_wr_ready [NP][NS+1];
  logic [31:0]       ge_wr_data  [NP][NS+1];
  logic              ge_rd_valid [NP][NS];
  logic              ge_rd_ready [NP][NS];
  logic [31:0]       ge_rd_data  [NP][NS];
  logic              ibt_valid, ibt_ready;
  logic [31:0]       ibt_data;
  logic              mref_req = 1'b0, dref_req = 1'b0;
  mem_cycle_e           fb_cyc    [N_BBI];
  logic [FB_ADDR_W-1:0] fb_maddr  [N_BBI];
  logic [31:0]          fb_mwdata [N_BBI];
  logic [31:0]          fb_mrdata [N_BBI];
  mem_cycle_e           z_cyc     [N_BBI];
  logic [Z_ADDR_W-1:0]  z_maddr   [N_BBI];
  logic [Z_W-1:0]       z_mwdata  [N_BBI];
  logic [Z_W-1:0]       z_mrdata  [N_BBI];
  logic [N_BBI-1:0]     disp_buf;
  logic                 busy;

  uwgsp4_graphics dut (
    .clk, .rst_n,
    .ge_wr_valid, .ge_wr_ready, .ge_wr_data,
    .ge_rd_valid, .ge_rd_ready, .ge_rd_data,
    .ibt_valid, .ibt_ready, .ibt_data,
    .mref_req, .dref_req,
    .fb_cyc, .fb_maddr, .fb_mwdata, .fb_mrdata,
    .z_cyc, .z_maddr, .z_mwdata, .z_mrdata,
    .disp_buf, .busy
  );

  for (genvar k = 0; k < N_BBI; k++) begin : g_mem
    vram_model u_mem (
      .clk, .fb_cyc(fb_cyc[k]), .fb_maddr(fb_maddr[k]), .fb_mwdata(fb_mwdata[k]),
      .fb_mrdata(fb_mrdata[k]), .z_cyc(z_cyc[k]), .z_maddr(z_maddr[k]),
      .z_mwdata(z_mwdata[k]), .z_mrdata(z_mrdata[k])
    );
  end

  int checks = 0, failures = 0;
  RefModel ref_m;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- head processor and stage processors ----------------
  logic [31:0] headq [NP][$];
  logic [31:0] ibtq [$];
  logic        head_v [NP];
  logic [31:0] head_d [NP];
  logic        hold_v [NP][NS+1];   // stage j (1..NS) output register
  logic [31:0] hold_d [NP][NS+1];
  logic        stall  [NP][NS+1];
  logic        ibt_v;
  logic [31:0] ibt_d;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      ge_wr_valid[p][0] = head_v[p];
      ge_wr_data[p][0]  = head_d[p];
      for (int j = 1; j <= NS; j++) begin
        ge_wr_valid[p][j]   = hold_v[p][j];
        ge_wr_data[p][j]    = hold_d[p][j];
        ge_rd_ready[p][j-1] = (!hold_v[p][j] || ge_wr_ready[p][j]) && !stall[p][j];
      end
    end
  end
  assign ibt_valid = ibt_v;
  assign ibt_data  = ibt_d;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        head_v[p] <= 1'b0;
        for (int j = 0; j <= NS; j++) hold_v[p][j] <= 1'b0;
      end
      ibt_v <= 1'b0;
    end else begin
      for (int p = 0; p < NP; p++) begin
        if (!head_v[p] || ge_wr_ready[p][0]) begin
          if (headq[p].size() > 0) begin
            head_v[p] <= 1'b1;
            head_d[p] <= headq[p].pop_front();
          end else head_v[p] <= 1'b0;
        end
        for (int j = 1; j <= NS; j++) begin
          if (ge_rd_valid[p][j-1] && ge_rd_ready[p][j-1]) begin
            hold_v[p][j] <= 1'b1;
            hold_d[p][j] <= ge_rd_data[p][j-1];
          end else if (ge_wr_ready[p][j]) begin
            hold_v[p][j] <= 1'b0;
          end
        end
      end
      if (!ibt_v || ibt_ready) begin
        if (ibtq.size() > 0) begin
          ibt_v <= 1'b1;
          ibt_d <= ibtq.pop_front();
        end else ibt_v <= 1'b0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_backpressure = 0, n_contended = 0, n_routed = 0, n_bcast = 0;
  int n_overlap = 0, n_zreject = 0, n_refresh_stall = 0, n_swap = 0;
  int n_op [8];
  int n_src [3];
  logic [N_BBI-1:0] disp_prev = '0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++)
      for (int j = 0; j <= NS; j++)
        if (ge_wr_valid[p][j] && !ge_wr_ready[p][j]) n_backpressure++;
    if (!dut.u_re.u_dist.locked && $countones(dut.u_re.u_dist.in_valid) > 1) n_contended++;
    if (!dut.u_re.u_dist.locked && dut.u_re.u_dist.any_valid) begin
      n_src[dut.u_re.u_dist.pick]++;
      if (dut.u_re.u_dist.h.bcast || !(dut.u_re.u_dist.h.op inside {OP_SPAN, OP_TSPAN, OP_BLT}))
        n_bcast++;
      else n_routed++;
    end
    if (disp_buf != disp_prev) n_swap++;
    disp_prev <= disp_buf;
  end

  for (genvar k = 0; k < N_BBI; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.u_re.g_bbi[k].u_bbi.load && dut.u_re.g_bbi[k].u_bbi.u_exec.state != 0) n_overlap++;
      if (dut.u_re.g_bbi[k].u_bbi.u_exec.wr_now && !dut.u_re.g_bbi[k].u_bbi.z_pass) n_zreject++;
      if (dut.u_re.g_bbi[k].u_bbi.mem_req && !dut.u_re.g_bbi[k].u_bbi.gnt) n_refresh_stall++;
      if (dut.u_re.g_bbi[k].u_bbi.u_exec.state == 1) n_op[dut.u_re.g_bbi[k].u_bbi.hdr.op]++;
    end
  end

  // ---------------- stimulus helpers ----------------
  function automatic int queued(int p);
    return headq[p].size();
  endfunction

  // Hand an instruction to the less loaded pipeline (or pipeline p >= 0).
  task automatic to_pipe(word_q q, int p = -1);
    if (p < 0) p = (queued(0) <= queued(1)) ? 0 : 1;
    foreach (q[i]) headq[p].push_back(q[i]);
    ref_m.exec(q);
  endtask

  task automatic to_ibt(word_q q);
    foreach (q[i]) ibtq.push_back(q[i]);
    ref_m.exec(q);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy || headq[0].size() > 0 || headq[1].size() > 0 || ibtq.size() > 0 ||
           head_v[0] || head_v[1] || ibt_v) @(posedge clk);
    // the stage registers
    repeat (4) @(posedge clk);
    while (busy) @(posedge clk);
  endtask

  // A 100-pixel polygon: ten 10-pixel Gouraud spans, Z constant per polygon.
  task automatic polygon(int x, int y, int zval, int seed, int p = -1);
    int c[4], dc[4], uv[6];
    uv = '{default: 0};
    if (p < 0) p = (queued(0) <= queued(1)) ? 0 : 1;
    for (int r = 0; r < 10; r++) begin
      c  = '{((seed * 37 + r * 9) % 200) << 12, ((seed * 11) % 250) << 12, (r * 20) << 12, 255 << 12};
      dc = '{2 << 12, -(1 << 11), 3 << 10, 0};
      to_pipe(span(OP_SPAN, SRC_INTERP, 1, 1, 0, y + r, x + r / 2, 10, c, dc,
                   zval << ZFRAC, 0, uv, 0, 12), p);
    end
  endtask

  task automatic compare_all(string tag);
    int bad = 0;
    int n_ref_fb [N_BBI];
    int n_ref_z [N_BBI];
    for (int k = 0; k < N_BBI; k++) begin n_ref_fb[k] = 0; n_ref_z[k] = 0; end
    foreach (ref_m.fb[key]) begin
      int k;
      logic [31:0] got;
      k = int'(key >> 24);
      n_ref_fb[k]++;
      case (k)
        0: got = g_mem[0].u_mem.rd_fb(key & 24'hFFFFFF);
        1: got = g_mem[1].u_mem.rd_fb(key & 24'hFFFFFF);
        2: got = g_mem[2].u_mem.rd_fb(key & 24'hFFFFFF);
        default: got = g_mem[3].u_mem.rd_fb(key & 24'hFFFFFF);
      endcase
      if (got !== ref_m.fb[key]) begin
        if (bad < 5) $display("  %s bbi%0d fb[%h] = %h, expected %h", tag, k, key & 24'hFFFFFF, got, ref_m.fb[key]);
        bad++;
      end
    end
    foreach (ref_m.zb[key]) begin
      int k;
      logic [Z_W-1:0] got;
      k = int'(key >> 24);
      n_ref_z[k]++;
      case (k)
        0: got = g_mem[0].u_mem.rd_z(key & 24'hFFFFFF);
        1: got = g_mem[1].u_mem.rd_z(key & 24'hFFFFFF);
        2: got = g_mem[2].u_mem.rd_z(key & 24'hFFFFFF);
        default: got = g_mem[3].u_mem.rd_z(key & 24'hFFFFFF);
      endcase
      if (got !== ref_m.zb[key]) begin
        if (bad < 5) $display("  %s bbi%0d z[%h] = %h, expected %h", tag, k, key & 24'hFFFFFF, got, ref_m.zb[key]);
        bad++;
      end
    end
    check(bad == 0, {tag, ": frame and Z buffers match the reference"});
    check(g_mem[0].u_mem.fb.size() == n_ref_fb[0] && g_mem[1].u_mem.fb.size() == n_ref_fb[1] &&
          g_mem[2].u_mem.fb.size() == n_ref_fb[2] && g_mem[3].u_mem.fb.size() == n_ref_fb[3],
          {tag, ": no frame buffer word written outside the reference"});
    check(g_mem[0].u_mem.zb.size() == n_ref_z[0] && g_mem[1].u_mem.zb.size() == n_ref_z[1] &&
          g_mem[2].u_mem.zb.size() == n_ref_z[2] && g_mem[3].u_mem.zb.size() == n_ref_z[3],
          {tag, ": no Z word written outside the reference"});
  endtask

  // memory refresh and display refresh requests from the system controller
  initial begin
    forever begin
      repeat (997) @(negedge clk);
      mref_req = 1'b1; @(negedge clk); mref_req = 1'b0;
      repeat (300) @(negedge clk);
      dref_req = 1'b1; @(negedge clk); dref_req = 1'b0;
    end
  end

  initial begin
    int t0, t1, cyc;
    int c[4], dc[4], uv[6];
    logic [31:0] pix[$];
    real rate;

    ref_m = new();
    for (int p = 0; p < NP; p++) for (int j = 0; j <= NS; j++) stall[p][j] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Draw into buffer 0 while buffer 1 is displayed; far-plane background.
    to_pipe(rfsh_ld(1, 0), 0);
    to_pipe(fill(1, 0, 0, 460, 64, 32'h00_10_10_30, 24'hFF_FFFF), 0);
    wait_idle();
    compare_all("background");

    // Polygons on both pipelines, with pipeline I's last stage held back so
    // its FIFOs fill; an image and a texture arrive on the block transfer
    // path at the same time.
    stall[0][NS] = 1'b1;
    for (int n = 0; n < 40; n++) polygon((n % 8) * 18, (n / 8) * 11, 24'h80_0000 - n * 24'h1_0000 + (n % 3) * 24'h20_0000, n, n % 2);
    for (int row = 0; row < 16; row++) begin
      for (int chunk = 0; chunk < 2; chunk++) begin
        pix.delete();
        for (int i = 0; i < 29; i++) pix.push_back({8'hFF, 8'(row * 8), 8'(chunk * 100 + i), 8'(i * 5)});
        to_ibt(blt(SRC_INPUT, 0, 200 + row, 700 + chunk * 29, pix));
      end
    end
    for (int v = 0; v < 8; v++) begin
      pix.delete();
      for (int u = 0; u < 8; u++) pix.push_back({8'hFF, 8'(u * 32), 8'(v * 32), 8'(u ^ v) << 4});
      to_ibt(blt(SRC_INPUT, 1, v, SCREEN_W, pix));
    end
    repeat (2500) @(posedge clk);
    stall[0][NS] = 1'b0;
    wait_idle();
    compare_all("polygons and image");

    // Rate: 100-pixel Z-buffered Gouraud polygons through both pipelines.
    t0 = $time / 10;
    for (int n = 0; n < 40; n++) polygon(300 + (n % 10) * 8, (n / 10) * 12, 24'h40_0000 + n * 24'h100, n + 7);
    wait_idle();
    t1 = $time / 10;
    cyc = t1 - t0;
    rate = 40.0e6 * 40.0 / real'(cyc);
    $display("40 polygons of 100 pixels: %0d clocks = %0.0f polygons/s at 40 MHz", cyc, rate);
    check(rate >= 200000.0, "polygon throughput at least 200,000 per second");
    compare_all("rate polygons");

    // Rate: 3-D shaded 100-pixel lines (X- and Y-major, one antialiased).
    t0 = $time / 10;
    for (int n = 0; n < 20; n++) begin
      c  = '{(n * 10) << 12, 255 << 12, 0, 255 << 12};
      dc = '{1 << 11, -(1 << 11), 2 << 12, 0};
      to_pipe(line(n == 0 ? SRC_BLEND : SRC_INTERP, 0, 0, n == 0, n % 2, 0, 0, 70 + n * 3, 500 + n * 7, 100, c, dc,
                   24'h30_0000 << 8, -(24'h100 << 8), (n % 2) ? 32'sh0000_8000 : 32'sh0000_2000), 1);
    end
    wait_idle();
    t1 = $time / 10;
    cyc = t1 - t0;
    rate = 40.0e6 * 20.0 / real'(cyc);
    $display("20 lines of 100 pixels: %0d clocks = %0.0f lines/s at 40 MHz", cyc, rate);
    check(rate >= 250000.0, "line throughput at least 250,000 per second");
    compare_all("lines");

    // Image transfer rate through the block transfer path.
    t0 = $time / 10;
    for (int row = 0; row < 8; row++) begin
      pix.delete();
      for (int i = 0; i < 29; i++) pix.push_back($urandom);
      to_ibt(blt(SRC_INPUT, 0, 300 + row, 900, pix));
    end
    wait_idle();
    t1 = $time / 10;
    rate = 40.0 * 8.0 * 29.0 / real'(t1 - t0);
    $display("block transfer: %0d pixels in %0d clocks = %0.1f Mpixel/s at 40 MHz", 8 * 29, t1 - t0, rate);
    check(rate >= 30.0, "block transfer at least 30 Mpixel/s");

    // Texture-mapped span, plane-masked span, then swap the buffers.
    c  = '{0, 0, 0, 255 << 12};
    dc = '{0, 0, 0, 0};
    uv = '{32'h0000_0000, 32'h0000_4000, 32'h0000_0100, 32'h0001_0000, 32'h0000_2000, 0};
    to_pipe(span(OP_TSPAN, SRC_INTERP, 1, 1, 0, 40, 200, 24, c, dc, 24'h10 << 8, 0, uv, 0, 18), 0);
    to_pipe(span(OP_TSPAN, SRC_INTERP, 0, 0, 0, 41, 200, 24, c, dc, 0, 0, uv, 0, 18), 0);
    wait_idle();
    to_pipe(mask_ld(32'h00FF_0000), 1);
    c  = '{255 << 12, 255 << 12, 255 << 12, 255 << 12};
    to_pipe(span(OP_SPAN, SRC_MASKED, 0, 0, 0, 42, 0, 50, c, dc, 0, 0, uv, 0, 12), 1);
    to_pipe(mask_ld(32'hFFFF_FFFF), 1);
    to_pipe(rfsh_ld(0, 512), 1);
    wait_idle();
    check(disp_buf == 4'b0000, "all BBIs display buffer 0 after the swap");
    // drawing now goes into buffer 1
    to_pipe(fill(0, 2, 0, 20, 4, 32'h11_22_33_44, 0), 0);
    wait_idle();
    compare_all("texture, mask, swap");

    check(g_mem[0].u_mem.n_mref > 0 && g_mem[3].u_mem.n_mref > 0, "memory refresh cycles issued");
    check(g_mem[1].u_mem.n_xfer > 0, "display row transfers issued");

    $display("mechanisms: backpressure=%0d contended=%0d routed=%0d broadcast=%0d overlap=%0d zreject=%0d refresh_stall=%0d swaps=%0d",
             n_backpressure, n_contended, n_routed, n_bcast, n_overlap, n_zreject, n_refresh_stall, n_swap);
    $display("instructions executed: span=%0d tspan=%0d line=%0d fill=%0d blt=%0d mask=%0d rfsh=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6]);
    $display("instructions by source: pipeline I=%0d pipeline II=%0d block transfer=%0d", n_src[0], n_src[1], n_src[2]);
    check(n_backpressure > 0, "FIFO back-pressure happened");
    check(n_contended > 0, "distributor sources contended");
    check(n_src[0] > 0 && n_src[1] > 0 && n_src[2] > 0, "all three distributor sources served");
    check(n_routed > 0 && n_bcast > 0, "routed and broadcast instructions");
    check(n_overlap > 0, "instruction loaded during execution");
    check(n_zreject > 0, "Z test rejected pixels");
    check(n_refresh_stall > 0, "refresh cycles stalled drawing");
    check(n_swap > 0, "double buffer swapped");
    for (int o = 0; o < 7; o++) check(n_op[o] > 0, $sformatf("instruction %0d executed", o));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
