// tb_raster_engine: self-checking testbench of the raster engine (command
// distributor plus four BBIs with their memories). Three sources send
// random mixes of all seven instructions (Z-buffered and blended spans,
// texture-mapped spans, antialiased lines, fills, block transfers into the
// screen and, broadcast, into the texture store, plane-mask loads and
// refresh-register loads) with random gaps, into overlapping screen areas.
// The reference model applies each instruction in the order the distributor
// granted it; at the end all four frame and Z buffers must match the model
// word for word, with nothing written outside it. Refresh requests arrive
// throughout.
module tb_raster_engine;
  import bbi_pkg::*;
  import bbi_ref_pkg::*;

  localparam int NI = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NI-1:0]        in_valid, in_ready;
  logic [31:0]          in_data [NI];
  logic                 mref_req = 1'b0, dref_req = 1'b0;
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

  raster_engine #(.N_IN(NI)) dut (.*);

  for (genvar k = 0; k < N_BBI; k++) begin : g_mem
    vram_model u_mem (
      .clk, .fb_cyc(fb_cyc[k]), .fb_maddr(fb_maddr[k]), .fb_mwdata(fb_mwdata[k]),
      .fb_mrdata(fb_mrdata[k]), .z_cyc(z_cyc[k]), .z_maddr(z_maddr[k]),
      .z_mwdata(z_mwdata[k]), .z_mrdata(z_mrdata[k])
    );
  end

  int checks = 0, failures = 0;
  RefModel ref_m;

  // per source: all instruction words, and where each instruction starts
  logic [31:0] allw  [NI][$];
  int          start [NI][$];
  int          next_i [NI];
  int          rd_ptr [NI];
  int          n_ops [8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sources
  logic [NI-1:0] v_r;
  logic [31:0]   d_r [NI];
  assign in_valid = v_r;
  assign in_data  = d_r;

  always @(posedge clk) begin
    if (!rst_n) v_r <= '0;
    else for (int s = 0; s < NI; s++) begin
      if (!v_r[s] || in_ready[s]) begin
        if (rd_ptr[s] < allw[s].size() && ($urandom % 100) >= 20) begin
          v_r[s] <= 1'b1;
          d_r[s] <= allw[s][rd_ptr[s]];
          rd_ptr[s] <= rd_ptr[s] + 1;
        end else v_r[s] <= 1'b0;
      end
    end
  end

  // apply instructions to the model in grant order
  always @(posedge clk) if (rst_n && !dut.u_dist.locked && dut.u_dist.any_valid) begin
    int s, b, n;
    word_q q;
    header_t h;
    s = int'(dut.u_dist.pick);
    b = start[s][next_i[s]];
    h = header_t'(allw[s][b]);
    n = int'(h.nwords);
    q.delete();
    for (int i = 0; i <= n; i++) q.push_back(allw[s][b + i]);
    next_i[s]++;
    n_ops[h.op]++;
    ref_m.exec(q);
  end

  task automatic add(int s, word_q q);
    start[s].push_back(allw[s].size());
    foreach (q[i]) allw[s].push_back(q[i]);
  endtask

  function automatic word_q rand_instr(int s);
    int c[4], dc[4], uv[6];
    int kind, x, y;
    logic [31:0] pix[$];
    kind = $urandom % 100;
    x = $urandom % 120;
    y = $urandom % 40;
    for (int i = 0; i < 4; i++) begin
      c[i]  = ($urandom % 256) << CFRAC;
      dc[i] = int'($urandom % (16 << CFRAC)) - (8 << CFRAC);
    end
    uv = '{($urandom % 16) << PFRAC, int'($urandom % (1 << PFRAC)), int'($urandom % 512) - 256,
           ($urandom % 16) << PFRAC, int'($urandom % (1 << PFRAC)), int'($urandom % 512) - 256};
    if (kind < 35)
      return span(OP_SPAN, src_sel_e'($urandom % 4), $urandom, $urandom, $urandom % 2, y, x,
                  $urandom % 40, c, dc, ($urandom % (1 << 24)) << ZFRAC,
                  int'($urandom % (1 << 16)) - (1 << 15), uv, $urandom, 20);
    if (kind < 45)
      return span(OP_TSPAN, src_sel_e'($urandom % 3), $urandom, $urandom, 0, y, x,
                  $urandom % 30, c, dc, ($urandom % (1 << 24)) << ZFRAC, 0, uv, $urandom, 20);
    if (kind < 65)
      // a line carries no constant input word, so it never selects the input
      return line(src_sel_e'(1 + $urandom % 3), $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                  20 + y, 40 + x, $urandom % 40, c, dc, ($urandom % (1 << 24)) << ZFRAC,
                  int'($urandom % (1 << 16)) - (1 << 15), int'($urandom % (2 << PFRAC)) - (1 << PFRAC));
    if (kind < 73)
      return fill($urandom, y, x, 1 + $urandom % 12, 1 + $urandom % 6, $urandom, $urandom % (1 << 24));
    if (kind < 90) begin
      int n;
      bit tex;
      n = 1 + $urandom % MAX_BLT;
      tex = ($urandom % 3) == 0;
      for (int i = 0; i < n; i++) pix.push_back($urandom);
      // block transfers copy (SRC_INPUT) or plane-mask (SRC_MASKED) pixels
      return blt(($urandom % 2) ? SRC_INPUT : SRC_MASKED, tex, y, tex ? SCREEN_W + $urandom % 32 : x, pix);
    end
    if (kind < 95) return mask_ld(($urandom % 2) ? 32'hFFFF_FFFF : $urandom);
    return rfsh_ld($urandom, $urandom % FB_ROWS);
  endfunction

  initial begin
    forever begin
      repeat (200 + $urandom % 200) @(negedge clk);
      mref_req = 1'b1; @(negedge clk); mref_req = 1'b0;
      repeat (50 + $urandom % 100) @(negedge clk);
      dref_req = 1'b1; @(negedge clk); dref_req = 1'b0;
    end
  end

  task automatic compare_all();
    int bad = 0, n_fb = 0, n_z = 0;
    foreach (ref_m.fb[key]) begin
      logic [31:0] got;
      case (int'(key >> 24))
        0: got = g_mem[0].u_mem.rd_fb(key & 24'hFFFFFF);
        1: got = g_mem[1].u_mem.rd_fb(key & 24'hFFFFFF);
        2: got = g_mem[2].u_mem.rd_fb(key & 24'hFFFFFF);
        default: got = g_mem[3].u_mem.rd_fb(key & 24'hFFFFFF);
      endcase
      n_fb++;
      if (got !== ref_m.fb[key]) begin
        if (bad < 5) $display("  bbi%0d fb[%h] = %h, expected %h", key >> 24, key & 24'hFFFFFF, got, ref_m.fb[key]);
        bad++;
      end
    end
    foreach (ref_m.zb[key]) begin
      logic [Z_W-1:0] got;
      case (int'(key >> 24))
        0: got = g_mem[0].u_mem.rd_z(key & 24'hFFFFFF);
        1: got = g_mem[1].u_mem.rd_z(key & 24'hFFFFFF);
        2: got = g_mem[2].u_mem.rd_z(key & 24'hFFFFFF);
        default: got = g_mem[3].u_mem.rd_z(key & 24'hFFFFFF);
      endcase
      n_z++;
      if (got !== ref_m.zb[key]) begin
        if (bad < 5) $display("  bbi%0d z[%h] = %h, expected %h", key >> 24, key & 24'hFFFFFF, got, ref_m.zb[key]);
        bad++;
      end
    end
    $display("bad %0d compared %0d frame buffer words and %0d Z words", bad, n_fb, n_z);
    check(bad == 0, "frame and Z buffers match the reference");
    check(g_mem[0].u_mem.fb.size() + g_mem[1].u_mem.fb.size() + g_mem[2].u_mem.fb.size() +
          g_mem[3].u_mem.fb.size() == n_fb, "no frame buffer word written outside the reference");
    check(g_mem[0].u_mem.zb.size() + g_mem[1].u_mem.zb.size() + g_mem[2].u_mem.zb.size() +
          g_mem[3].u_mem.zb.size() == n_z, "no Z word written outside the reference");
  endtask

  initial begin
    ref_m = new();
    for (int s = 0; s < NI; s++) begin next_i[s] = 0; rd_ptr[s] = 0; end
    // textures first, so textured spans read known texels
    for (int v = 0; v < 20; v++) begin
      logic [31:0] pix[$];
      pix.delete();
      for (int i = 0; i < 24; i++) pix.push_back($urandom);
      add(2, blt(SRC_INPUT, 1, v, SCREEN_W, pix));
    end
    for (int s = 0; s < NI; s++)
      for (int i = 0; i < 250; i++) add(s, rand_instr(s));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (busy || rd_ptr[0] < allw[0].size() || rd_ptr[1] < allw[1].size() ||
           rd_ptr[2] < allw[2].size()) @(posedge clk);
    repeat (5) @(posedge clk);
    while (busy) @(posedge clk);
    for (int s = 0; s < NI; s++) check(next_i[s] == start[s].size(), "every instruction granted");
    for (int o = 0; o < 7; o++) check(n_ops[o] > 0, $sformatf("instruction %0d sent", o));
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("rd_ptr %0d %0d %0d of %0d %0d %0d, granted %0d %0d %0d, busy %b locked %b valid %b tgt %b taken %b",
             rd_ptr[0], rd_ptr[1], rd_ptr[2], allw[0].size(), allw[1].size(), allw[2].size(),
             next_i[0], next_i[1], next_i[2], busy, dut.u_dist.locked, in_valid, dut.u_dist.tgt, dut.u_dist.taken);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
