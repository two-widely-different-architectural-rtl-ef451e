// bbi_ref_pkg: testbench helpers for the raster engine. It builds
// instruction word sequences and holds a reference model that computes, for
// each instruction, what every BBI's frame and Z buffer should contain
// afterwards. The model is written pixel by pixel in closed form (value =
// start + i * derivative, U = U0 + i*dU + i*(i-1)/2 * d2U, minor axis =
// start + i * slope) rather than by the running sums the hardware uses, so
// the two are independent.
package bbi_ref_pkg;
  import bbi_pkg::*;

  typedef logic [31:0] word_q[$];

  function automatic logic [31:0] hdr(opcode_e op, src_sel_e src, bit zen, bit zwr,
                                      bit aa, bit ymajor, bit xneg, bit yneg,
                                      int nwords, bit bcast, int y);
    header_t h;
    h = '0;
    h.op = op; h.src = src; h.zen = zen; h.zwr = zwr; h.aa = aa;
    h.ymajor = ymajor; h.xneg = xneg; h.yneg = yneg;
    h.nwords = 5'(nwords); h.bcast = bcast; h.y = Y_W'(y);
    return 32'(h);
  endfunction

  // Span (general or texture mapped): colours r,g,b,a are 8.12 start values
  // with 20.12 derivatives; z is 24.8. uv = {U, dU, d2U, V, dV, d2V}.
  function automatic word_q span(opcode_e op, src_sel_e src, bit zen, bit zwr, bit aa,
                                 int y, int x, int len,
                                 int c[4], int dc[4], int z, int dz,
                                 int uv[6], int konst, int nw = 20);
    word_q q;
    q.push_back(hdr(op, src, zen, zwr, aa, 0, 0, 0, nw, 0, y));
    q.push_back(32'(x));
    q.push_back(32'(len));
    for (int i = 0; i < 4; i++) q.push_back(32'(c[i]));
    for (int i = 0; i < 4; i++) q.push_back(32'(dc[i]));
    q.push_back(32'(z));
    q.push_back(32'(dz));
    for (int i = 0; i < 6; i++) q.push_back(32'(uv[i]));
    q.push_back(32'd0);          // slope
    q.push_back(32'(konst));     // constant input pixel
    while (q.size() > nw + 1) void'(q.pop_back());
    return q;
  endfunction

  function automatic word_q line(src_sel_e src, bit zen, bit zwr, bit aa,
                                 bit ymajor, bit xneg, bit yneg,
                                 int y, int x, int len, int c[4], int dc[4],
                                 int z, int dz, int slope);
    word_q q;
    int uv[6] = '{default: 0};
    q = span(OP_LINE, src, zen, zwr, aa, y, x, len, c, dc, z, dz, uv, 0, 19);
    q[0] = hdr(OP_LINE, src, zen, zwr, aa, ymajor, xneg, yneg, 19, 0, y);
    q[R_SLOPE] = 32'(slope);
    return q;
  endfunction

  function automatic word_q fill(bit zwr, int y, int x, int w, int h, logic [31:0] argb, int z);
    word_q q;
    int c[4], dc[4], uv[6];
    dc = '{default: 0}; uv = '{default: 0};
    c[0] = int'(argb[23:16]) << CFRAC; c[1] = int'(argb[15:8]) << CFRAC;
    c[2] = int'(argb[7:0]) << CFRAC;   c[3] = int'(argb[31:24]) << CFRAC;
    q = span(OP_FILL, SRC_INTERP, 0, zwr, 0, y, x, w, c, dc, z << ZFRAC, 0, uv, 0, 12);
    q[R_LEN] = {4'd0, 12'(h), 4'd0, 12'(w)};
    // derivatives are ignored by a fill: put noise there to show it
    for (int i = 0; i < 4; i++) q[R_DR + i] = 32'h0000_1357;
    q[R_DZ] = 32'h0000_2468;
    return q;
  endfunction

  function automatic word_q blt(src_sel_e src, bit bcast, int y, int x, logic [31:0] pix[$]);
    word_q q;
    q.push_back(hdr(OP_BLT, src, 0, 0, 0, 0, 0, 0, 2 + pix.size(), bcast, y));
    q.push_back(32'(x));
    q.push_back(32'(pix.size()));
    foreach (pix[i]) q.push_back(pix[i]);
    return q;
  endfunction

  function automatic word_q mask_ld(logic [31:0] m);
    word_q q;
    q.push_back(hdr(OP_MASK, SRC_INPUT, 0, 0, 0, 0, 0, 0, 1, 0, 0));
    q.push_back(m);
    return q;
  endfunction

  function automatic word_q rfsh_ld(bit buf_sel, int row);
    word_q q;
    q.push_back(hdr(OP_RFSH, SRC_INPUT, 0, 0, 0, 0, 0, 0, 1, 0, 0));
    q.push_back({buf_sel, 21'd0, 10'(row)});
    return q;
  endfunction

  function automatic logic [7:0] clamp8(longint v);
    longint ip;
    ip = v >>> CFRAC;
    if (v < 0) return 8'd0;
    if (ip > 255) return 8'd255;
    return 8'(ip);
  endfunction

  function automatic int unsigned fb_a(bit b, int y, int x);
    return {b, 10'(y), 11'(x)};
  endfunction

  function automatic int unsigned z_a(int y, int x);
    return {10'(y), 11'(x)};
  endfunction

  function automatic int clampi(longint v, int lim);
    longint ip;
    ip = v >>> PFRAC;
    if (ip < 0) return 0;
    if (ip > lim - 1) return lim - 1;
    return int'(ip);
  endfunction

  function automatic logic [7:0] scale8(logic [7:0] v, logic [7:0] f);
    int f9;
    f9 = int'(f) + int'(f[7]);
    return 8'((int'(v) * f9) >> 8);
  endfunction

  class RefModel;
    logic [31:0]    fb [int unsigned];   // key {bank, address}
    logic [Z_W-1:0] zb [int unsigned];
    logic [31:0]    mask [N_BBI];
    bit             disp [N_BBI];
    int unsigned    pixels_drawn;

    function new();
      foreach (mask[k]) begin mask[k] = '1; disp[k] = 0; end
      pixels_drawn = 0;
    endfunction

    function logic [31:0] rfb(int k, int unsigned a);
      int unsigned key = (k << 24) | a;
      return fb.exists(key) ? fb[key] : 32'd0;
    endfunction
    function logic [Z_W-1:0] rz(int k, int unsigned a);
      int unsigned key = (k << 24) | a;
      return zb.exists(key) ? zb[key] : '0;
    endfunction

    // Apply one instruction to the BBIs it reaches (as the distributor
    // routes it). only >= 0 restricts it to that BBI (single-BBI tests).
    function void exec(word_q w, int only = -1);
      header_t h;
      h = header_t'(w[0]);
      for (int k = 0; k < N_BBI; k++) begin
        bit tgt;
        if (only >= 0) tgt = (k == only);
        else tgt = h.bcast || !(h.op inside {OP_SPAN, OP_TSPAN, OP_BLT}) || (int'(h.y[1:0]) == k);
        if (tgt) exec_bbi(w, k);
      end
    endfunction

    function void exec_bbi(word_q w, int k);
      header_t h;
      int x0, y0, len, rows, n;
      bit draw;
      h = header_t'(w[0]);
      if (h.op == OP_MASK) begin mask[k] = w[1]; return; end
      if (h.op == OP_RFSH) begin disp[k] = w[1][31]; return; end
      draw = !disp[k];
      x0 = int'(w[R_X][10:0]);
      y0 = int'(h.y);
      len = int'(w[R_LEN][11:0]);
      rows = (h.op == OP_FILL) ? int'(w[R_LEN][27:16]) : 1;
      if (h.op == OP_LINE) rows = 1;
      n = len * rows;
      for (int i = 0; i < n; i++) begin
        int x, y;
        logic [7:0] cov, newc[4], basec[4], oldc[4], inc[4], texc[4], mk[4];
        logic [7:0] ainfo;
        logic [31:0] oldp, texp, inp;
        logic [Z_W-1:0] newz, oldz;
        longint zacc;
        bit on_screen, pass;
        cov = 8'd255;
        if (h.op == OP_LINE) begin
          longint minor;
          if (h.ymajor) begin
            y = h.yneg ? y0 - i : y0 + i;
            minor = (longint'(x0) << PFRAC) + longint'(i) * longint'($signed(w[R_SLOPE]));
            x = int'((minor >>> PFRAC) & 11'h7ff);
          end else begin
            x = h.xneg ? x0 - i : x0 + i;
            minor = (longint'(y0) << PFRAC) + longint'(i) * longint'($signed(w[R_SLOPE]));
            y = int'((minor >>> PFRAC) & 10'h3ff);
          end
          cov = ~8'(minor >>> (PFRAC - 8));
          x &= 11'h7ff; y &= 10'h3ff;
        end else begin
          x = (x0 + i % len) & 11'h7ff;
          y = (y0 + i / len) & 10'h3ff;
        end
        on_screen = x < SCREEN_W;
        if (on_screen && (y % 4) != k) continue;
        // channel inputs, in A, R, G, B order (byte lanes 3..0)
        oldp = rfb(k, fb_a(draw, y, x));
        inp  = (h.op == OP_BLT) ? w[(R_PIX + i) % 32] : w[R_CONST];
        if (h.op == OP_TSPAN) begin
          int u, v;
          longint ua, va, ii;
          ii = i;
          ua = 32'($signed(w[R_U]) + ii * $signed(w[R_U+1]) + (ii * (ii - 1) / 2) * $signed(w[R_U+2]));
          va = 32'($signed(w[R_V]) + ii * $signed(w[R_V+1]) + (ii * (ii - 1) / 2) * $signed(w[R_V+2]));
          u = clampi(longint'($signed(32'(ua))), TEX_W);
          v = clampi(longint'($signed(32'(va))), FB_ROWS);
          texp = rfb(k, fb_a(draw, v, SCREEN_W + u));
        end else texp = 0;
        for (int c = 0; c < 4; c++) begin
          int lane, reg_i;
          longint acc;
          lane = 3 - c;
          reg_i = (c == 0) ? 3 : c - 1;
          acc = longint'($signed(w[R_R + reg_i]));
          if (h.op != OP_FILL) acc = longint'($signed(32'(acc + longint'(i) * longint'($signed(w[R_DR + reg_i])))));
          basec[c] = (h.op == OP_TSPAN) ? texp[8*lane +: 8] : clamp8(acc);
          oldc[c] = oldp[8*lane +: 8];
          inc[c]  = inp[8*lane +: 8];
          mk[c]   = mask[k][8*lane +: 8];
        end
        ainfo = h.aa ? scale8(basec[0], cov) : basec[0];
        for (int c = 0; c < 4; c++) begin
          case (h.src)
            SRC_INPUT:  newc[c] = inc[c];
            SRC_INTERP: newc[c] = basec[c];
            SRC_BLEND:  newc[c] = 8'((int'(basec[c]) * (int'(ainfo) + int'(ainfo[7])) +
                                      int'(oldc[c]) * (256 - int'(ainfo) - int'(ainfo[7]))) >> 8);
            default: begin
              logic [7:0] pre;
              pre = (h.op == OP_BLT) ? inc[c] : basec[c];
              newc[c] = (pre & mk[c]) | (oldc[c] & ~mk[c]);
            end
          endcase
        end
        zacc = longint'(w[R_Z]);
        if (h.op != OP_FILL) zacc += longint'(i) * longint'($signed(w[R_DZ]));
        if (zacc < 0) newz = '0;
        else if ((zacc >>> ZFRAC) > 64'hFFFFFF) newz = '1;
        else newz = Z_W'(zacc >>> ZFRAC);
        oldz = rz(k, z_a(y, x));
        pass = !(h.zen && on_screen) || (newz < oldz);
        if (pass) begin
          fb[(k << 24) | fb_a(draw, y, x)] = {newc[0], newc[1], newc[2], newc[3]};
          pixels_drawn++;
          if (h.zwr && on_screen) zb[(k << 24) | z_a(y, x)] = newz;
        end
      end
    endfunction
  endclass
endpackage
