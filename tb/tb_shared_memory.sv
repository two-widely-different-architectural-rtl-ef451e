// tb_shared_memory: self-checking testbench of the shared memory (eight
// port controllers, crossbar, eight memory controllers, 32 modules) at its
// default size. Phase 1: all eight ports write random 2-D strided blocks
// into their own address ranges at once, competing for memory controllers.
// Phase 2: all ports read random strided blocks anywhere; every word must
// equal a model memory. Phase 3: bandwidth. Eight unit-stride vectors
// started on different controllers and modules must move at least seven words per
// clock (peak eight, 1,280 Mbyte/s at 40 MHz), a vector whose stride keeps hitting
// one module must slow to one word per module cycle, and eight ports sharing
// one controller must finish together (round-robin fairness). Crossbar contention
// and busy-module stalls are counted and must both occur.
module tb_shared_memory;
  import smem_pkg::*;

  localparam int AW = 17;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          cmd_valid [N_PORT], cmd_ready [N_PORT], cmd_write [N_PORT];
  logic [AW-1:0] cmd_base [N_PORT], cmd_stride [N_PORT], cmd_stride2 [N_PORT];
  logic [15:0]   cmd_count [N_PORT], cmd_count2 [N_PORT];
  logic          wr_valid [N_PORT], wr_ready [N_PORT], rd_valid [N_PORT], busy [N_PORT];
  logic [31:0]   wr_data [N_PORT], rd_data [N_PORT];

  shared_memory dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [int];
  logic [31:0] wq [N_PORT][$];    // write data still to send
  logic [31:0] eq [N_PORT][$];    // read data expected
  int n_words = 0, n_contend = 0, n_modbusy = 0;
  int last_gnt [N_PORT];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // write data streams and read checks
  always_comb begin
    for (int p = 0; p < N_PORT; p++) begin
      wr_valid[p] = wq[p].size() > 0;
      wr_data[p]  = (wq[p].size() > 0) ? wq[p][0] : '0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N_PORT; p++) begin
      if (wr_valid[p] && wr_ready[p]) void'(wq[p].pop_front());
      if (rd_valid[p]) begin
        if (eq[p].size() == 0) check(1'b0, $sformatf("port %0d: unexpected read data", p));
        else check(rd_data[p] == eq[p].pop_front(), $sformatf("port %0d: read data", p));
      end
      if (dut.p_valid[p] && !dut.p_gnt[p]) begin
        int m;
        m = int'(dut.p_addr[p][2:0]);
        if (dut.m_free[m][dut.p_addr[p][4:3]]) n_contend++;
        else n_modbusy++;
      end
      if (dut.p_valid[p] && dut.p_gnt[p]) begin
        n_words++;
        last_gnt[p] = int'($time / 10);
      end
    end
  end

  // Start a command on port p; the data of a write are queued, the words a
  // read must return are computed from the model.
  task automatic start(int p, bit w, int base, int s1, int c1, int s2, int c2);
    int n1, n2;
    n1 = (c1 == 0) ? 1 : c1;
    n2 = (c2 == 0) ? 1 : c2;
    for (int j = 0; j < n2; j++)
      for (int i = 0; i < n1; i++) begin
        int a;
        a = (base + j * s2 + i * s1) & ((1 << AW) - 1);
        if (w) begin
          logic [31:0] d;
          d = $urandom;
          model[a] = d;
          wq[p].push_back(d);
        end else begin
          eq[p].push_back(model.exists(a) ? model[a] : 32'hDEAD_BEEF);
        end
      end
    cmd_valid[p] = 1'b1; cmd_write[p] = w; cmd_base[p] = AW'(base);
    cmd_stride[p] = AW'(s1); cmd_count[p] = 16'(c1); cmd_stride2[p] = AW'(s2); cmd_count2[p] = 16'(c2);
  endtask

  task automatic wait_all();
    bit any;
    @(negedge clk);
    for (int p = 0; p < N_PORT; p++) cmd_valid[p] = 1'b0;
    do begin
      @(negedge clk);
      any = 0;
      for (int p = 0; p < N_PORT; p++) if (busy[p] || wq[p].size() > 0 || eq[p].size() > 0) any = 1;
    end while (any);
  endtask

  initial begin
    int t0, t1;
    real rate;
    for (int p = 0; p < N_PORT; p++) begin
      cmd_valid[p] = 0; cmd_write[p] = 0; cmd_base[p] = 0; cmd_stride[p] = 0;
      cmd_count[p] = 0; cmd_stride2[p] = 0; cmd_count2[p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // phase 1: fill each port's own 16K-word range with strided 2-D blocks
    for (int r = 0; r < 6; r++) begin
      @(negedge clk);
      for (int p = 0; p < N_PORT; p++)
        start(p, 1, p * 16384 + r * 2048, 1 + $urandom % 9, 1 + $urandom % 24, 32 + $urandom % 100, 1 + $urandom % 6);
      wait_all();
    end
    // whole range written once with a simple vector, so reads below hit known data
    @(negedge clk);
    for (int p = 0; p < N_PORT; p++) start(p, 1, p * 16384 + 12288, 1, 1024, 0, 0);
    wait_all();

    // phase 2: random strided reads anywhere written
    for (int r = 0; r < 10; r++) begin
      @(negedge clk);
      for (int p = 0; p < N_PORT; p++)
        start(p, 0, ($urandom % 8) * 16384 + 12288 + $urandom % 256, 1 + $urandom % 5, 1 + $urandom % 30,
              7 + $urandom % 40, 1 + $urandom % 5);
      wait_all();
    end
    // scalar reads (count 0 means one word)
    @(negedge clk);
    for (int p = 0; p < N_PORT; p++) start(p, 0, p * 16384 + 12288 + p, 0, 0, 0, 0);
    wait_all();

    // phase 3: peak bandwidth. Port p starts on controller p and module p mod 4,
    // so the four ports that reach a controller in consecutive clocks use
    // its four different modules.
    @(negedge clk);
    t0 = $time / 10;
    for (int p = 0; p < N_PORT; p++) start(p, 0, p * 16384 + 12288 + p + 8 * (p % 4), 1, 512, 0, 0);
    wait_all();
    t1 = $time / 10;
    rate = 8.0 * 512.0 / real'(t1 - t0);
    $display("8 x 512 words in %0d clocks: %0.2f words/clock = %0.0f Mbyte/s at 40 MHz", t1 - t0, rate, rate * 160.0);
    // once vectors drift into step, two ports sometimes want the same controller
    // in one clock; the loser waits, so the sustained rate is about 7 of 8
    check(rate >= 7.0, "sustained bandwidth at least 7 of 8 words per clock (peak 1,280 Mbyte/s)");

    // one module hit again and again: stride 32 stays in one module
    @(negedge clk);
    t0 = $time / 10;
    start(0, 0, 12288, 32, 32, 0, 0);
    wait_all();
    t1 = $time / 10;
    $display("32 words at stride 32: %0d clocks", t1 - t0);
    check((t1 - t0) >= 4 * 31 && (t1 - t0) <= 4 * 32 + 8, "same-module vector limited by the module cycle");

    // fairness: all eight ports read through memory controller 0 at once;
    // with round-robin grants they all finish within a few clocks
    @(negedge clk);
    for (int p = 0; p < N_PORT; p++) start(p, 0, 12288 + p * 8, 8, 64, 0, 0);
    wait_all();
    begin
      int lo, hi;
      lo = last_gnt[0]; hi = last_gnt[0];
      for (int p = 1; p < N_PORT; p++) begin
        if (last_gnt[p] < lo) lo = last_gnt[p];
        if (last_gnt[p] > hi) hi = last_gnt[p];
      end
      $display("8 ports sharing one controller: last grants within %0d clocks", hi - lo);
      check(hi - lo <= 16, "round-robin grants share one controller fairly");
    end

    $display("words moved=%0d crossbar contention=%0d busy-module stalls=%0d", n_words, n_contend, n_modbusy);
    check(n_contend > 0, "crossbar contention happened");
    check(n_modbusy > 0, "busy-module stalls happened");
    for (int p = 0; p < N_PORT; p++) check(eq[p].size() == 0 && wq[p].size() == 0, "all data moved");
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
