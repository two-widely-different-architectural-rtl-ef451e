// tb_command_distributor: self-checking testbench of the command
// distributor. Three sources offer random instruction streams (random
// opcodes, rows, lengths and broadcast bits, with random gaps between
// words), and the four BBI ports accept with random stalls. Every word each
// BBI receives is compared with the expected stream: the instructions in the
// order the distributor granted them, each one whole, sent only to the BBI
// owning its row (spans, textured spans, block transfers) or to all four
// (everything else, or when the broadcast bit is set). The grant order is
// also checked to be round robin when all sources wait, and the number of
// clocks per word is measured with no stalls (one word per clock plus one
// clock per instruction).
module tb_command_distributor;
  import bbi_pkg::*;

  localparam int NI = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NI-1:0]    in_valid, in_ready;
  logic [31:0]      in_data [NI];
  logic [N_BBI-1:0] bbi_valid, bbi_ready;
  logic [31:0]      bbi_data;

  command_distributor #(.N_IN(NI)) dut (.*);

  typedef logic [31:0] word_q [$];

  int checks = 0, failures = 0;
  word_q  instrs  [NI][$];     // instructions per source, in order
  int     next_i  [NI];        // next instruction each source will be granted
  word_q  words   [NI];        // flattened words still to offer
  word_q  expect_q [N_BBI];    // expected per-BBI word streams
  int     gap_pct = 30, stall_pct = 30;
  int     grants [$];
  bit     all_waiting [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_q rand_instr(int s, int serial);
    word_q q;
    header_t h;
    h = '0;
    h.op     = opcode_e'($urandom % 7);
    h.nwords = 5'($urandom % 32);
    h.bcast  = ($urandom % 5) == 0;
    h.y      = 10'($urandom);
    h.src    = src_sel_e'(s);
    q.push_back(32'(h));
    for (int i = 0; i < int'(h.nwords); i++) q.push_back({8'(s), 8'(serial), 16'(i)});
    return q;
  endfunction

  // source drivers
  logic [NI-1:0] v_r;
  logic [31:0]   d_r [NI];
  assign in_valid = v_r;
  assign in_data  = d_r;

  always @(posedge clk) begin
    if (!rst_n) v_r <= '0;
    else for (int s = 0; s < NI; s++) begin
      if (!v_r[s] || in_ready[s]) begin
        if (words[s].size() > 0 && ($urandom % 100) >= gap_pct) begin
          v_r[s] <= 1'b1;
          d_r[s] <= words[s].pop_front();
        end else v_r[s] <= 1'b0;
      end
    end
  end

  // BBI ports and monitors
  always @(negedge clk) begin
    for (int k = 0; k < N_BBI; k++) bbi_ready[k] = ($urandom % 100) >= stall_pct;
  end

  always @(posedge clk) if (rst_n) begin
    if (!dut.locked && dut.any_valid) begin
      int s;
      header_t h;
      word_q q;
      s = int'(dut.pick);
      all_waiting.push_back(&in_valid);
      grants.push_back(s);
      q = instrs[s][next_i[s]];
      next_i[s]++;
      h = header_t'(q[0]);
      check(in_data[s] == q[0], "granted word is an instruction header");
      for (int k = 0; k < N_BBI; k++)
        if (h.bcast || !(h.op inside {OP_SPAN, OP_TSPAN, OP_BLT}) || int'(h.y[1:0]) == k)
          foreach (q[i]) expect_q[k].push_back(q[i]);
    end
    for (int k = 0; k < N_BBI; k++) if (bbi_valid[k] && bbi_ready[k]) begin
      if (expect_q[k].size() == 0) check(1'b0, $sformatf("BBI %0d got an unexpected word", k));
      else check(bbi_data == expect_q[k].pop_front(), $sformatf("BBI %0d word in order", k));
    end
  end

  task automatic load(int n);
    for (int s = 0; s < NI; s++) begin
      for (int j = 0; j < n; j++) begin
        word_q q;
        q = rand_instr(s, instrs[s].size());
        instrs[s].push_back(q);
        foreach (q[i]) words[s].push_back(q[i]);
      end
    end
  endtask

  task automatic drain();
    while (words[0].size() + words[1].size() + words[2].size() > 0 || |v_r || dut.locked)
      @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int t0, nw;
    for (int s = 0; s < NI; s++) next_i[s] = 0;
    bbi_ready = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    // random traffic with gaps and stalls
    load(150);
    drain();
    for (int k = 0; k < N_BBI; k++) check(expect_q[k].size() == 0, $sformatf("BBI %0d received everything", k));
    for (int s = 0; s < NI; s++) check(next_i[s] == instrs[s].size(), "every instruction granted");

    // round robin with all sources busy
    gap_pct = 0; stall_pct = 0;
    grants.delete(); all_waiting.delete();
    load(20);
    t0 = $time / 10;
    nw = 0;
    for (int s = 0; s < NI; s++) nw += words[s].size();
    drain();
    begin
      int rr_ok = 1;
      for (int i = 1; i < grants.size(); i++)
        if (all_waiting[i] && grants[i] != (grants[i-1] + 1) % NI) rr_ok = 0;
      check(rr_ok == 1, "round-robin grant order");
    end
    $display("%0d words of 60 instructions in %0d clocks", nw, $time / 10 - t0);
    check(($time / 10 - t0) <= nw + 60 + 8, "one word per clock plus one clock per instruction");
    for (int k = 0; k < N_BBI; k++) check(expect_q[k].size() == 0, $sformatf("BBI %0d received everything", k));

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
