// tb_bbi_cmd_input_fsm: self-checking testbench of the command input state
// machine. Random instructions (header plus 0..31 data words) are offered
// with random gaps; a model of the execution side takes the Ready files in
// order after a random delay and returns Done. Checked: each instruction's
// words land in one file at register 0 (header) and 1..n (data), files
// alternate, input is refused exactly while the file being filled is
// still Ready, a file is marked Ready only after its last word, and loading
// of the next instruction overlaps execution of the current one.
module tb_bbi_cmd_input_fsm;
  import bbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     cmd_valid = 1'b0, cmd_ready;
  logic [WORD_W-1:0]        cmd_data = '0;
  logic                     load, load_bank;
  logic [$clog2(NREGS)-1:0] load_idx;
  logic [WORD_W-1:0]        load_data;
  logic [1:0]               ready;
  logic [1:0]               done = '0;

  bbi_cmd_input_fsm dut (.*);

  typedef logic [31:0] word_q [$];
  int checks = 0, failures = 0;
  word_q stream;              // words still to offer
  logic [31:0] allw [$];      // all instruction words in order
  int    start [$];           // index of each instruction's header in allw
  logic [31:0] file [2][NREGS];
  int  n_exec = 0, n_overlap = 0, exp_bank = 0, cur = 0, exp_idx = 0;
  bit  exec_bank = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int nwords_of(int n);
    header_t h;
    h = header_t'(allw[start[n]]);
    return int'(h.nwords);
  endfunction

  logic last_taken;
  always @(posedge clk) last_taken <= cmd_valid && cmd_ready;

  // register file model and load checks
  always @(posedge clk) if (rst_n) begin
    check(cmd_ready == !ready[load_bank], "input refused only while the file is still Ready");
    if (load) begin
      check(load_data == cmd_data, "load data is the command word");
      check(int'(load_bank) == exp_bank, "alternating files");
      check(int'(load_idx) == exp_idx, "register index");
      file[load_bank][load_idx] = load_data;
      if (exp_idx == nwords_of(cur)) begin
        exp_idx = 0; exp_bank ^= 1; cur++;
      end else exp_idx++;
    end
  end

  // input driver: blocking assignments at the falling edge
  always @(negedge clk) if (rst_n) begin
    if (!cmd_valid || last_taken) begin
      if (stream.size() > 0 && ($urandom % 4) != 0) begin
        cmd_valid = 1'b1; cmd_data = stream.pop_front();
      end else cmd_valid = 1'b0;
    end
  end
  // execution model
  initial begin
    int k = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      done = '0;
      if (ready[exec_bank]) begin
        int b;
        b = start[k];
        for (int i = 0; i <= nwords_of(k); i++)
          check(file[exec_bank][i] == allw[b + i], $sformatf("instruction %0d word %0d", k, i));
        repeat ($urandom % 40) begin
          @(negedge clk);
          if (load) n_overlap++;
        end
        done[exec_bank] = 1'b1;
        exec_bank ^= 1;
        k++;
        n_exec++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      word_q q;
      header_t h;
      q.delete();
      h = '0;
      h.op = opcode_e'($urandom % 7);
      h.nwords = 5'($urandom % 32);
      q.push_back(32'(h));
      for (int j = 0; j < int'(h.nwords); j++) q.push_back($urandom);
      start.push_back(allw.size());
      foreach (q[j]) begin stream.push_back(q[j]); allw.push_back(q[j]); end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_exec < 200) @(posedge clk);
    check(n_overlap > 0, "loading overlapped execution");
    check(stream.size() == 0 && cur == 200, "all words loaded");
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
