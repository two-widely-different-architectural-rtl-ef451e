// tb_bbi_input_regfile: self-checking testbench of the pair of input
// register files. Random writes go to either file while the other (or the
// same) file is read; every word of the selected file must equal the model
// at all times, and a write to one file must never disturb the other.
module tb_bbi_input_regfile;
  import bbi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we = 1'b0, wbank = 1'b0, rbank = 1'b0;
  logic [$clog2(NREGS)-1:0] widx = '0;
  logic [WORD_W-1:0]        wdata = '0;
  logic [WORD_W-1:0]        rregs [NREGS];

  bbi_input_regfile dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [2][NREGS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // initialise both files
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < NREGS; i++) begin
        @(negedge clk);
        we = 1'b1; wbank = b[0]; widx = 5'(i); wdata = $urandom;
        model[b][i] = wdata;
      end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rbank = $urandom;
      #1;
      for (int i = 0; i < NREGS; i++)
        check(rregs[i] == model[rbank][i], $sformatf("file %0d word %0d", rbank, i));
      we = ($urandom % 3) != 0; wbank = $urandom; widx = $urandom; wdata = $urandom;
      if (we) model[wbank][widx] = wdata;
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
