// tb_bbi_color_channel: self-checking testbench of one colour channel.
// Random start values and derivatives are loaded and stepped; at every
// pixel all four new-value sources (input, interpolated or texel, alpha
// blend, plane mask) and the coverage-scaled alpha output are compared with
// values computed here in closed form (start + i * derivative, saturated).
module tb_bbi_color_channel;
  import bbi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        load = 1'b0, step = 1'b0, use_tex = 1'b0, mask_input = 1'b0, aa = 1'b0;
  logic [31:0] start = '0, delta = '0;
  logic [7:0]  input_val = '0, old_val = '0, tex_val = '0, alpha = '0, mask = '0, coverage = '0;
  src_sel_e    src = SRC_INTERP;
  logic [7:0]  interp_val, alpha_info, new_val;

  bbi_color_channel dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] sat(longint v);
    if (v < 0) return 0;
    if ((v >>> CFRAC) > 255) return 255;
    return 8'(v >>> CFRAC);
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      int len;
      logic [31:0] s0, d0;
      s0 = $urandom % (256 << CFRAC);
      d0 = 32'($signed(($urandom % (64 << CFRAC))) - (32 << CFRAC));
      len = 1 + $urandom % 40;
      @(negedge clk);
      start = s0; delta = d0; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < len; i++) begin
        logic [7:0] base, exp_blend, exp_mask, exp_info;
        int a9, c9;
        longint acc;
        input_val = $urandom; old_val = $urandom; tex_val = $urandom; alpha = $urandom;
        mask = $urandom; coverage = $urandom; use_tex = $urandom; aa = $urandom;
        mask_input = $urandom;
        src = src_sel_e'($urandom % 4);
        #1;
        acc = longint'($signed(s0)) + longint'(i) * longint'($signed(d0));
        acc = longint'($signed(32'(acc)));
        base = use_tex ? tex_val : sat(acc);
        check(interp_val == sat(acc), "interpolated value");
        a9 = int'(alpha) + int'(alpha[7]);
        exp_blend = 8'((int'(base) * a9 + int'(old_val) * (256 - a9)) >> 8);
        exp_mask = ((mask_input ? input_val : base) & mask) | (old_val & ~mask);
        c9 = int'(coverage) + int'(coverage[7]);
        exp_info = aa ? 8'((int'(base) * c9) >> 8) : base;
        check(alpha_info == exp_info, "alpha info");
        case (src)
          SRC_INPUT:  check(new_val == input_val, "input select");
          SRC_INTERP: check(new_val == base, "interpolator select");
          SRC_BLEND:  check(new_val == exp_blend, "alpha blend");
          default:    check(new_val == exp_mask, "plane mask");
        endcase
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
    end
    // blending end points
    @(negedge clk);
    start = 200 << CFRAC; delta = 0; load = 1'b1;
    @(negedge clk);
    load = 1'b0; use_tex = 1'b0; aa = 1'b0; src = SRC_BLEND; old_val = 8'd10;
    alpha = 8'd255; #1 check(new_val == 8'd200, "alpha 255 gives the new value");
    alpha = 8'd0;   #1 check(new_val == 8'd10, "alpha 0 keeps the old value");
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
