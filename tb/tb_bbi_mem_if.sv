// tb_bbi_mem_if: self-checking testbench of the BBI memory interface.
// Random drawing requests compete with random memory refresh and display
// refresh (row transfer) requests. Checked every clock: a pending memory
// refresh is served first (both memories get a refresh cycle), then a
// pending row transfer (frame buffer transfer cycle at the transfer
// address), and only then is drawing granted with its own cycle types,
// addresses and data; every request is served exactly once; read data is
// passed straight back.
module tb_bbi_mem_if;
  import bbi_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 req = 1'b0, mref_req = 1'b0, dref_req = 1'b0;
  mem_cycle_e           fb_op = MC_IDLE, z_op = MC_IDLE;
  logic [FB_ADDR_W-1:0] fb_addr = '0, xfer_addr = '0, fb_maddr;
  logic [Z_ADDR_W-1:0]  z_addr = '0, z_maddr;
  logic [31:0]          fb_wdata = '0, fb_rdata, fb_mwdata, fb_mrdata = '0;
  logic [Z_W-1:0]       z_wdata = '0, z_rdata, z_mwdata, z_mrdata = '0;
  logic                 gnt, xfer_step;
  mem_cycle_e           fb_cyc, z_cyc;

  bbi_mem_if dut (.*);

  int checks = 0, failures = 0;
  int m_pend = 0, d_pend = 0, n_mref = 0, n_xfer = 0, n_req_mref = 0, n_req_dref = 0, n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      req = $urandom; fb_op = mem_cycle_e'($urandom % 3); z_op = mem_cycle_e'($urandom % 3);
      fb_addr = $urandom; z_addr = $urandom; fb_wdata = $urandom; z_wdata = $urandom;
      xfer_addr = $urandom; fb_mrdata = $urandom; z_mrdata = $urandom;
      #1;
      check(fb_rdata == fb_mrdata && z_rdata == z_mrdata, "read data passed back");
      if (m_pend > 0) begin
        check(fb_cyc == MC_MREF && z_cyc == MC_MREF && !gnt && !xfer_step, "memory refresh first");
        m_pend = 0; n_mref++;
      end else if (d_pend > 0) begin
        check(fb_cyc == MC_XFER && fb_maddr == xfer_addr && z_cyc == MC_IDLE && !gnt && xfer_step,
              "row transfer next");
        d_pend = 0; n_xfer++;
      end else begin
        check(gnt == req, "drawing granted when nothing is pending");
        check(!xfer_step, "no transfer step");
        if (req) check(fb_cyc == fb_op && z_cyc == z_op && fb_maddr == fb_addr && z_maddr == z_addr &&
                       fb_mwdata == fb_wdata && z_mwdata == z_wdata, "drawing cycle");
        else check(fb_cyc == MC_IDLE && z_cyc == MC_IDLE, "idle cycle");
      end
      if (req && !gnt) n_stall++;
      // new refresh requests become pending from the next clock
      mref_req = ($urandom % 40) == 0;
      dref_req = ($urandom % 40) == 0;
      if (mref_req) begin m_pend = 1; n_req_mref++; end
      if (dref_req) begin d_pend = 1; n_req_dref++; end
      @(posedge clk);
      #1;
      mref_req = 1'b0; dref_req = 1'b0;
    end
    check(n_stall > 0 && n_mref > 0 && n_xfer > 0, "refresh stalled drawing");
    $display("%0d/%0d memory refreshes, %0d/%0d row transfers, %0d stalled requests",
             n_mref, n_req_mref, n_xfer, n_req_dref, n_stall);
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
