// tb_gen_xfer: self-checking testbench of the generic two-step transfer unit.
// A random bus issues address steps (only when d_ready allows) while a random
// control unit inserts wait states. A reference model of the one-deep data
// step predicts, every cycle, which transfer must be in its data step, the
// value of d_ready, and the data paths. A second phase issues an address step
// every cycle with no wait states and checks that N transfers complete in
// N + 1 cycles (address step overlapped with the previous data step).
module tb_gen_xfer;
  import fgdta_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  bus_ctrl_in_t  a_ctrl, x_ctrl;
  bus_ctrl_out_t x_rsp;
  logic [31:0]   d_wdata, d_rdata, x_wdata, x_rdata;
  logic          d_ready, d_active;

  int checks = 0, failures = 0;

  gen_xfer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bus_ctrl_in_t ref_q;
  int completed;

  // One cycle: drive at the falling edge, check, then predict the next state.
  task automatic cycle(input bit rand_ready, input int valid_pct);
    @(negedge clk);
    x_rsp.ready = rand_ready ? ($urandom_range(3, 0) != 0) : 1'b1;
    x_rdata     = $urandom;
    d_wdata     = $urandom;
    a_ctrl      = '0;
    #1;
    check(d_ready == (!ref_q.sel || x_rsp.ready), "d_ready");
    check(d_active == ref_q.sel, "d_active");
    check(x_ctrl.sel == ref_q.sel, "data step select");
    if (ref_q.sel) begin
      check(x_ctrl.write == ref_q.write && x_ctrl.addr == ref_q.addr, "data step control");
      check(x_wdata == d_wdata && d_rdata == x_rdata, "data paths");
    end
    if (ref_q.sel && x_rsp.ready) completed++;
    if ((!ref_q.sel || x_rsp.ready) && ($urandom_range(99, 0) < valid_pct)) begin
      a_ctrl.sel   = 1'b1;
      a_ctrl.write = $urandom_range(1, 0);
      a_ctrl.addr  = $urandom;
    end
    if (a_ctrl.sel) ref_q = a_ctrl;
    else if (ref_q.sel && x_rsp.ready) ref_q.sel = 1'b0;
  endtask

  initial begin
    a_ctrl = '0; x_rsp = '0; x_rdata = '0; d_wdata = '0; ref_q = '0; completed = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // random traffic with wait states
    repeat (2000) cycle(1'b1, 60);
    repeat (3) cycle(1'b0, 0);
    check(completed > 500, "random phase made progress");
    // back-to-back transfers, no wait states: one per cycle
    completed = 0;
    repeat (50) cycle(1'b0, 100);
    cycle(1'b0, 0);
    check(completed == 50, "50 pipelined transfers in 51 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
