// tb_fgdta_apb: self-checking testbench of the FGDTA interface on APB, with a
// 32-bit bus and a 64-bit accelerator model of latency LAT.
// Checks: results of random blocks; two cycles per transfer without wait
// states (the APB rate); the access-phase wait states of a result read issued
// right after the last operand word (1 + LAT + 2 cycles, less the setup cycle
// that overlaps the computation); the write stall of a queued second block;
// PSLVERR low.
module tb_fgdta_apb;
  import fgdta_pkg::*;
  localparam int unsigned LAT = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        psel, penable, pwrite, pready, pslverr, acc_start, acc_busy;
  logic [31:0] paddr, pwdata, prdata;
  logic [63:0] acc_xdata, acc_ydata;
  int          n_start, n_proto_err;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fgdta_apb dut (
    .pclk(clk), .presetn(rst_n), .psel, .penable, .paddr, .pwrite, .pwdata,
    .pready, .pslverr, .prdata,
    .acc_xdata, .acc_start, .acc_busy, .acc_ydata);

  acc_model #(.W(64), .LAT(LAT)) u_acc (
    .clk, .rst_n, .xdata(acc_xdata), .start(acc_start), .busy(acc_busy),
    .ydata(acc_ydata), .n_start, .n_proto_err);

  apb_master #(.DW(32)) m (.clk, .psel, .penable, .paddr, .pwrite, .pwdata, .pready, .prdata);

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

  function automatic logic [63:0] ref_op(input logic [63:0] x);
    return {x[63:32] + x[31:0], x[63:32] - x[31:0]};
  endfunction

  localparam logic [31:0] DATA = 32'h8000_0200;
  localparam logic [31:0] STAT = DATA + 4;

  initial begin
    logic [63:0] a, b, r;
    logic [31:0] rd;
    int c0, c1, c2, c3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int n = 0; n < 10; n++) begin
      a = {$urandom, $urandom};
      m.xfer(1, DATA, a[31:0], rd, c0);
      m.xfer(1, DATA, a[63:32], rd, c1);
      m.xfer(0, DATA, '0, r[31:0], c2);
      m.xfer(0, DATA, '0, r[63:32], c3);
      check(r == ref_op(a), "block result");
      check(c0 == 2 && c1 == 2 && c3 == 2, "two cycles per transfer");
      // setup cycle of the read overlaps the first computation cycle
      check(c2 == 2 + (1 + LAT + 2) - 1, $sformatf("first read took %0d cycles", c2));
      check(pslverr == 1'b0, "no slave error");
    end

    // APB rate: 16 status reads take 32 cycles
    c1 = 0;
    for (int i = 0; i < 16; i++) begin
      m.xfer(0, STAT, '0, rd, c0);
      c1 += c0;
      check(rd[3:0] == 4'b0000, "idle status");
    end
    check(c1 == 32, $sformatf("16 status reads in %0d cycles", c1));

    // two blocks queued
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    m.xfer(1, DATA, a[31:0], rd, c0);
    m.xfer(1, DATA, a[63:32], rd, c0);
    m.xfer(1, DATA, b[31:0], rd, c0);
    check(c0 > 2, $sformatf("write stall, %0d cycles", c0));
    m.xfer(1, DATA, b[63:32], rd, c0);
    m.xfer(0, DATA, '0, r[31:0], c0);
    m.xfer(0, DATA, '0, r[63:32], c0);
    check(r == ref_op(a), "first queued block");
    m.xfer(0, DATA, '0, r[31:0], c0);
    check(c0 > 2, "second result waits");
    m.xfer(0, DATA, '0, r[63:32], c0);
    check(r == ref_op(b), "second queued block");

    check(n_start == 12 && n_proto_err == 0, "accelerator starts and protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
