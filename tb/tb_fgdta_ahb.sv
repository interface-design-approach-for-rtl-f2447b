// tb_fgdta_ahb: self-checking testbench of the FGDTA interface on AHB, with a
// 32-bit bus and a 64-bit accelerator model of latency LAT.
// Checks: results of random blocks written and read back in one pipelined
// sequence; the wait states of the first result read (1 + LAT + 2 cycles after
// the last operand word); the sequence length; one transfer per cycle for a
// burst of status reads (the AHB rate); the write stall when a second block is
// queued; that IDLE transfers and unselected transfers are ignored.
module tb_fgdta_ahb;
  import fgdta_pkg::*;
  localparam int unsigned LAT = 4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        hsel, hwrite, hreadyout, hresp, acc_start, acc_busy;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic [2:0]  hsize;
  logic [63:0] acc_xdata, acc_ydata;
  int          n_start, n_proto_err;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fgdta_ahb dut (
    .hclk(clk), .hresetn(rst_n), .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
    .hready(hreadyout), .hreadyout, .hresp, .hrdata,
    .acc_xdata, .acc_start, .acc_busy, .acc_ydata);

  acc_model #(.W(64), .LAT(LAT)) u_acc (
    .clk, .rst_n, .xdata(acc_xdata), .start(acc_start), .busy(acc_busy),
    .ydata(acc_ydata), .n_start, .n_proto_err);

  ahb_master #(.DW(32)) m (.clk, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
                           .hready(hreadyout), .hrdata);

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

  localparam logic [31:0] BASE = 32'h8000_0100;
  localparam logic [31:0] DATA = BASE;
  localparam logic [31:0] STAT = BASE + 4;

  initial begin
    logic [63:0] a, b, r;
    int cyc, ww, wr;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // write one block and read the result in one pipelined sequence
    for (int n = 0; n < 10; n++) begin
      a = {$urandom, $urandom};
      m.push(1, DATA, a[31:0]);
      m.push(1, DATA, a[63:32]);
      m.push(0, DATA, '0);
      m.push(0, DATA, '0);
      m.run(cyc, ww, wr);
      r[31:0]  = m.rdata_q.pop_front();
      r[63:32] = m.rdata_q.pop_front();
      check(r == ref_op(a), "block result");
      check(ww == 0, "operand writes without wait");
      check(wr == 1 + LAT + 2, $sformatf("read waits %0d", wr));
      check(cyc == 5 + wr, $sformatf("sequence length %0d", cyc));
      check(hresp == 1'b0, "OKAY response");
    end

    // AHB rate: a burst of 16 status reads completes in 17 cycles
    for (int i = 0; i < 16; i++) m.push(0, STAT, '0);
    m.run(cyc, ww, wr);
    check(cyc == 17 && wr == 0, $sformatf("16 status reads in %0d cycles", cyc));
    for (int i = 0; i < 16; i++) begin
      r[31:0] = m.rdata_q.pop_front();
      check(r[3:0] == 4'b0000, "idle status");
    end

    // two blocks queued: the second block's first word waits
    a = {$urandom, $urandom};
    b = {$urandom, $urandom};
    m.push(1, DATA, a[31:0]); m.push(1, DATA, a[63:32]);
    m.push(1, DATA, b[31:0]); m.push(1, DATA, b[63:32]);
    m.push(0, DATA, '0); m.push(0, DATA, '0);
    m.push(0, DATA, '0); m.push(0, DATA, '0);
    m.run(cyc, ww, wr);
    check(ww == 1 + LAT + 2, $sformatf("write stall %0d", ww));
    r[31:0] = m.rdata_q.pop_front(); r[63:32] = m.rdata_q.pop_front();
    check(r == ref_op(a), "first queued block");
    r[31:0] = m.rdata_q.pop_front(); r[63:32] = m.rdata_q.pop_front();
    check(r == ref_op(b), "second queued block");
    check(wr > 0, "second result waits");

    // IDLE transfers and HSEL low are ignored
    @(negedge clk);
    hsel = 1'b1; htrans = 2'b00; hwrite = 1'b1; haddr = DATA;
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b10;
    @(negedge clk);
    htrans = 2'b00;
    m.push(0, STAT, '0);
    m.run(cyc, ww, wr);
    r[31:0] = m.rdata_q.pop_front();
    check(r[ST_IN_FULL] == 1'b0, "ignored transfers write nothing");
    a = {$urandom, $urandom};
    m.push(1, DATA, a[31:0]); m.push(1, DATA, a[63:32]);
    m.push(0, DATA, '0); m.push(0, DATA, '0);
    m.run(cyc, ww, wr);
    r[31:0] = m.rdata_q.pop_front(); r[63:32] = m.rdata_q.pop_front();
    check(r == ref_op(a), "block after ignored transfers");

    check(n_start == 13 && n_proto_err == 0, "accelerator starts and protocol");
    check(m.overlap_cnt > 0, "address and data phases overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
