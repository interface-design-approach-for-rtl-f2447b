// tb_soc_comm_top: end-to-end testbench of soc_comm_top at its default sizes
// (32-bit buses, 64-bit accelerators). An AHB master and an APB master run
// concurrently, each streaming NBLK operand blocks to its accelerator and
// reading the results back. The AHB side has a fixed-latency accelerator
// model; the APB side has one whose latency varies at random from run to run.
// Both masters use the overlapped schedule: write block n+1, then read the
// result of block n, so the interface computes one block while the next is
// loaded. Every result is compared with the butterfly computed here.
// Counted, and required to happen at least once: pipelined AHB address/data
// overlap, AHB and APB read wait states, AHB and APB write stalls, accelerator
// starts on both ports, a status poll that sees a result ready, and a data read
// with nothing pending. The bytes moved per cycle on each bus are printed, and
// the AHB port must be faster than the APB port.
module tb_soc_comm_top;
  import fgdta_pkg::*;
  localparam int unsigned NBLK = 200;
  localparam int unsigned LAT0 = 6;
  localparam int unsigned LAT1 = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  // AHB
  logic        ahb_hsel, ahb_hwrite, ahb_hreadyout, ahb_hresp;
  logic [31:0] ahb_haddr, ahb_hwdata, ahb_hrdata;
  logic [1:0]  ahb_htrans;
  logic [2:0]  ahb_hsize;
  // APB
  logic        apb_psel, apb_penable, apb_pwrite, apb_pready, apb_pslverr;
  logic [31:0] apb_paddr, apb_pwdata, apb_prdata;
  // accelerators
  logic [63:0] acc0_xdata, acc0_ydata, acc1_xdata, acc1_ydata;
  logic        acc0_start, acc0_busy, acc1_start, acc1_busy;
  int          n_start0, n_err0, n_start1, n_err1;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  soc_comm_top dut (
    .clk, .rst_n,
    .ahb_hsel, .ahb_haddr, .ahb_htrans, .ahb_hwrite, .ahb_hsize, .ahb_hwdata,
    .ahb_hready(ahb_hreadyout), .ahb_hreadyout, .ahb_hresp, .ahb_hrdata,
    .apb_psel, .apb_penable, .apb_paddr, .apb_pwrite, .apb_pwdata,
    .apb_pready, .apb_pslverr, .apb_prdata,
    .acc0_xdata, .acc0_start, .acc0_busy, .acc0_ydata,
    .acc1_xdata, .acc1_start, .acc1_busy, .acc1_ydata);

  acc_model #(.W(64), .LAT(LAT0)) u_acc0 (
    .clk, .rst_n, .xdata(acc0_xdata), .start(acc0_start), .busy(acc0_busy),
    .ydata(acc0_ydata), .n_start(n_start0), .n_proto_err(n_err0));

  acc_model #(.W(64), .LAT(LAT1), .RAND_LAT(1'b1)) u_acc1 (
    .clk, .rst_n, .xdata(acc1_xdata), .start(acc1_start), .busy(acc1_busy),
    .ydata(acc1_ydata), .n_start(n_start1), .n_proto_err(n_err1));

  ahb_master #(.DW(32)) mh (
    .clk, .hsel(ahb_hsel), .haddr(ahb_haddr), .htrans(ahb_htrans), .hwrite(ahb_hwrite),
    .hsize(ahb_hsize), .hwdata(ahb_hwdata), .hready(ahb_hreadyout), .hrdata(ahb_hrdata));

  apb_master #(.DW(32)) mp (
    .clk, .psel(apb_psel), .penable(apb_penable), .paddr(apb_paddr), .pwrite(apb_pwrite),
    .pwdata(apb_pwdata), .pready(apb_pready), .prdata(apb_prdata));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  localparam logic [31:0] AHB_DATA = 32'h8000_0100;
  localparam logic [31:0] AHB_STAT = AHB_DATA + 4;
  localparam logic [31:0] APB_DATA = 32'h8000_0200;
  localparam logic [31:0] APB_STAT = APB_DATA + 4;

  // mechanism counters
  int ahb_wait_rd = 0, ahb_wait_wr = 0, apb_wait_rd = 0, apb_wait_wr = 0;
  int poll_ready = 0, idle_read = 0;
  int ahb_cycles = 0, apb_cycles = 0;

  task automatic ahb_stream();
    logic [63:0] blk[$];
    logic [63:0] a, r;
    int cyc, ww, wr;
    // nothing pending: the data register reads as 0 without waiting
    mh.push(0, AHB_DATA, '0);
    mh.run(cyc, ww, wr);
    r[31:0] = mh.rdata_q.pop_front();
    check(r[31:0] == 0 && wr == 0, "AHB idle read");
    if (r[31:0] == 0 && wr == 0) idle_read++;
    for (int n = 0; n <= NBLK; n++) begin
      if (n < NBLK) begin
        a = {$urandom, $urandom};
        blk.push_back(a);
        mh.push(1, AHB_DATA, a[31:0]);
        mh.push(1, AHB_DATA, a[63:32]);
      end
      if (n > 0) begin
        mh.push(0, AHB_DATA, '0);
        mh.push(0, AHB_DATA, '0);
      end
      mh.run(cyc, ww, wr);
      ahb_cycles += cyc; ahb_wait_wr += ww; ahb_wait_rd += wr;
      if (n > 0) begin
        r[31:0]  = mh.rdata_q.pop_front();
        r[63:32] = mh.rdata_q.pop_front();
        a = blk.pop_front();
        check(r == ref_op(a), $sformatf("AHB block %0d", n - 1));
      end
    end
  endtask

  task automatic apb_stream();
    logic [63:0] blk[$];
    logic [63:0] a, r;
    logic [31:0] rd;
    int c;
    for (int n = 0; n <= NBLK; n++) begin
      if (n < NBLK) begin
        a = {$urandom, $urandom};
        blk.push_back(a);
        mp.xfer(1, APB_DATA, a[31:0], rd, c);  apb_cycles += c; if (c > 2) apb_wait_wr++;
        mp.xfer(1, APB_DATA, a[63:32], rd, c); apb_cycles += c;
      end
      if (n > 0) begin
        if (n % 16 == 0) begin
          // poll the status register until the result is ready
          do begin
            mp.xfer(0, APB_STAT, '0, rd, c); apb_cycles += c;
          end while (!rd[ST_RES_FULL]);
          poll_ready++;
        end
        mp.xfer(0, APB_DATA, '0, r[31:0], c);  apb_cycles += c; if (c > 2) apb_wait_rd++;
        mp.xfer(0, APB_DATA, '0, r[63:32], c); apb_cycles += c;
        a = blk.pop_front();
        check(r == ref_op(a), $sformatf("APB block %0d", n - 1));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fork
      ahb_stream();
      apb_stream();
    join
    check(ahb_hresp == 1'b0 && apb_pslverr == 1'b0, "no error responses");
    check(n_err0 == 0 && n_err1 == 0, "accelerator protocol respected");
    check(n_start0 == NBLK && n_start1 == NBLK, "one accelerator run per block");
    $display("mechanisms: ahb_overlap=%0d ahb_wait_rd=%0d ahb_wait_wr=%0d apb_wait_rd=%0d apb_wait_wr=%0d starts0=%0d starts1=%0d poll_ready=%0d idle_read=%0d",
             mh.overlap_cnt, ahb_wait_rd, ahb_wait_wr, apb_wait_rd, apb_wait_wr,
             n_start0, n_start1, poll_ready, idle_read);
    check(mh.overlap_cnt > 0, "AHB address/data overlap happened");
    check(ahb_wait_rd > 0,    "AHB read wait state happened");
    check(ahb_wait_wr > 0,    "AHB write stall happened");
    check(apb_wait_rd > 0,    "APB read wait state happened");
    check(apb_wait_wr > 0,    "APB write stall happened");
    check(n_start0 > 0 && n_start1 > 0, "accelerator starts happened");
    check(poll_ready > 0,     "status poll saw a result");
    check(idle_read > 0,      "idle read happened");
    // 16 bytes (8 in, 8 out) per block
    $display("throughput: AHB %0d bytes in %0d cycles, APB %0d bytes in %0d cycles",
             16 * NBLK, ahb_cycles, 16 * NBLK, apb_cycles);
    check(ahb_cycles < apb_cycles, "AHB port faster than APB port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
