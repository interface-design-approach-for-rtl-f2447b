// ctrl_tester: drives one fgdta_ctrl of a given configuration through the
// generic data-step port and checks it against a reference, for tb_fgdta_ctrl.
// The accelerator is acc_model with a fixed latency LAT, so the number of wait
// cycles of a read that follows the last operand write is known:
// 1 + N_OP * (LAT + 2), where N_OP is the number of accelerator runs per block.
// Checked: results of random blocks (width conversion in the configured
// direction), that cycle count, the status register, a read with nothing
// pending, and the write stall when a second block is written while the
// first is still being computed.
module ctrl_tester
  import fgdta_pkg::*;
#(
  parameter int unsigned PROC_DS = 32,
  parameter int unsigned ACC_DS  = 64,
  parameter int unsigned LAT     = 3,
  parameter int unsigned NBLK    = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned BUF_W = (PROC_DS > ACC_DS) ? PROC_DS : ACC_DS;
  localparam int unsigned N_PW  = BUF_W / PROC_DS;
  localparam int unsigned N_OP  = BUF_W / ACC_DS;
  localparam int unsigned WB    = PROC_DS / 8;       // bytes per word

  bus_ctrl_in_t       x_ctrl;
  bus_ctrl_out_t      x_rsp;
  logic [PROC_DS-1:0] x_wdata, x_rdata;
  logic [ACC_DS-1:0]  acc_xdata, acc_ydata;
  logic               acc_start, acc_busy;
  int                 n_start, n_proto_err;

  fgdta_ctrl #(.PROC_DS(PROC_DS), .ACC_DS(ACC_DS)) dut (.*);

  acc_model #(.W(ACC_DS), .LAT(LAT)) u_acc (
    .clk, .rst_n, .xdata(acc_xdata), .start(acc_start), .busy(acc_busy),
    .ydata(acc_ydata), .n_start, .n_proto_err);

  function automatic logic [ACC_DS-1:0] ref_op(input logic [ACC_DS-1:0] x);
    logic [ACC_DS/2-1:0] hi, lo;
    hi = x[ACC_DS-1:ACC_DS/2];
    lo = x[ACC_DS/2-1:0];
    return {hi + lo, hi - lo};
  endfunction

  function automatic logic [BUF_W-1:0] ref_block(input logic [BUF_W-1:0] b);
    logic [BUF_W-1:0] r;
    for (int k = 0; k < N_OP; k++) r[k*ACC_DS +: ACC_DS] = ref_op(b[k*ACC_DS +: ACC_DS]);
    return r;
  endfunction

  function automatic logic [BUF_W-1:0] rand_block();
    logic [BUF_W-1:0] b;
    for (int i = 0; i < BUF_W; i++) b[i] = $urandom_range(1, 0);
    return b;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [P%0d/A%0d] %s at %0t", PROC_DS, ACC_DS, what, $time);
    end
  endtask

  // One data step; returns the read data and the number of wait cycles.
  task automatic step(input bit wr, input int unsigned word, input logic [PROC_DS-1:0] wd,
                      output logic [PROC_DS-1:0] rd, output int waits);
    waits = 0;
    @(negedge clk);
    x_ctrl.sel   = 1'b1;
    x_ctrl.write = wr;
    x_ctrl.addr  = word * WB;
    x_wdata      = wd;
    forever begin
      #1;
      if (x_rsp.ready) break;
      waits++;
      @(negedge clk);
    end
    rd = x_rdata;
    @(posedge clk);
    #1 x_ctrl.sel = 1'b0;
  endtask

  task automatic write_block(input logic [BUF_W-1:0] b, output int first_waits);
    logic [PROC_DS-1:0] rd;
    int w;
    for (int i = 0; i < N_PW; i++) begin
      step(1'b1, REG_DATA, b[i*PROC_DS +: PROC_DS], rd, w);
      if (i == 0) first_waits = w;
      else check(w == 0, "later operand words do not wait");
    end
  endtask

  task automatic read_block(output logic [BUF_W-1:0] r, output int first_waits);
    int w;
    for (int i = 0; i < N_PW; i++) begin
      step(1'b0, REG_DATA, '0, r[i*PROC_DS +: PROC_DS], w);
      if (i == 0) first_waits = w;
      else check(w == 0, "later result words do not wait");
    end
  endtask

  initial begin
    logic [BUF_W-1:0] a, b, r;
    logic [PROC_DS-1:0] rd;
    int w, w2;
    done = 1'b0; checks = 0; failures = 0;
    x_ctrl = '0; x_wdata = '0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);

    // nothing pending: a read completes at once with 0
    step(1'b0, REG_DATA, '0, rd, w);
    check(w == 0 && rd == '0, "idle read returns 0 without waiting");

    // single blocks with a blocking read: results and latency
    for (int n = 0; n < NBLK; n++) begin
      a = rand_block();
      write_block(a, w);
      check(w == 0, "first operand word does not wait when idle");
      read_block(r, w);
      check(r == ref_block(a), "block result");
      check(w == 1 + N_OP * (LAT + 2), $sformatf("result latency %0d", w));
    end
    check(n_start == NBLK * N_OP, "one start per accelerator run");

    // status while running, then when the result is ready
    a = rand_block();
    write_block(a, w);
    step(1'b0, REG_STATUS, '0, rd, w);
    check(w == 0 && rd[ST_IN_FULL] && !rd[ST_RES_FULL], "status with operands full");
    step(1'b0, REG_STATUS, '0, rd, w);
    check(w == 0 && rd[ST_RUNNING] && rd[ST_IN_FULL] && !rd[ST_RES_FULL], "status while running");
    repeat (N_OP * (LAT + 2) + 2) @(posedge clk);
    step(1'b0, REG_STATUS, '0, rd, w);
    check(rd[ST_RES_FULL] && !rd[ST_RUNNING] && !rd[ST_IN_FULL], "status with result ready");
    read_block(r, w);
    check(w == 0 && r == ref_block(a), "result read after polling");

    // two blocks queued: the second waits for the first to be computed
    a = rand_block();
    b = rand_block();
    write_block(a, w);
    write_block(b, w2);
    check(w2 > 0, "second block waits while first is computed");
    read_block(r, w);
    check(r == ref_block(a), "first queued block result");
    read_block(r, w);
    check(r == ref_block(b), "second queued block result");
    check(w > 0, "second result read waits for its computation");
    check(n_proto_err == 0, "accelerator protocol respected");

    done = 1'b1;
  end
endmodule
