// fgdta_ahb: FGDTA communication interface on an AMBA AHB(-Lite) slave port.
//
// Maps the AHB pipeline onto the generic two-step transfer: an AHB address
// phase (HSEL, HTRANS NONSEQ or SEQ, HREADY high) is the address step, the
// AHB data phase is the data step, and HREADYOUT is the data-step ready. Since
// the next address phase overlaps the current data phase, back-to-back and
// burst transfers complete one word per cycle when the interface does not
// wait. IDLE and BUSY transfers are ignored. Behind the generic unit sits the
// FGDTA control unit, whose accelerator port (xdata, start, busy, ydata) is
// brought out.
//
// Choices of this design: only transfers of the full bus width are supported
// (HSIZE is checked by an assertion, not decoded); the response is always OKAY
// so HRESP is tied low; HBURST and HPROT are not needed and not ported. The
// register map and flow control are those of fgdta_ctrl: word 0 data, word 1
// status, wait states while an operand block or result is pending.
module fgdta_ahb
  import fgdta_pkg::*;
#(
  parameter int unsigned PROC_DS = fgdta_pkg::DEF_PROC_DS,
  parameter int unsigned ACC_DS  = fgdta_pkg::DEF_ACC_DS
) (
  input  logic                  hclk,
  input  logic                  hresetn,
  // AHB slave
  input  logic                  hsel,
  input  logic [DEF_ADDR_W-1:0] haddr,
  input  logic [1:0]            htrans,
  input  logic                  hwrite,
  input  logic [2:0]            hsize,
  input  logic [PROC_DS-1:0]    hwdata,
  input  logic                  hready,
  output logic                  hreadyout,
  output logic                  hresp,
  output logic [PROC_DS-1:0]    hrdata,
  // accelerator
  output logic [ACC_DS-1:0]     acc_xdata,
  output logic                  acc_start,
  input  logic                  acc_busy,
  input  logic [ACC_DS-1:0]     acc_ydata
);

  localparam logic [2:0] WORD_SIZE = 3'($clog2(PROC_DS / 8));

  bus_ctrl_in_t       a_ctrl, x_ctrl;
  bus_ctrl_out_t      x_rsp;
  logic [PROC_DS-1:0] x_wdata, x_rdata;
  logic               d_active;

  // HTRANS[1] is set for NONSEQ (2'b10) and SEQ (2'b11).
  assign a_ctrl.sel   = hsel && htrans[1] && hready;
  assign a_ctrl.write = hwrite;
  assign a_ctrl.addr  = haddr;

  gen_xfer #(.PROC_DS(PROC_DS)) u_xfer (
    .clk     (hclk),
    .rst_n   (hresetn),
    .a_ctrl  (a_ctrl),
    .d_wdata (hwdata),
    .d_ready (hreadyout),
    .d_active(d_active),
    .d_rdata (hrdata),
    .x_ctrl  (x_ctrl),
    .x_wdata (x_wdata),
    .x_rsp   (x_rsp),
    .x_rdata (x_rdata)
  );

  fgdta_ctrl #(.PROC_DS(PROC_DS), .ACC_DS(ACC_DS)) u_ctrl (
    .clk      (hclk),
    .rst_n    (hresetn),
    .x_ctrl   (x_ctrl),
    .x_wdata  (x_wdata),
    .x_rsp    (x_rsp),
    .x_rdata  (x_rdata),
    .acc_xdata(acc_xdata),
    .acc_start(acc_start),
    .acc_busy (acc_busy),
    .acc_ydata(acc_ydata)
  );

  assign hresp = 1'b0;  // OKAY

  word_transfers_only : assert property (
    @(posedge hclk) disable iff (!hresetn) a_ctrl.sel |-> hsize == WORD_SIZE)
    else $error("fgdta_ahb: only full-width transfers are supported");

  // A stretched data phase keeps its transfer.
  wait_state_holds : assert property (
    @(posedge hclk) disable iff (!hresetn) (d_active && !hreadyout) |=> d_active);

endmodule
