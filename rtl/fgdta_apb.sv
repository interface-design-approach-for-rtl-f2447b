// fgdta_apb: FGDTA communication interface on an AMBA APB slave port.
//
// Maps the APB transfer onto the generic two-step transfer: the setup phase
// (PSEL high, PENABLE low) is the address step and the access phase (PSEL and
// PENABLE high) is the data step, which ends in the cycle where PREADY is
// high. An APB transfer therefore takes at least two cycles, which is why this
// port moves data at half the rate of the AHB port. Behind the generic unit
// sits the FGDTA control unit, whose accelerator port is brought out.
//
// Choices of this design: PREADY (APB3) is used to add wait states while an
// operand block or a result is pending, as fgdta_ctrl decides; PSLVERR is tied
// low; full-width transfers only (no PSTRB). Register map as in fgdta_ctrl.
module fgdta_apb
  import fgdta_pkg::*;
#(
  parameter int unsigned PROC_DS = fgdta_pkg::DEF_PROC_DS,
  parameter int unsigned ACC_DS  = fgdta_pkg::DEF_ACC_DS
) (
  input  logic                  pclk,
  input  logic                  presetn,
  // APB slave
  input  logic                  psel,
  input  logic                  penable,
  input  logic [DEF_ADDR_W-1:0] paddr,
  input  logic                  pwrite,
  input  logic [PROC_DS-1:0]    pwdata,
  output logic                  pready,
  output logic                  pslverr,
  output logic [PROC_DS-1:0]    prdata,
  // accelerator
  output logic [ACC_DS-1:0]     acc_xdata,
  output logic                  acc_start,
  input  logic                  acc_busy,
  input  logic [ACC_DS-1:0]     acc_ydata
);

  bus_ctrl_in_t       a_ctrl, x_ctrl;
  bus_ctrl_out_t      x_rsp;
  logic [PROC_DS-1:0] x_wdata, x_rdata, d_rdata;
  logic               d_ready, d_active;

  assign a_ctrl.sel   = psel && !penable;
  assign a_ctrl.write = pwrite;
  assign a_ctrl.addr  = paddr;

  gen_xfer #(.PROC_DS(PROC_DS)) u_xfer (
    .clk     (pclk),
    .rst_n   (presetn),
    .a_ctrl  (a_ctrl),
    .d_wdata (pwdata),
    .d_ready (d_ready),
    .d_active(d_active),
    .d_rdata (d_rdata),
    .x_ctrl  (x_ctrl),
    .x_wdata (x_wdata),
    .x_rsp   (x_rsp),
    .x_rdata (x_rdata)
  );

  fgdta_ctrl #(.PROC_DS(PROC_DS), .ACC_DS(ACC_DS)) u_ctrl (
    .clk      (pclk),
    .rst_n    (presetn),
    .x_ctrl   (x_ctrl),
    .x_wdata  (x_wdata),
    .x_rsp    (x_rsp),
    .x_rdata  (x_rdata),
    .acc_xdata(acc_xdata),
    .acc_start(acc_start),
    .acc_busy (acc_busy),
    .acc_ydata(acc_ydata)
  );

  // PREADY and PRDATA only matter in the access phase.
  assign pready  = penable ? d_ready : 1'b1;
  assign prdata  = (psel && penable) ? d_rdata : '0;
  assign pslverr = 1'b0;

  access_follows_setup : assert property (
    @(posedge pclk) disable iff (!presetn) (psel && penable) |-> d_active)
    else $error("fgdta_apb: access phase without setup phase");

endmodule
