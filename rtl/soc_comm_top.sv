// soc_comm_top: accelerator interfaces of a processor core, as in the
// reference system where one accelerator was connected through the FGDTA
// interface to each of the processor's two internal buses.
//
// Holds one FGDTA interface on the AHB bus (fgdta_ahb) and one on the APB bus
// (fgdta_apb). Both are configured for 32-bit buses and a 64-bit accelerator,
// the sizes of the reference experiment. The processor, the bus fabric and the
// accelerators are outside: each interface's bus slave port and its
// accelerator port (xdata, start, busy, ydata) are brought out. All logic runs
// on one clock with an active-low asynchronous reset, a choice of this design
// (the reference system allowed the accelerator its own frequency).
module soc_comm_top
  import fgdta_pkg::*;
#(
  parameter int unsigned PROC_DS = fgdta_pkg::DEF_PROC_DS,
  parameter int unsigned ACC_DS  = fgdta_pkg::DEF_ACC_DS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AHB slave port of accelerator 0
  input  logic                  ahb_hsel,
  input  logic [DEF_ADDR_W-1:0] ahb_haddr,
  input  logic [1:0]            ahb_htrans,
  input  logic                  ahb_hwrite,
  input  logic [2:0]            ahb_hsize,
  input  logic [PROC_DS-1:0]    ahb_hwdata,
  input  logic                  ahb_hready,
  output logic                  ahb_hreadyout,
  output logic                  ahb_hresp,
  output logic [PROC_DS-1:0]    ahb_hrdata,
  // APB slave port of accelerator 1
  input  logic                  apb_psel,
  input  logic                  apb_penable,
  input  logic [DEF_ADDR_W-1:0] apb_paddr,
  input  logic                  apb_pwrite,
  input  logic [PROC_DS-1:0]    apb_pwdata,
  output logic                  apb_pready,
  output logic                  apb_pslverr,
  output logic [PROC_DS-1:0]    apb_prdata,
  // accelerator 0 (on AHB)
  output logic [ACC_DS-1:0]     acc0_xdata,
  output logic                  acc0_start,
  input  logic                  acc0_busy,
  input  logic [ACC_DS-1:0]     acc0_ydata,
  // accelerator 1 (on APB)
  output logic [ACC_DS-1:0]     acc1_xdata,
  output logic                  acc1_start,
  input  logic                  acc1_busy,
  input  logic [ACC_DS-1:0]     acc1_ydata
);

  fgdta_ahb #(.PROC_DS(PROC_DS), .ACC_DS(ACC_DS)) u_ahb_if (
    .hclk     (clk),
    .hresetn  (rst_n),
    .hsel     (ahb_hsel),
    .haddr    (ahb_haddr),
    .htrans   (ahb_htrans),
    .hwrite   (ahb_hwrite),
    .hsize    (ahb_hsize),
    .hwdata   (ahb_hwdata),
    .hready   (ahb_hready),
    .hreadyout(ahb_hreadyout),
    .hresp    (ahb_hresp),
    .hrdata   (ahb_hrdata),
    .acc_xdata(acc0_xdata),
    .acc_start(acc0_start),
    .acc_busy (acc0_busy),
    .acc_ydata(acc0_ydata)
  );

  fgdta_apb #(.PROC_DS(PROC_DS), .ACC_DS(ACC_DS)) u_apb_if (
    .pclk     (clk),
    .presetn  (rst_n),
    .psel     (apb_psel),
    .penable  (apb_penable),
    .paddr    (apb_paddr),
    .pwrite   (apb_pwrite),
    .pwdata   (apb_pwdata),
    .pready   (apb_pready),
    .pslverr  (apb_pslverr),
    .prdata   (apb_prdata),
    .acc_xdata(acc1_xdata),
    .acc_start(acc1_start),
    .acc_busy (acc1_busy),
    .acc_ydata(acc1_ydata)
  );

endmodule
