// gen_xfer: generic two-step bus transfer unit.
//
// Every processor bus is reduced to one chronogram of two clock cycles. In the
// address step the bus presents select, direction and address; in the data
// step that follows, the write data is taken or the read data is returned, and
// the transfer completes at the clock edge that ends the data step. The data
// step may be stretched by holding d_ready low (a wait state).
//
// The unit is split into two parallel parts, as the generic model requires: an
// address-step register that captures a new transfer, and a data-step part
// that presents the captured transfer to the control unit. A new address step
// is accepted in the same cycle as the data step of the previous transfer, so
// a pipelined bus (AHB) completes one transfer per cycle, while a bus that
// separates its transfers (APB) takes two cycles per transfer.
//
// Interface:
//   a_ctrl      address step; a_ctrl.sel marks a valid address step. The bus
//               may present one only in a cycle where d_ready is high.
//   d_wdata     write data, valid during the data step.
//   d_ready     high when the data step in progress (if any) ends this cycle.
//   d_active    a data step is in progress.
//   d_rdata     read data, valid in the cycle where the data step ends.
//   x_*         the same transfer towards the control unit: x_ctrl.sel is high
//               for the whole data step, x_rsp.ready ends it.
// Timing: x_ctrl is registered (one cycle after the address step); the data
// paths between the bus and the control unit are combinational.
module gen_xfer
  import fgdta_pkg::*;
#(
  parameter int unsigned PROC_DS = fgdta_pkg::DEF_PROC_DS
) (
  input  logic               clk,
  input  logic               rst_n,
  // bus side
  input  bus_ctrl_in_t       a_ctrl,
  input  logic [PROC_DS-1:0] d_wdata,
  output logic               d_ready,
  output logic               d_active,
  output logic [PROC_DS-1:0] d_rdata,
  // control-unit side
  output bus_ctrl_in_t       x_ctrl,
  output logic [PROC_DS-1:0] x_wdata,
  input  bus_ctrl_out_t      x_rsp,
  input  logic [PROC_DS-1:0] x_rdata
);

  bus_ctrl_in_t dstep_q;   // transfer in its data step
  logic         dstep_done;

  // Data-step unit: the step ends when the control unit is ready.
  assign dstep_done = dstep_q.sel && x_rsp.ready;
  assign d_ready    = !dstep_q.sel || x_rsp.ready;
  assign d_active   = dstep_q.sel;

  // Address-step unit: capture a new transfer, also while the previous one is
  // in its last data-step cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstep_q <= '0;
    end else if (a_ctrl.sel && d_ready) begin
      dstep_q <= a_ctrl;
    end else if (dstep_done) begin
      dstep_q.sel <= 1'b0;
    end
  end

  assign x_ctrl  = dstep_q;
  assign x_wdata = d_wdata;
  assign d_rdata = x_rdata;

  // The bus must not start an address step while a data step is stretched.
  a_step_only_when_ready : assert property (
    @(posedge clk) disable iff (!rst_n) a_ctrl.sel |-> d_ready)
    else $error("gen_xfer: address step during a wait state");

endmodule
