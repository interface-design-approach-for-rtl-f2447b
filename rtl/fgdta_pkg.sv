// fgdta_pkg: configuration package of the FGDTA communication interface.
//
// The interface is adapted to a processor bus and to an accelerator by editing
// this package, as the configuration approach intends: the four types below
// describe the processor data bus, the accelerator data bus, and the control
// signals going into and out of the interface on the processor side. The
// defaults are those of the reference system: 32-bit AMBA buses and a 64-bit
// accelerator. The address width, the register map and the sequencer states
// are choices of this implementation. Modules take their widths as parameters
// whose defaults come from here, so one design can hold interfaces of several
// configurations.
package fgdta_pkg;

  // Processor-side data size (ProcDS) and accelerator-side data size (AccDS).
  parameter int unsigned DEF_PROC_DS = 32;
  parameter int unsigned DEF_ACC_DS  = 64;
  // Processor bus address width.
  parameter int unsigned DEF_ADDR_W  = 32;

  typedef logic [DEF_PROC_DS-1:0] proc_data_t;
  typedef logic [DEF_ACC_DS-1:0]  acc_data_t;

  // Control signals into the interface: one transfer of the generic
  // two-step chronogram (select, direction, address).
  typedef struct packed {
    logic              sel;
    logic              write;
    logic [DEF_ADDR_W-1:0] addr;
  } bus_ctrl_in_t;

  // Control signals out of the interface: the data step completes in the
  // cycle where ready is high.
  typedef struct packed {
    logic ready;
  } bus_ctrl_out_t;

  // Register map, in processor words from the interface base address.
  localparam int unsigned REG_DATA   = 0;  // write: operand words, read: result words
  localparam int unsigned REG_STATUS = 1;  // read only

  // Status register bits.
  localparam int unsigned ST_IN_FULL  = 0; // operand registers hold a whole block
  localparam int unsigned ST_RUNNING  = 1; // accelerator sequence in progress
  localparam int unsigned ST_RES_FULL = 2; // result registers hold an unread result
  localparam int unsigned ST_ACC_BUSY = 3; // accelerator busy input

  // Accelerator sequencer states.
  typedef enum logic [1:0] {
    SEQ_IDLE,   // wait for a full operand block and free result registers
    SEQ_ISSUE,  // drive xdata and the one-cycle start pulse
    SEQ_WAIT    // wait for busy low, then capture ydata
  } seq_state_e;

endpackage
