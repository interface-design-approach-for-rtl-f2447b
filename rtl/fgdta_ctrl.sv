// fgdta_ctrl: control unit of the FGDTA communication interface.
//
// Connects a processor bus, seen through the generic two-step transfer of
// gen_xfer, to a fine-granularity, deterministic-time accelerator (FGDTA) that
// has a data input xdata, a start pulse, a busy output and a data output ydata.
// The processor and accelerator data sizes (PROC_DS, ACC_DS) may differ; one
// must be a whole multiple of the other. Operands and results are kept in
// registers of BUF_W = max(PROC_DS, ACC_DS) bits, a "block":
//   * ACC_DS > PROC_DS: the processor writes ACC_DS/PROC_DS words, the
//     accelerator runs once, the processor reads ACC_DS/PROC_DS result words.
//   * PROC_DS > ACC_DS: the processor writes one word, the accelerator runs
//     PROC_DS/ACC_DS times on its slices (lowest slice first), and the results
//     are packed into one word that the processor reads.
//   * equal sizes: one word in, one run, one word out.
// Words are taken and returned in order, least significant slice first.
//
// The unit is organised as the five processes of the reference description:
//   1. launch: validates each data step (select, direction, register) and
//      decides whether it can complete now (x_rsp.ready);
//   2. write: stores a processor word into the operand registers;
//   3. read: returns a result word (or the status register);
//   4. write reset: frees the operand registers when the accelerator has
//      finished with them;
//   5. read reset: frees the result registers when the last word was read.
// A sequencer (IDLE, ISSUE, WAIT) drives the accelerator: when a whole block
// is in the operand registers and the result registers are free, it drives
// xdata and a one-cycle start pulse, waits until busy is low, captures ydata,
// and repeats for the next slice.
//
// Register map (word offsets from the base, address bit log2(PROC_DS/8)):
//   0 data: write = next operand word, read = next result word;
//   1 status (read only): bit0 operands full, bit1 sequence running,
//     bit2 result ready, bit3 accelerator busy.
// Flow control, this design's choice: a write to data waits (ready low) while
// the operand registers are full; a read of data waits while a computation is
// pending and returns 0 at once if none is pending. So the processor can load
// the next block while the accelerator runs, but must read a result before
// writing a third block.
//
// Accelerator timing assumed: xdata is held stable from start until the result
// is taken; busy is high from the cycle after start until ydata is valid (an
// accelerator that answers in one cycle may keep busy low). Per accelerator
// run the sequencer spends 1 + (cycles busy high) + 1 cycles, and one more
// cycle passes between the last operand write and the first start.
module fgdta_ctrl
  import fgdta_pkg::*;
#(
  parameter int unsigned PROC_DS = fgdta_pkg::DEF_PROC_DS,
  parameter int unsigned ACC_DS  = fgdta_pkg::DEF_ACC_DS
) (
  input  logic               clk,
  input  logic               rst_n,
  // generic transfer (data step) from gen_xfer
  input  bus_ctrl_in_t       x_ctrl,
  input  logic [PROC_DS-1:0] x_wdata,
  output bus_ctrl_out_t      x_rsp,
  output logic [PROC_DS-1:0] x_rdata,
  // accelerator side
  output logic [ACC_DS-1:0]  acc_xdata,
  output logic               acc_start,
  input  logic               acc_busy,
  input  logic [ACC_DS-1:0]  acc_ydata
);

  localparam int unsigned BUF_W    = (PROC_DS > ACC_DS) ? PROC_DS : ACC_DS;
  localparam int unsigned N_PW     = BUF_W / PROC_DS;   // processor words per block
  localparam int unsigned N_OP     = BUF_W / ACC_DS;    // accelerator runs per block
  localparam int unsigned PW_CW    = (N_PW > 1) ? $clog2(N_PW) : 1;
  localparam int unsigned OP_CW    = (N_OP > 1) ? $clog2(N_OP) : 1;
  localparam int unsigned WORD_LSB = $clog2(PROC_DS / 8);

  // Sizes must nest.
  if ((BUF_W % PROC_DS) != 0 || (BUF_W % ACC_DS) != 0 || (PROC_DS % 8) != 0) begin : g_size_check
    $error("fgdta_ctrl: PROC_DS and ACC_DS must be multiples of each other and PROC_DS of 8");
  end

  logic [BUF_W-1:0] in_buf, res_buf;
  logic             in_full, res_full;
  logic [PW_CW-1:0] wr_cnt, rd_cnt;
  logic [OP_CW-1:0] op_cnt;
  seq_state_e       state;

  // ---------------------------------------------------------------- launch
  logic is_status, wr_data, rd_data, rd_status;
  logic wr_ok, rd_ok, wr_fire, rd_fire, seq_last_done;

  assign is_status = (x_ctrl.addr[WORD_LSB] == REG_STATUS[0]);
  assign wr_data   = x_ctrl.sel &&  x_ctrl.write && !is_status;
  assign rd_data   = x_ctrl.sel && !x_ctrl.write && !is_status;
  assign rd_status = x_ctrl.sel && !x_ctrl.write &&  is_status;

  // A write waits for free operand registers; a read waits only while a
  // computation is pending.
  assign wr_ok = !in_full;
  assign rd_ok = res_full || !in_full;

  always_comb begin
    x_rsp.ready = 1'b1;                 // writes to status are ignored
    if (wr_data) x_rsp.ready = wr_ok;
    if (rd_data) x_rsp.ready = rd_ok;
  end

  assign wr_fire = wr_data && wr_ok;
  assign rd_fire = rd_data && res_full; // a read that consumes a result word

  // Last accelerator run of the block has delivered its result.
  assign seq_last_done = (state == SEQ_WAIT) && !acc_busy && (op_cnt == OP_CW'(N_OP - 1));

  // ------------------------------------------------- write and write reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_buf  <= '0;
      wr_cnt  <= '0;
      in_full <= 1'b0;
    end else begin
      if (wr_fire) begin
        in_buf[wr_cnt*PROC_DS +: PROC_DS] <= x_wdata;
        if (wr_cnt == PW_CW'(N_PW - 1)) begin
          wr_cnt  <= '0;
          in_full <= 1'b1;
        end else begin
          wr_cnt <= wr_cnt + 1'b1;
        end
      end
      if (seq_last_done) in_full <= 1'b0;   // write reset
    end
  end

  // --------------------------------------------------- read and read reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt   <= '0;
      res_full <= 1'b0;
    end else begin
      if (rd_fire) begin
        if (rd_cnt == PW_CW'(N_PW - 1)) begin
          rd_cnt   <= '0;
          res_full <= 1'b0;                 // read reset
        end else begin
          rd_cnt <= rd_cnt + 1'b1;
        end
      end
      if (seq_last_done) res_full <= 1'b1;
    end
  end

  always_comb begin
    x_rdata = '0;
    if (rd_status) begin
      x_rdata[ST_IN_FULL]  = in_full;
      x_rdata[ST_RUNNING]  = (state != SEQ_IDLE);
      x_rdata[ST_RES_FULL] = res_full;
      x_rdata[ST_ACC_BUSY] = acc_busy;
    end else if (rd_data && res_full) begin
      x_rdata = res_buf[rd_cnt*PROC_DS +: PROC_DS];
    end
  end

  // -------------------------------------------------- accelerator sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= SEQ_IDLE;
      op_cnt  <= '0;
      res_buf <= '0;
    end else begin
      unique case (state)
        SEQ_IDLE:  if (in_full && !res_full) begin
                     op_cnt <= '0;
                     state  <= SEQ_ISSUE;
                   end
        SEQ_ISSUE: state <= SEQ_WAIT;
        SEQ_WAIT:  if (!acc_busy) begin
                     res_buf[op_cnt*ACC_DS +: ACC_DS] <= acc_ydata;
                     if (op_cnt == OP_CW'(N_OP - 1)) begin
                       state <= SEQ_IDLE;
                     end else begin
                       op_cnt <= op_cnt + 1'b1;
                       state  <= SEQ_ISSUE;
                     end
                   end
        default:   state <= SEQ_IDLE;
      endcase
    end
  end

  assign acc_xdata = in_buf[op_cnt*ACC_DS +: ACC_DS];
  assign acc_start = (state == SEQ_ISSUE);

  // Operand registers stay untouched while the accelerator uses them.
  no_write_when_full : assert property (
    @(posedge clk) disable iff (!rst_n) in_full |-> !wr_fire);

endmodule
