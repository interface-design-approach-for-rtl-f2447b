// ahb_master: AHB-Lite master model for the testbenches (not synthesised).
// Transfers are queued with push() and issued by run() as one pipelined
// sequence of single NONSEQ word transfers: the address phase of each transfer
// overlaps the data phase of the previous one, and both are held while HREADY
// is low. Signals are driven and HREADY/HRDATA sampled at the falling clock
// edge. run() returns the number of cycles the sequence took and the wait
// cycles seen on write and on read data phases; read data is queued in rdata_q.
// overlap_cnt counts cycles where an address phase was accepted while a data
// phase completed in the same cycle.
module ahb_master #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  output logic          hsel,
  output logic [31:0]   haddr,
  output logic [1:0]    htrans,
  output logic          hwrite,
  output logic [2:0]    hsize,
  output logic [DW-1:0] hwdata,
  input  logic          hready,
  input  logic [DW-1:0] hrdata
);
  bit          q_wr[$];
  logic [31:0] q_addr[$];
  logic [DW-1:0] q_wdata[$];
  logic [DW-1:0] rdata_q[$];
  int          overlap_cnt = 0;

  initial begin
    hsel = 1'b0; haddr = '0; htrans = 2'b00; hwrite = 1'b0;
    hsize = 3'($clog2(DW / 8)); hwdata = '0;
  end

  function automatic void push(input bit wr, input logic [31:0] addr, input logic [DW-1:0] wd);
    q_wr.push_back(wr);
    q_addr.push_back(addr);
    q_wdata.push_back(wd);
  endfunction

  task automatic run(output int cycles, output int waits_wr, output int waits_rd);
    int n, a, d, nxt;
    bit hr_prev;
    logic [DW-1:0] rd_cand;
    n = q_wr.size();
    a = -1; d = -1; nxt = 0; hr_prev = 1'b1; rd_cand = '0;
    cycles = 0; waits_wr = 0; waits_rd = 0;
    forever begin
      @(negedge clk);
      if (hr_prev) begin
        if (d >= 0 && !q_wr[d]) rdata_q.push_back(rd_cand);
        if (d >= 0 && a >= 0) overlap_cnt++;
        d = a;
        if (nxt < n) begin
          a = nxt;
          nxt++;
        end else begin
          a = -1;
        end
      end
      if (a < 0 && d < 0) break;
      hsel   = (a >= 0);
      htrans = (a >= 0) ? 2'b10 : 2'b00;
      haddr  = (a >= 0) ? q_addr[a] : '0;
      hwrite = (a >= 0) ? q_wr[a] : 1'b0;
      hwdata = (d >= 0 && q_wr[d]) ? q_wdata[d] : '0;
      #1;
      cycles++;
      if (!hready && d >= 0) begin
        if (q_wr[d]) waits_wr++;
        else         waits_rd++;
      end
      hr_prev = hready;
      rd_cand = hrdata;
    end
    hsel = 1'b0; htrans = 2'b00;
    q_wr.delete(); q_addr.delete(); q_wdata.delete();
  endtask
endmodule
