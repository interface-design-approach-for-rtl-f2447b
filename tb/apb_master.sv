// apb_master: APB master model for the testbenches (not synthesised).
// xfer() performs one transfer: a setup cycle (PSEL), then access cycles
// (PSEL and PENABLE) until PREADY is high. Signals are driven and PREADY/PRDATA
// sampled at the falling clock edge; back-to-back calls start the next setup
// right after the previous access. Returns the read data and the number of
// cycles the transfer took (2 without wait states).
module apb_master #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  output logic          psel,
  output logic          penable,
  output logic [31:0]   paddr,
  output logic          pwrite,
  output logic [DW-1:0] pwdata,
  input  logic          pready,
  input  logic [DW-1:0] prdata
);
  initial begin
    psel = 1'b0; penable = 1'b0; paddr = '0; pwrite = 1'b0; pwdata = '0;
  end

  task automatic xfer(input bit wr, input logic [31:0] addr, input logic [DW-1:0] wd,
                      output logic [DW-1:0] rd, output int cycles);
    @(negedge clk);
    psel = 1'b1; penable = 1'b0; paddr = addr; pwrite = wr; pwdata = wd;
    cycles = 1;
    @(negedge clk);
    penable = 1'b1;
    forever begin
      #1;
      cycles++;
      if (pready) break;
      @(negedge clk);
    end
    rd = prdata;
    @(posedge clk);
    #1 psel = 1'b0; penable = 1'b0;
  endtask
endmodule
