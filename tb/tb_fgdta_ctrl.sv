// tb_fgdta_ctrl: self-checking testbench of the FGDTA control unit in its
// three configurations: accelerator wider than the processor (32/64, the
// reference one), processor wider than the accelerator (32/16, two runs per
// word, and 32/8, four runs per word) and equal widths (32/32 with a
// one-cycle accelerator). Each configuration runs in a ctrl_tester.
module tb_fgdta_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d0, d1, d2, d3;
  int   c0, c1, c2, c3, f0, f1, f2, f3;
  int   checks, failures;

  always #5 clk = ~clk;

  ctrl_tester #(.PROC_DS(32), .ACC_DS(64), .LAT(5)) t_wide   (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  ctrl_tester #(.PROC_DS(32), .ACC_DS(16), .LAT(3)) t_narrow (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  ctrl_tester #(.PROC_DS(32), .ACC_DS(8),  .LAT(2)) t_byte   (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  ctrl_tester #(.PROC_DS(32), .ACC_DS(32), .LAT(0)) t_equal  (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
