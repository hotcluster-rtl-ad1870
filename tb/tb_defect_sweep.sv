// tb_defect_sweep: random cluster-defect sweep (5% to 50%) over 2x2, 4x4 and
// 8x8 layers with internal, external and hybrid redundancy, mapping each
// sample online (hardware, SAWI weights) and offline (max-flow map computed by
// the testbench as a host would). Each configuration runs in a sweep_unit;
// see there for the checks. Prints the share of routers per link mode.
module tb_defect_sweep;
  logic clk = 0, rst_n = 0;
  localparam int NU = 9;
  logic [NU-1:0] done;
  int c [NU];
  int f [NU];

  always #5 clk = ~clk;

  sweep_unit #(.ROWS(2), .COLS(2), .INT_RED(1), .EXT(0), .SAMPLES(60), .NAME("int.red.")) u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  sweep_unit #(.ROWS(2), .COLS(2), .INT_RED(0), .EXT(1), .SAMPLES(60), .NAME("ext.red.")) u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  sweep_unit #(.ROWS(2), .COLS(2), .INT_RED(1), .EXT(1), .SAMPLES(60), .NAME("hyb.red.")) u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  sweep_unit #(.ROWS(4), .COLS(4), .INT_RED(1), .EXT(0), .SAMPLES(30),  .NAME("int.red.")) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  sweep_unit #(.ROWS(4), .COLS(4), .INT_RED(0), .EXT(1), .SAMPLES(30),  .NAME("ext.red.")) u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  sweep_unit #(.ROWS(4), .COLS(4), .INT_RED(1), .EXT(1), .SAMPLES(30),  .NAME("hyb.red.")) u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  sweep_unit #(.ROWS(8), .COLS(8), .INT_RED(1), .EXT(0), .SAMPLES(8),  .NAME("int.red.")) u6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));
  sweep_unit #(.ROWS(8), .COLS(8), .INT_RED(0), .EXT(1), .SAMPLES(8),  .NAME("ext.red.")) u7 (.clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]));
  sweep_unit #(.ROWS(8), .COLS(8), .INT_RED(1), .EXT(1), .SAMPLES(8),  .NAME("hyb.red.")) u8 (.clk, .rst_n, .done(done[8]), .checks(c[8]), .failures(f[8]));

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
