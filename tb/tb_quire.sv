// tb_quire: checks the segmented quire in four configurations: posit<16,1>
// with 32-bit segments (4 carry-resolve cycles), posit<16,1> unsegmented
// (one 128-bit segment), posit<32,2> with 32-bit segments (the default
// size, 512 bits, 16 resolve cycles) and posit<64,3> with 64-bit segments
// (2048 bits, 32 resolve cycles). See quire_driver for what is checked.
// A configuration whose segment carries never fired counts as a failure.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_quire;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c[4], f[4], cy[4];
  logic d[4];
  int checks, failures;

  quire_driver #(.N(16), .WES(1), .SEG(32))  u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .carries(cy[0]), .done(d[0]));
  quire_driver #(.N(16), .WES(1), .SEG(128)) u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .carries(cy[1]), .done(d[1]));
  quire_driver #(.N(32), .WES(2), .SEG(32))  u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .carries(cy[2]), .done(d[2]));
  quire_driver #(.N(64), .WES(3), .SEG(64))  u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .carries(cy[3]), .done(d[3]));

  function automatic void report();
    checks = c[0] + c[1] + c[2] + c[3];
    failures += f[0] + f[1] + f[2] + f[3];
  endfunction

  initial begin
    failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // done flags are only meaningful once the drivers have started
    @(posedge rst_n);
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3]);
    // segmented configurations must have stored carries; unsegmented none
    if (cy[0] == 0) begin failures++; $display("FAIL: no segment carry (16/32)"); end
    if (cy[2] == 0) begin failures++; $display("FAIL: no segment carry (32/32)"); end
    if (cy[3] == 0) begin failures++; $display("FAIL: no segment carry (64/64)"); end
    if (cy[1] != 0) begin failures++; $display("FAIL: carry in unsegmented quire"); end
    $display("segment carries stored: %0d %0d %0d", cy[0], cy[1], cy[2]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks + 3, failures);
    $finish;
  end
endmodule
