// tb_sum1000: the "sum of 1000 products" workload, returned as a posit, on
// five quire configurations: posit<16,1> unsegmented (128-bit segment) and
// with 32-bit segments, and posit<32,2> unsegmented and with 32- and 64-bit
// segments. See pau_sum_driver for the checks (exact result after rounding,
// one product per cycle, WQ/SEG carry-resolve cycles).
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_sum1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int K = 5;
  int c[K], f[K], cy[K];
  logic d[K];
  int checks = 0, failures = 0;

  pau_sum_driver #(.N(16), .WES(1), .SEG(128)) u0 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .cycles(cy[0]), .done(d[0]));
  pau_sum_driver #(.N(16), .WES(1), .SEG(32))  u1 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .cycles(cy[1]), .done(d[1]));
  pau_sum_driver #(.N(32), .WES(2), .SEG(512)) u2 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .cycles(cy[2]), .done(d[2]));
  pau_sum_driver #(.N(32), .WES(2), .SEG(32))  u3 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .cycles(cy[3]), .done(d[3]));
  pau_sum_driver #(.N(32), .WES(2), .SEG(64))  u4 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .cycles(cy[4]), .done(d[4]));

  function automatic void total();
    for (int k = 0; k < K; k++) begin checks += c[k]; failures += f[k]; end
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // done flags are only meaningful once the drivers have started
    @(posedge rst_n);
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
