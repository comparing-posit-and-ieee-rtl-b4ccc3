// tb_pif_to_posit: checks the exact PIF to posit encoder. For every posit of
// posit<16,1> and posit<8,0> (and random posit<32,2>) the reference model
// builds the PIF of its value from the PIF definition; the encoder must
// return the original posit.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_pif_to_posit;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] p16, o16; logic [r16::WPIF-1:0] q16;
  logic [7:0]  p8,  o8;  logic [r8::WPIF-1:0]  q8;
  logic [31:0] p32, o32; logic [r32::WPIF-1:0] q32;

  pif_to_posit #(.N(16), .WES(1)) dut16 (.pif(q16), .posit(o16));
  pif_to_posit #(.N(8),  .WES(0)) dut8  (.pif(q8),  .posit(o8));
  pif_to_posit #(.N(32), .WES(2)) dut32 (.pif(q32), .posit(o32));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define MK_PIF(R, P, Q) \
    begin bit n; R::big_t m; int x; R::decode(P, n, m, x); Q = R::to_pif(n, m, x); end
  `define CHECK_EQ(P, O) \
    begin checks++; if (O !== P) begin failures++; \
      if (failures < 10) $display("FAIL %m posit=%h got=%h", P, O); end end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      p16 = 16'(v); p8 = 8'(v); p32 = r32::rand_posit();
      `MK_PIF(r16, p16, q16)
      `MK_PIF(r8, p8, q8)
      `MK_PIF(r32, p32, q32)
      #1;
      `CHECK_EQ(p16, o16)
      if (v < 256) `CHECK_EQ(p8, o8)
      `CHECK_EQ(p32, o32)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
