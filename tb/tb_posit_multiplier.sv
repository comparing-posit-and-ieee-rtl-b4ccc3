// tb_posit_multiplier: checks the posit-to-posit multiplier end to end
// against the reference model (exact product, then rounding of the infinitely
// precise posit bit string). Every pair of posit<8,0> is tried;
// posit<16,1> and posit<32,2> get 65536 random pairs each, biased to long
// regimes so that saturation occurs. Results must be identical posits.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_posit_multiplier;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8,  b8,  o8;
  logic [15:0] a16, b16, o16;
  logic [31:0] a32, b32, o32;

  posit_multiplier #(.N(8),  .WES(0)) dut8  (.a(a8),  .b(b8),  .r(o8));
  posit_multiplier #(.N(16), .WES(1)) dut16 (.a(a16), .b(b16), .r(o16));
  posit_multiplier #(.N(32), .WES(2)) dut32 (.a(a32), .b(b32), .r(o32));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define CHECK_PMUL(R, A, B, O) \
    begin bit na, nb; R::big_t ma, mb, ms; int xa, xb, xs; logic [R::N-1:0] ex; \
      R::decode(A, na, ma, xa); R::decode(B, nb, mb, xb); \
      ms = ma * mb; xs = xa + xb; \
      ex = (na | nb) ? {1'b1, {(R::N-1){1'b0}}} : R::encode(ms, xs); \
      checks++; \
      if (O !== ex) begin failures++; \
        if (failures < 10) $display("FAIL %m a=%h b=%h got=%h exp=%h", A, B, O, ex); end end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a8 = v[15:8]; b8 = v[7:0];
      a16 = r16::rand_posit(); b16 = r16::rand_posit();
      a32 = r32::rand_posit(); b32 = r32::rand_posit();
      #1;
      `CHECK_PMUL(r8, a8, b8, o8)
      if (1) `CHECK_PMUL(r16, a16, b16, o16)
      if (1) `CHECK_PMUL(r32, a32, b32, o32)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
