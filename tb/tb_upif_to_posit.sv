// tb_upif_to_posit: checks the rounding encoder. Random saturated Unrounded
// PIFs (fraction, round and sticky bits random, exponents spread over the
// whole range and biased to its ends) are encoded by the block and by the
// reference model, which rounds the infinitely precise posit bit string of
// the same value; the two posits must be equal. Formats posit<16,1>,
// posit<8,0>, posit<32,2> and posit<64,3>.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "upif_gen.svh"
`include "posit_ref.svh"
module tb_upif_to_posit;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;
  typedef posit_ref #(64, 3) r64;

  int checks = 0, failures = 0, ties = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [r16::WUPIF-1:0] u16; logic [15:0] o16;
  logic [r8::WUPIF-1:0]  u8;  logic [7:0]  o8;
  logic [r32::WUPIF-1:0] u32; logic [31:0] o32;
  logic [r64::WUPIF-1:0] u64; logic [63:0] o64;

  upif_to_posit #(.N(16), .WES(1)) dut16 (.upif(u16), .posit(o16));
  upif_to_posit #(.N(8),  .WES(0)) dut8  (.upif(u8),  .posit(o8));
  upif_to_posit #(.N(32), .WES(2)) dut32 (.upif(u32), .posit(o32));
  upif_to_posit #(.N(64), .WES(3)) dut64 (.upif(u64), .posit(o64));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define CHECK_ENC(R, U, O) \
    begin bit n; R::big_t m; int x; logic [R::N-1:0] ex; \
      R::upif_val(U, n, m, x); \
      ex = n ? {1'b1, {(R::N-1){1'b0}}} : R::encode(m, x); \
      checks++; \
      if (O !== ex) begin failures++; \
        if (failures < 10) $display("FAIL %m upif=%h got=%h exp=%h", U, O, ex); end end

  initial begin
    for (int v = 0; v < 100000; v++) begin
      `RAND_UPIF(r16, u16)
      `RAND_UPIF(r8, u8)
      `RAND_UPIF(r32, u32)
      `RAND_UPIF(r64, u64)
      #1;
      `CHECK_ENC(r16, u16, o16)
      `CHECK_ENC(r8, u8, o8)
      `CHECK_ENC(r32, u32, o32)
      `CHECK_ENC(r64, u64, o64)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
