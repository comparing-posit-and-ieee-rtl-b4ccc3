// tb_pif_adder: checks the PIF adder/subtracter. Operands are posits turned
// into PIF by the reference model: every pair of posit<8,0> (add and
// subtract), and random pairs of posit<16,1> and posit<32,2> biased to long
// regimes. The Unrounded PIF result must be well formed and must round (in the
// reference encoder) to the same posit as the exact sum or difference; this
// checks the round and sticky bits as well as the saturation.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_pif_adder;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic sub;
  logic [7:0]  a8,  b8;  logic [r8::WPIF-1:0]  pa8,  pb8;  logic [r8::WUPIF-1:0]  u8;
  logic [15:0] a16, b16; logic [r16::WPIF-1:0] pa16, pb16; logic [r16::WUPIF-1:0] u16;
  logic [31:0] a32, b32; logic [r32::WPIF-1:0] pa32, pb32; logic [r32::WUPIF-1:0] u32;

  pif_adder #(.N(8),  .WES(0)) dut8  (.a(pa8),  .b(pb8),  .sub(sub), .upif(u8));
  pif_adder #(.N(16), .WES(1)) dut16 (.a(pa16), .b(pb16), .sub(sub), .upif(u16));
  pif_adder #(.N(32), .WES(2)) dut32 (.a(pa32), .b(pb32), .sub(sub), .upif(u32));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define MK(R, P, Q) \
    begin bit n_; R::big_t m_; int x_; R::decode(P, n_, m_, x_); Q = R::to_pif(n_, m_, x_); end

  `define CHECK_ADD(R, A, B, U) \
    begin bit na, nb, nu; R::big_t ma, mb, mu, ms; int xa, xb, xu, xs; \
      logic [R::N-1:0] ex, got; \
      R::decode(A, na, ma, xa); R::decode(B, nb, mb, xb); \
      if (sub) mb = -mb; \
      xs = (xa < xb) ? xa : xb; \
      ms = (ma <<< (xa - xs)) + (mb <<< (xb - xs)); \
      ex = (na | nb) ? {1'b1, {(R::N-1){1'b0}}} : R::encode(ms, xs); \
      R::upif_val(U, nu, mu, xu); \
      got = nu ? {1'b1, {(R::N-1){1'b0}}} : R::encode(mu, xu); \
      checks++; \
      if (got !== ex || (!nu && U[R::WUPIF-2] == U[R::WF+2] && U != '0)) begin failures++; \
        if (failures < 10) $display("FAIL %m a=%h b=%h sub=%0d upif=%h got=%h exp=%h", A, B, sub, U, got, ex); end end

  initial begin
    for (int v = 0; v < 131072; v++) begin
      sub = v[16];
      a8 = v[15:8]; b8 = v[7:0];
      a16 = r16::rand_posit(); b16 = r16::rand_posit();
      a32 = r32::rand_posit(); b32 = r32::rand_posit();
      if (v % 5 == 0) b16 = a16 ^ 16'($urandom_range(0, 3));   // cancellation
      if (v % 7 == 0) b32 = a32 ^ 32'($urandom_range(0, 3));
      `MK(r8, a8, pa8) `MK(r8, b8, pb8)
      `MK(r16, a16, pa16) `MK(r16, b16, pb16)
      `MK(r32, a32, pa32) `MK(r32, b32, pb32)
      #1;
      `CHECK_ADD(r8, a8, b8, u8)
      if (v % 2 == 0) `CHECK_ADD(r16, a16, b16, u16)
      if (v % 4 == 0) `CHECK_ADD(r32, a32, b32, u32)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
