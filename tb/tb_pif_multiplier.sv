// tb_pif_multiplier: checks the PIF multiplier. Operands are posits turned
// into PIF by the reference model: every pair of posit<8,0> and random pairs
// of posit<16,1> and posit<32,2> biased to long regimes (which exercises
// saturation at both ends). The exact product output must equal a*b, and the
// Unrounded PIF must be well formed and round (in the reference encoder) to
// the same posit as the exact product.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_pif_multiplier;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;


  logic pn8, pn16, pn32;
  logic signed [r8::WE:0] pe8; logic signed [r16::WE:0] pe16; logic signed [r32::WE:0] pe32;
  logic signed [2*r8::WF+3:0] ps8; logic signed [2*r16::WF+3:0] ps16; logic signed [2*r32::WF+3:0] ps32;
  logic [7:0]  a8,  b8;  logic [r8::WPIF-1:0]  pa8,  pb8;  logic [r8::WUPIF-1:0]  u8;
  logic [15:0] a16, b16; logic [r16::WPIF-1:0] pa16, pb16; logic [r16::WUPIF-1:0] u16;
  logic [31:0] a32, b32; logic [r32::WPIF-1:0] pa32, pb32; logic [r32::WUPIF-1:0] u32;

  pif_multiplier #(.N(8),  .WES(0)) dut8  (.a(pa8),  .b(pb8),  .upif(u8), .prod_nar(pn8), .prod_exp(pe8), .prod_sig(ps8));
  pif_multiplier #(.N(16), .WES(1)) dut16 (.a(pa16), .b(pb16), .upif(u16), .prod_nar(pn16), .prod_exp(pe16), .prod_sig(ps16));
  pif_multiplier #(.N(32), .WES(2)) dut32 (.a(pa32), .b(pb32), .upif(u32), .prod_nar(pn32), .prod_exp(pe32), .prod_sig(ps32));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define MK(R, P, Q) \
    begin bit n_; R::big_t m_; int x_; R::decode(P, n_, m_, x_); Q = R::to_pif(n_, m_, x_); end

  `define CHECK_MUL(R, A, B, U, PN, PE, PS) \
    begin bit na, nb, nu; R::big_t ma, mb, mu, ms; int xa, xb, xu, xs; \
      logic [R::N-1:0] ex, got; \
      R::decode(A, na, ma, xa); R::decode(B, nb, mb, xb); \
      ms = ma * mb; xs = xa + xb; \
      checks++; \
      if (PN != (na | nb) || (!PN && !R::val_eq(ms, xs, R::big_t'(PS), int'(PE) - 2 * R::WF))) begin \
        failures++; if (failures < 10) $display("FAIL exact %m a=%h b=%h", A, B); end \
      ex = (na | nb) ? {1'b1, {(R::N-1){1'b0}}} : R::encode(ms, xs); \
      R::upif_val(U, nu, mu, xu); \
      got = nu ? {1'b1, {(R::N-1){1'b0}}} : R::encode(mu, xu); \
      checks++; \
      if (got !== ex || (!nu && U[R::WUPIF-2] == U[R::WF+2] && U != '0)) begin failures++; \
        if (failures < 10) $display("FAIL %m a=%h b=%h upif=%h got=%h exp=%h", A, B, U, got, ex); end end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      a8 = v[15:8]; b8 = v[7:0];
      a16 = r16::rand_posit(); b16 = r16::rand_posit();
      a32 = r32::rand_posit(); b32 = r32::rand_posit();
      `MK(r8, a8, pa8) `MK(r8, b8, pb8)
      `MK(r16, a16, pa16) `MK(r16, b16, pb16)
      `MK(r32, a32, pa32) `MK(r32, b32, pb32)
      #1;
      `CHECK_MUL(r8, a8, b8, u8, pn8, pe8, ps8)
      if (1) `CHECK_MUL(r16, a16, b16, u16, pn16, pe16, ps16)
      if (1) `CHECK_MUL(r32, a32, b32, u32, pn32, pe32, ps32)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
