// tb_posit_adder: checks the posit-to-posit adder/subtracter end to end
// against the reference model (exact sum, then rounding of the infinitely
// precise posit bit string). Every pair of posit<8,0> is tried in both
// add and subtract mode; posit<16,1> and posit<32,2> get random pairs with
// extra near-cancellation cases. Results must be identical posits.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_posit_adder;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic sub;
  logic [7:0]  a8,  b8,  o8;
  logic [15:0] a16, b16, o16;
  logic [31:0] a32, b32, o32;

  posit_adder #(.N(8),  .WES(0)) dut8  (.a(a8),  .b(b8),  .sub(sub), .r(o8));
  posit_adder #(.N(16), .WES(1)) dut16 (.a(a16), .b(b16), .sub(sub), .r(o16));
  posit_adder #(.N(32), .WES(2)) dut32 (.a(a32), .b(b32), .sub(sub), .r(o32));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define CHECK_PADD(R, A, B, O) \
    begin bit na, nb; R::big_t ma, mb, ms; int xa, xb, xs; logic [R::N-1:0] ex; \
      R::decode(A, na, ma, xa); R::decode(B, nb, mb, xb); \
      if (sub) mb = -mb; \
      xs = (xa < xb) ? xa : xb; \
      ms = (ma <<< (xa - xs)) + (mb <<< (xb - xs)); \
      ex = (na | nb) ? {1'b1, {(R::N-1){1'b0}}} : R::encode(ms, xs); \
      checks++; \
      if (O !== ex) begin failures++; \
        if (failures < 10) $display("FAIL %m a=%h b=%h sub=%0d got=%h exp=%h", A, B, sub, O, ex); end end

  initial begin
    for (int v = 0; v < 131072; v++) begin
      sub = v[16];
      a8 = v[15:8]; b8 = v[7:0];
      a16 = r16::rand_posit(); b16 = r16::rand_posit();
      a32 = r32::rand_posit(); b32 = r32::rand_posit();
      if (v % 5 == 0) b16 = a16 ^ 16'($urandom_range(0, 3));
      if (v % 7 == 0) b32 = a32 ^ 32'($urandom_range(0, 3));
      #1;
      `CHECK_PADD(r8, a8, b8, o8)
      if (v % 2 == 0) `CHECK_PADD(r16, a16, b16, o16)
      if (v % 4 == 0) `CHECK_PADD(r32, a32, b32, o32)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
