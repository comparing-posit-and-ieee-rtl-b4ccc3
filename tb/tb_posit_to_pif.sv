// tb_posit_to_pif: checks the posit decoder against the reference model.
// posit<16,1> and posit<8,0> are checked exhaustively (every encoding, which
// covers zero, NaR, the longest regimes and the WES = 0 special case) and
// posit<32,2> with random encodings. For each input the PIF value must equal
// the posit's value, non-zero PIFs must be normalised (exactly one of s, i set)
// and zero / NaR must have their canonical encodings.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_posit_to_pif;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] p16; logic [r16::WPIF-1:0] q16;
  logic [7:0]  p8;  logic [r8::WPIF-1:0]  q8;
  logic [31:0] p32; logic [r32::WPIF-1:0] q32;

  posit_to_pif #(.N(16), .WES(1)) dut16 (.posit(p16), .pif(q16));
  posit_to_pif #(.N(8),  .WES(0)) dut8  (.posit(p8),  .pif(q8));
  posit_to_pif #(.N(32), .WES(2)) dut32 (.posit(p32), .pif(q32));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare a PIF with the exact expected value
  `define CHECK_PIF(R, P, Q) \
    begin \
      bit nr, nd; R::big_t mr, md; int xr, xd; \
      R::decode(P, nr, mr, xr); R::pif_val(Q, nd, md, xd); \
      checks++; \
      if (nr != nd || (!nr && !R::val_eq(mr, xr, md, xd)) || \
          (!nr && mr != 0 && (Q[R::WPIF-2] == Q[R::WF])) || \
          (!nr && mr == 0 && Q != '0) || \
          (nr && Q != {1'b1, 1'b1, {(R::WPIF-2){1'b0}}})) begin \
        failures++; \
        if (failures < 10) $display("FAIL %m posit=%h pif=%h", P, Q); \
      end \
    end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      p16 = 16'(v); p8 = 8'(v); p32 = r32::rand_posit();
      #1;
      `CHECK_PIF(r16, p16, q16)
      if (v < 256) `CHECK_PIF(r8, p8, q8)
      `CHECK_PIF(r32, p32, q32)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
