// posit_adder: posit-to-posit adder/subtracter (posits held in registers).
//
// The classical three-step posit operator: both operands are decoded to PIF
// (posit_to_pif), added exactly with round and sticky information
// (pif_adder, which also saturates), and the Unrounded PIF is encoded back to
// the nearest posit (upif_to_posit). Rounding happens once, in the encoder.
// Interface: posits a, b and sub (1: a-b) in, posit r out. Combinational.
// This decode / operate / encode chain is the published posit-to-posit
// organisation; no pipeline registers are added (this design's choice).
module posit_adder
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WPIF  = wpif_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] r
);
  logic [WPIF-1:0]  pa, pb;
  logic [WUPIF-1:0] u;

  posit_to_pif  #(.N(N), .WES(WES)) u_dec_a (.posit(a), .pif(pa));
  posit_to_pif  #(.N(N), .WES(WES)) u_dec_b (.posit(b), .pif(pb));
  pif_adder     #(.N(N), .WES(WES)) u_add   (.a(pa), .b(pb), .sub(sub), .upif(u));
  upif_to_posit #(.N(N), .WES(WES)) u_enc   (.upif(u), .posit(r));
endmodule
