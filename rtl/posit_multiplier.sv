// posit_multiplier: posit-to-posit multiplier (posits held in registers).
//
// Decodes both posits to PIF (posit_to_pif), multiplies them into a saturated
// Unrounded PIF (pif_multiplier) and encodes the nearest posit
// (upif_to_posit). Interface: posits a, b in, posit r = a*b out.
// Combinational.
// This decode / operate / encode chain is the published posit-to-posit
// organisation; no pipeline registers are added (this design's choice).
module posit_multiplier
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int WPIF  = wpif_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r
);
  logic [WPIF-1:0]        pa, pb;
  logic [WUPIF-1:0]       u;
  logic                   p_nar;
  logic signed [WE:0]     p_exp;
  logic signed [2*WF+3:0] p_sig;

  posit_to_pif   #(.N(N), .WES(WES)) u_dec_a (.posit(a), .pif(pa));
  posit_to_pif   #(.N(N), .WES(WES)) u_dec_b (.posit(b), .pif(pb));
  pif_multiplier #(.N(N), .WES(WES)) u_mul   (.a(pa), .b(pb), .upif(u),
                                              .prod_nar(p_nar), .prod_exp(p_exp), .prod_sig(p_sig));
  upif_to_posit  #(.N(N), .WES(WES)) u_enc   (.upif(u), .posit(r));
endmodule
