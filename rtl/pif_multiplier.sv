// pif_multiplier: PIF multiplier producing a saturated Unrounded PIF, and the
// exact product used as the quire input.
//
// The exact part adds the two exponents and multiplies the two's complement
// significands {s, i, f} (each in [-2, 2)) into a 2*WF+4-bit signed product
// with 2*WF fraction bits; its value lies in [-4, 4]. The normalisation part
// then moves the leading significant bit to the implicit-bit position (a
// shift of at most two places, with the matching exponent update), extracts
// fraction, round and sticky bits and saturates (upif_normalize).
// A zero operand makes the product zero; NaR in either operand gives NaR.
// Interface: PIF a, PIF b in; UPIF out; exact product {prod_nar, prod_exp,
// prod_sig} out, value prod_sig * 2^(prod_exp - 2*WF). Combinational.
// Exponent addition, signed significand product and the exact-product tap
// for the quire follow the published multiplier; reusing the generic
// normaliser for the at-most-two-place shift is this design's choice.
module pif_multiplier
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int WPIF  = wpif_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [WPIF-1:0]        a,
  input  logic [WPIF-1:0]        b,
  output logic [WUPIF-1:0]       upif,
  output logic                   prod_nar,
  output logic signed [WE:0]     prod_exp,
  output logic signed [2*WF+3:0] prod_sig
);
  logic                 a_nar, a_s, a_i, b_nar, b_s, b_i;
  logic signed [WE-1:0] a_e, b_e;
  logic [WF-1:0]        a_f, b_f;

  assign {a_nar, a_s, a_e, a_i, a_f} = a;
  assign {b_nar, b_s, b_e, b_i, b_f} = b;

  logic signed [WF+1:0] sa, sb;

  always_comb begin
    sa       = signed'({a_s, a_i, a_f});
    sb       = signed'({b_s, b_i, b_f});
    prod_sig = (2*WF+4)'(sa) * (2*WF+4)'(sb);
    prod_exp = (WE+1)'(a_e) + (WE+1)'(b_e);
    prod_nar = a_nar | b_nar;
  end

  upif_normalize #(.N(N), .WES(WES), .W(2*WF+4), .FB(2*WF), .EBW(WE+1)) u_norm (
    .nar(prod_nar), .x(prod_sig), .eb(prod_exp), .sticky_in(1'b0), .upif(upif)
  );
endmodule
