// pif_adder: PIF adder/subtracter producing a saturated Unrounded PIF.
//
// Single-path floating-point addition on two's complement significands:
//  1. b's significand is negated for a subtraction (two's complement, before
//     alignment, so that the later sticky bit stays exact);
//  2. the exponents are compared and the operands swapped so that the one
//     with the larger exponent is kept as is (a zero operand never wins the
//     comparison, so zero needs no special path);
//  3. the other significand is arithmetic-shifted right by the exponent
//     difference; bits shifted out are ORed into a sticky bit;
//  4. the two are added on WF+7 bits (3 integer bits, WF+4 fraction bits);
//  5. a leading zero/one count and shift normalises the sum, extracts the
//     fraction, the round bit and the sticky bit and applies saturation
//     (upif_normalize).
// Keeping WF+4 fraction bits is enough because a long alignment shift (which
// sets the sticky bit) and a long normalisation shift (cancellation) never
// happen together. NaR in either operand gives NaR.
// Interface: PIF a, PIF b, sub (1: a-b) in; UPIF out. Combinational.
// The single-path structure and the narrow datapath follow the published adder;
// negating b before the swap (rather than an inverter plus carry-in) and the
// exact widths are this design's choices.
module pif_adder
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int WPIF  = wpif_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [WPIF-1:0]  a,
  input  logic [WPIF-1:0]  b,
  input  logic             sub,
  output logic [WUPIF-1:0] upif
);
  localparam int P  = WF + 4;       // fraction bits of the datapath
  localparam int WS = P + 3;        // 3 integer bits: sums lie in [-4, 4)

  logic                 a_nar, a_s, a_i, b_nar, b_s, b_i;
  logic signed [WE-1:0] a_e, b_e;
  logic [WF-1:0]        a_f, b_f;

  assign {a_nar, a_s, a_e, a_i, a_f} = a;
  assign {b_nar, b_s, b_e, b_i, b_f} = b;

  logic signed [WS-1:0]   sa, sb, bg, sml, aligned, sum;
  logic signed [WE-1:0]   e_big;
  logic                   a_zero, b_zero, swap;
  int                     d;
  logic [2*WS-1:0]        wide;
  logic                   sticky;

  always_comb begin
    a_zero = !a_s && !a_i;
    b_zero = !b_s && !b_i;
    // significands {s, i, f} as WS-bit integers with P fraction bits
    sa = WS'(signed'({a_s, a_i, a_f})) <<< (P - WF);
    sb = WS'(signed'({b_s, b_i, b_f})) <<< (P - WF);
    if (sub) sb = -sb;

    swap = b_zero ? 1'b0 : (a_zero ? 1'b1 : (b_e > a_e));
    if (swap) begin
      bg = sb; sml = sa; e_big = b_e;
      d   = int'(b_e) - int'(a_e);
    end else begin
      bg = sa; sml = sb; e_big = a_e;
      d   = int'(a_e) - int'(b_e);
    end
    if (a_zero || b_zero) sml = '0;
    if (d > WS) d = WS;

    // shift and sticky
    wide    = {sml, {WS{1'b0}}};
    wide    = $signed(wide) >>> d;
    aligned = wide[2*WS-1 -: WS];
    sticky  = |wide[WS-1:0];
    sum     = bg + aligned;
  end

  upif_normalize #(.N(N), .WES(WES), .W(WS), .FB(P), .EBW(WE)) u_norm (
    .nar(a_nar | b_nar), .x(sum), .eb(e_big), .sticky_in(sticky), .upif(upif)
  );
endmodule
