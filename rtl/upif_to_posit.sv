// upif_to_posit: encodes an Unrounded PIF to the nearest posit
// (round to nearest, ties to even on the posit bit string).
//
// The regime length l and run bit b come from the high exponent bits
// e_h = e >>> WES: for e_h >= 0 the run is l = e_h+1 bits of (not s), for
// e_h < 0 it is l = -e_h bits of s. The word
//   { N-1 copies of b, not b (terminator), e_l xor s, f, round }
// is right-shifted by l with a shift-and-sticky: the N-1 bits that remain are
// the posit body, the last bit shifted out is the guard bit and every bit
// shifted out below it is ORed, together with the UPIF sticky, into the final
// sticky. round_up = guard and (lsb or sticky) is added to the body, and the
// sign is prepended. Because the result stays in two's complement form no
// negation is needed for negative values.
// The UPIF must already be saturated (its producer clamps the exponent), so
// the increment can never carry into NaR or wrap to zero.
// Interface: UPIF {isNaR, s, e, i, f, round, sticky} in, posit out.
// Combinational.
// The shift-with-sticky encoder and rounding on the two's complement bit
// string follow the published encoder; the exact assembly of the shifted
// word is this design's choice.
module upif_to_posit
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [WUPIF-1:0] upif,
  output logic [N-1:0]     posit
);
  localparam int WT = 2 * N - 2;

  logic                 nar, s, i, r, st;
  logic signed [WE-1:0] e;
  logic [WF-1:0]        f;

  assign {nar, s, e, i, f, r, st} = upif;

  logic signed [WE-1:0] e_h;
  int                   l;
  logic                 b;
  logic [N-2:0]         stem;
  logic [WE+WF:0]       low;   // {e xor s, f, round}; its low WES+WF+1 bits are used
  logic [WT-1:0]        t, v, below;
  logic                 guard, sticky, up;
  logic [N-2:0]         body;

  always_comb begin
    e_h = e >>> WES;
    if (e_h >= 0) begin
      l = int'(e_h) + 1;
      b = ~s;
    end else begin
      l = -int'(e_h);
      b = s;
    end
    low  = {e ^ {WE{s}}, f, r};
    stem = {~b, low[WES+WF:0]};
    t      = {{(N-1){b}}, stem};
    v      = t >> l;
    guard  = t[l-1];
    below  = t & ((WT'(1) << (l - 1)) - WT'(1));
    sticky = st | (|below);
    up     = guard & (v[0] | sticky);
    body   = v[N-2:0] + (N-1)'(up);
    if (nar)
      posit = {1'b1, {(N-1){1'b0}}};
    else if (!s && !i)
      posit = '0;
    else
      posit = {s, body};
  end
endmodule
