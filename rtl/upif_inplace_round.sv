// upif_inplace_round: rounds an Unrounded PIF to the PIF of the posit it
// would encode to, without leaving the PIF format.
//
// This is the rounding step of the architecture that keeps decoded values
// (PIF) in registers and uses posits only as a memory encoding: the result of
// every operation must equal decode(encode(result)), bit for bit.
// Instead of shifting the significand to the rounding position and back, the
// rounding position is moved: four masks are derived from the regime length l
// (a function of the exponent only):
//   round mask  - the last bit kept by the posit (bit l); when that bit is the
//                 regime terminator its value is taken from the regime instead
//   guard mask  - the bit below it
//   sticky mask - every bit below the guard bit
//   keep mask   - every bit from the round bit upwards
// They are applied to Z = {e xor s, f, round}. In this integer the posit body
// bits {regime, es xor s, fraction} appear in the same order and with the same
// carries, so adding the round-up bit at the round mask position and clearing
// the bits below it is exactly posit rounding (ties to even). A carry out of
// the fraction moves into the exponent as it would move into the regime.
// When the regime fills the whole word (l = N-1) the posit keeps no exponent
// scale or fraction bits and its guard bit is the regime terminator, which
// never rounds up: the fraction is simply cleared.
// The masks are made with shifters here; a lookup table indexed by the
// exponent is an equivalent alternative. The input must be saturated by its
// producer. Interface: UPIF in, PIF out. Combinational.
// Rounding with masks on the {exponent, fraction} word follows the published
// in-place rounding; the published version reads the masks from lookup
// tables, shifters are this design's choice.
module upif_inplace_round
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int WPIF  = wpif_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [WUPIF-1:0] upif,
  output logic [WPIF-1:0]  pif
);
  localparam int WZ = WE + WF + 1;

  logic                 nar, s, i, r, st;
  logic signed [WE-1:0] e;
  logic [WF-1:0]        f;

  assign {nar, s, e, i, f, r, st} = upif;

  logic signed [WE-1:0] e_h;
  int                   l;
  logic [WZ-1:0]        z, m_round, m_guard, m_sticky, m_keep, zk;
  logic                 lsb, guard, sticky, up;
  logic [WE-1:0]        e_o;
  logic [WF-1:0]        f_o;

  always_comb begin
    e_h = e >>> WES;
    l   = (e_h >= 0) ? int'(e_h) + 1 : -int'(e_h);

    z        = {e ^ {WE{s}}, f, r};
    m_round  = WZ'(1) << l;
    m_guard  = m_round >> 1;
    m_sticky = m_guard - WZ'(1);
    m_keep   = ~(m_round - WZ'(1));

    // When the posit keeps no exponent-scale or fraction bit (l = N-2) its
    // last bit is the regime terminator, whose value (not the exponent LSB)
    // decides the tie.
    if (l == N - 2) lsb = (e_h >= 0) ? s : ~s;
    else            lsb = |(z & m_round);
    guard  = |(z & m_guard);
    sticky = st | (|(z & m_sticky));
    up     = guard & (lsb | sticky);
    zk     = (z & m_keep) + (up ? m_round : '0);

    if (l >= N - 1) begin
      e_o = e;
      f_o = '0;
    end else begin
      e_o = zk[WZ-1 -: WE] ^ {WE{s}};
      f_o = zk[WF:1];
    end

    if (nar)
      pif = {1'b1, 1'b1, {WE{1'b0}}, 1'b0, {WF{1'b0}}};
    else if (!s && !i)
      pif = '0;
    else
      pif = {1'b0, s, e_o, i, f_o};
  end
endmodule
