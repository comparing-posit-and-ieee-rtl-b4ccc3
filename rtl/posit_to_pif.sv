// posit_to_pif: decodes an N-bit posit into the Posit Intermediate Format.
//
// The posit is read directly in its two's complement form, without negating
// negative posits: the sign s is the MSB, the regime is the run of bits equal
// to the bit after the sign, the exponent-scale bits are XORed with s and the
// remaining bits are the fraction of a two's complement significand whose
// implicit bit is i = not s. One combined leading zero/one count and shift
// (lzoc_shift) removes the regime. The count skips the first regime bit, so it
// returns l' = l-1, and the regime exponent needs no adder:
//   e_h = not l'  (regime bits equal s, e_h = -l)   or   e_h = l' (otherwise).
// The exponent is {e_h, e_l}. An OR reduction of the N-1 bits after the sign
// detects zero (s = 0) and NaR (s = 1). This follows the decoder described
// for the PIF architecture; zero and NaR are given e = 0, f = 0 here.
// Interface: posit in, PIF {isNaR, s, e[WE], i, f[WF]} out. Combinational.
module posit_to_pif
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF   = wf_of(N, WES),
  localparam int WE   = we_of(N, WES),
  localparam int WPIF = wpif_of(N, WES)
) (
  input  logic [N-1:0]    posit,
  output logic [WPIF-1:0] pif
);
  localparam int CW  = $clog2(N - 1);   // holds 0 .. N-2
  localparam int WEH = WE - WES;        // regime part of the exponent

  logic          s, b, nz;
  logic [CW-1:0] lp;                    // l' = regime length - 1
  logic [N-3:0]  stem;                  // terminator, es bits, fraction

  assign s  = posit[N-1];
  assign b  = posit[N-2];
  assign nz = |posit[N-2:0];

  lzoc_shift #(.W(N - 2), .CW(CW)) u_lzoc (
    .x(posit[N-3:0]), .fill(b), .cnt(lp), .y(stem)
  );

  logic [WEH-1:0] e_h;
  logic [WE-1:0]  e;
  logic [WF-1:0]  f;

  always_comb begin
    e_h = (b == s) ? ~WEH'(lp) : WEH'(lp);
    f   = stem[WF-1:0];
  end

  if (WES > 0) begin : g_es
    assign e = {e_h, stem[N-4 -: WES] ^ {WES{s}}};
  end else begin : g_noes
    assign e = e_h;
  end

  always_comb begin
    if (!nz)
      pif = s ? {1'b1, 1'b1, {WE{1'b0}}, 1'b0, {WF{1'b0}}} : '0;
    else
      pif = {1'b0, s, e, ~s, f};
  end
endmodule
