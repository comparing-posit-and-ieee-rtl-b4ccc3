// upif_normalize: normalises an exact two's complement result into a
// saturated Unrounded PIF (UPIF).
//
// The input value is  x * 2^(eb - FB)  where x is a W-bit two's complement
// integer, plus an optional sticky contribution (sticky_in = 1 means the exact
// value is strictly above that, by less than one unit of x's last place).
// A leading zero/one count finds the first bit that differs from the sign; the
// word is shifted so that this bit becomes the PIF implicit bit i (for a
// positive value) or the bit after the sign (for a negative value), giving a
// significand in [1,2) or [-2,-1). The next WF bits form the fraction, the bit
// after them the round bit, and everything below is ORed into the sticky bit.
//
// Saturation (done here, so that the encoders never see out-of-range values):
// positive results are clamped to the exponent range [-EMAX, EMAX] and
// negative ones to [-EMAX-1, EMAX-1]; a clamped result has a zero fraction and
// zero round/sticky, so it is exactly maxpos, minpos or their negatives.
// The clamp bounds are this design's reading of "saturation is managed in each
// PIF operator". Purely combinational. x = 0 gives the zero UPIF (the caller
// decides what a zero x with sticky_in means). nar forces the NaR UPIF.
// Normalisation by a fused LZOC+shift follows the published operators; the
// sharing of one normaliser by the adder, multiplier and quire conversion is
// this design's choice.
module upif_normalize
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  parameter int W   = 40,   // width of x
  parameter int FB  = 36,   // fraction bits of x
  parameter int EBW = 12,   // width of eb (two's complement)
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int EMAX  = emax_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic                  nar,
  input  logic signed [W-1:0]   x,
  input  logic signed [EBW-1:0] eb,
  input  logic                  sticky_in,
  output logic [WUPIF-1:0]      upif
);
  // Work on at least WF+4 bits so that f and round always exist.
  localparam int WW = (W > WF + 4) ? W : WF + 4;
  localparam int CW = $clog2(WW);

  logic [WW-1:0]  xw;       // x left-aligned in WW bits
  logic [WW-2:0]  body;     // bits below the sign
  logic [CW-1:0]  cnt;
  logic [WW-2:0]  shifted;
  logic           sgn;

  assign sgn  = x[W-1];
  assign xw   = WW'(x) << (WW - W);
  assign body = xw[WW-2:0];

  lzoc_shift #(.W(WW - 1), .CW(CW)) u_lzoc (
    .x(body), .fill(sgn), .cnt(cnt), .y(shifted)
  );

  logic            is_zero;
  int              e_full;
  logic            i_bit;
  logic [WF-1:0]   frac;
  logic            rnd;
  logic            stk;
  logic            s_o, i_o, r_o, st_o;
  logic [WF-1:0]   f_o;
  logic [WE-1:0]   e_o;

  always_comb begin
    is_zero = (x == '0);
    // shifted[WW-2] is the first bit that differs from the sign.
    i_bit = shifted[WW-2];
    frac  = shifted[WW-3 -: WF];
    rnd   = shifted[WW-3-WF];
    stk   = sticky_in | (|shifted[WW-4-WF:0]);
    // That bit had weight 2^(WW-2-cnt-FBx) with FBx = FB + (WW-W).
    e_full = int'(eb) + (WW - 2 - int'(cnt)) - (FB + (WW - W));

    s_o = sgn; i_o = i_bit; f_o = frac; r_o = rnd; st_o = stk;
    e_o = WE'(e_full);
    if (!sgn) begin
      if (e_full > EMAX) begin
        e_o = WE'(EMAX); f_o = '0; r_o = 1'b0; st_o = 1'b0;
      end else if (e_full < -EMAX) begin
        e_o = WE'(-EMAX); f_o = '0; r_o = 1'b0; st_o = 1'b0;
      end
    end else begin
      if (e_full > EMAX - 1) begin
        e_o = WE'(EMAX - 1); f_o = '0; r_o = 1'b0; st_o = 1'b0;
      end else if (e_full < -EMAX - 1) begin
        e_o = WE'(-EMAX - 1); f_o = '0; r_o = 1'b0; st_o = 1'b0;
      end
    end

    if (nar)
      upif = {1'b1, 1'b1, {WE{1'b0}}, 1'b0, {WF{1'b0}}, 2'b00};
    else if (is_zero)
      upif = '0;
    else
      upif = {1'b0, s_o, e_o, i_o, f_o, r_o, st_o};
  end
endmodule
