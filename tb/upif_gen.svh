// Random saturated UPIF for the posit_ref specialisation R: exponent within
// the operator clamp range ([-EMAX, EMAX] for positive values, [-EMAX-1,
// EMAX-1] for negative ones), biased towards the range ends, with occasional
// zero and NaR.
// The clamp ranges are this design's saturation rule.
`define RAND_UPIF(R, U) \
  begin \
    bit s_; int e_; logic [R::WF-1:0] f_; \
    s_ = 1'($urandom); \
    case ($urandom_range(0, 5)) \
      0: e_ = s_ ? -R::EMAX - 1 + $urandom_range(0, 3) : -R::EMAX + $urandom_range(0, 3); \
      1: e_ = s_ ? R::EMAX - 1 - $urandom_range(0, 3) : R::EMAX - $urandom_range(0, 3); \
      default: e_ = $urandom_range(0, 2 * R::EMAX) - R::EMAX - (s_ ? 1 : 0); \
    endcase \
    f_ = R::WF'({$urandom, $urandom}); \
    if ($urandom_range(0, 7) == 0) f_ = '0; \
    U = {1'b0, s_, R::WE'(e_), ~s_, f_, 2'($urandom)}; \
    if ($urandom_range(0, 99) == 0) U = '0; \
    if ($urandom_range(0, 99) == 1) U = {1'b1, 1'b1, {(R::WUPIF-2){1'b0}}}; \
  end
