// posit_ref: reference model of posit arithmetic for the testbenches.
//
// Works on exact values  m * 2^x  (m a wide two's complement integer, x an int)
// and implements the posit standard directly from its definition, without any
// of the hardware's tricks: decoding negates negative posits and reads the
// regime, exponent-scale and fraction of the magnitude; encoding writes the
// magnitude's infinitely long posit bit string, rounds it to nearest, ties to
// even, clamps to [minpos, maxpos], and negates. The PIF helpers build and
// read the intermediate format from its definition
//   value = (-2*s + i + 0.f) * 2^e.
// Static functions of a parameterised class, one specialisation per format.
// The model follows the posit definition, not the hardware's algorithms.
`ifndef POSIT_REF_SVH
`define POSIT_REF_SVH
class posit_ref #(int N = 16, int WES = 1);
  localparam int RW   = (N > 32) ? 2304 : 1024;  // holds any exact sum or product
  localparam int WF   = N - 3 - WES;
  localparam int EMAX = (N - 2) << WES;
  localparam int WE   = 1 + WES + $clog2(N - 2);
  localparam int WPIF = WE + WF + 3;
  localparam int WUPIF = WPIF + 2;
  typedef logic signed [RW-1:0] big_t;

  static function automatic int msb(input big_t a);
    for (int k = RW - 1; k >= 0; k--) if (a[k]) return k;
    return -1;
  endfunction

  // value of posit p; nar set for NaR
  static function automatic void decode(input logic [N-1:0] p, output bit nar,
                                        output big_t m, output int x);
    logic [N-1:0] q;
    int idx, l, k, el, nf;
    bit rb;
    nar = 0; m = '0; x = 0;
    if (p == '0) return;
    if (p == {1'b1, {(N-1){1'b0}}}) begin nar = 1; return; end
    q = p[N-1] ? -p : p;
    idx = N - 2; rb = q[idx]; l = 0;
    while (idx >= 0 && q[idx] == rb) begin l++; idx--; end
    idx--;                                    // terminator
    k = rb ? l - 1 : -l;
    el = 0;
    for (int j = 0; j < WES; j++) begin
      el = el * 2 + ((idx >= 0) ? int'(q[idx]) : 0);
      idx--;
    end
    nf = (idx + 1 > 0) ? idx + 1 : 0;
    m = big_t'(1) << nf;
    for (int j = 0; j < nf; j++) m[j] = q[j];
    x = k * (1 << WES) + el - nf;
    if (p[N-1]) m = -m;
  endfunction

  // nearest posit to m * 2^x (sticky values: pass an extra low 1 bit)
  static function automatic logic [N-1:0] encode(input big_t m, input int x);
    big_t mag;
    int k, E, eh, el, pos;
    bit s[$];
    logic [N-2:0] body;
    bit r, st;
    logic [N-1:0] res;
    if (m == '0) return '0;
    mag = (m < 0) ? -m : m;
    k = msb(mag);
    E = x + k;
    if (E > EMAX)       res = {1'b0, {(N-1){1'b1}}};
    else if (E < -EMAX) res = {{(N-1){1'b0}}, 1'b1};
    else begin
      eh = E >>> WES;
      el = E - eh * (1 << WES);
      if (eh >= 0) begin
        for (int j = 0; j <= eh; j++) s.push_back(1);
        s.push_back(0);
      end else begin
        for (int j = 0; j < -eh; j++) s.push_back(0);
        s.push_back(1);
      end
      for (int j = WES - 1; j >= 0; j--) s.push_back(el[j]);
      for (int j = k - 1; j >= 0; j--) s.push_back(mag[j]);
      body = '0;
      for (int j = 0; j < N - 1; j++) body[N-2-j] = (j < s.size()) ? s[j] : 1'b0;
      pos = N - 1;
      r  = (pos < s.size()) ? s[pos] : 1'b0;
      st = 0;
      for (int j = pos + 1; j < s.size(); j++) st |= s[j];
      if (r && (body[0] || st)) body = body + 1'b1;
      res = {1'b0, body};
    end
    if (m < 0) res = -res;
    return res;
  endfunction

  // PIF of an exactly representable non-zero value, or zero / NaR
  static function automatic logic [WPIF-1:0] to_pif(input bit nar, input big_t m, input int x);
    big_t mag, sig;
    int k, e, sh;
    bit s;
    logic [WE-1:0] ev;
    if (nar) return {1'b1, 1'b1, {(WPIF-2){1'b0}}};
    if (m == '0) return '0;
    s = (m < 0);
    mag = s ? -m : m;
    k = msb(mag);
    if (s && mag == (big_t'(1) << k)) e = x + k - 1;
    else e = x + k;
    sh = x - e + WF;                        // sig * 2^WF = m * 2^sh
    sig = (sh >= 0) ? (m <<< sh) : (m >>> (-sh));
    ev = WE'(e);
    return {1'b0, s, ev, ~s, sig[WF-1:0]};
  endfunction

  static function automatic void pif_val(input logic [WPIF-1:0] p, output bit nar,
                                         output big_t m, output int x);
    logic [WE-1:0] ev;
    logic [WF+1:0] sig;   // {s, i, f}
    nar = p[WPIF-1];
    ev  = p[WF+1 +: WE];
    sig = {p[WPIF-2], p[WF:0]};
    m   = big_t'(signed'(sig));
    x   = int'(signed'(ev)) - WF;
  endfunction

  // value of a UPIF with the sticky bit folded in as an extra low 1
  static function automatic void upif_val(input logic [WUPIF-1:0] u, output bit nar,
                                          output big_t m, output int x);
    logic [WE-1:0] ev;
    logic [WF+2:0] sig;   // {s, i, f, r}
    nar = u[WUPIF-1];
    ev  = u[WF+3 +: WE];
    sig = {u[WUPIF-2], u[WF+2:1]};
    m   = big_t'(signed'(sig));
    m   = (m <<< 1) | big_t'(u[0]);
    x   = int'(signed'(ev)) - WF - 2;
  endfunction

  static function automatic bit val_eq(input big_t m1, input int x1, input big_t m2, input int x2);
    if (x1 > x2) return (m1 <<< (x1 - x2)) == m2;
    return m1 == (m2 <<< (x2 - x1));
  endfunction

  static function automatic logic [N-1:0] rand_posit();
    logic [N-1:0] p;
    p = N'({$urandom, $urandom});
    case ($urandom_range(0, 9))
      0: p = {p[N-1], {(N-2){p[N-1]}}, p[0]};        // near 0 / extremes
      1: p = {p[N-1], ~p[N-1], {(N-2){p[N-1]}}};
      2: p[N-2:N/2] = {(N-1-N/2){p[N-2]}};            // long regime
      default: ;
    endcase
    return p;
  endfunction
endclass
`endif
