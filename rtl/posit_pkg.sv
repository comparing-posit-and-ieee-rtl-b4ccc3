// posit_pkg: widths and constants shared by the posit / PIF operators.
//
// A posit format is defined by its word size N and exponent-scale size WES.
// Every posit is a normal floating-point number of a fixed "smallest superset"
// format, the Posit Intermediate Format (PIF), whose field widths follow from
// N and WES:
//   WF   = N - 3 - WES                    fraction bits
//   WE   = 1 + WES + ceil(log2(N-2))      two's complement exponent bits
//   EMAX = (N-2) * 2^WES                  largest exponent (maxpos = 2^EMAX)
//   WPIF = WE + WF + 3                    {isNaR, s, e, i, f}
//   WUPIF= WPIF + 2                       {pif, round, sticky}
//   WQ   = N*N/2                          quire width (standard posits)
// A PIF value is (-2*s + i + 0.f) * 2^e, i.e. {s,i,f} is a two's complement
// significand in [1,2) or [-2,-1); s = i = 0 encodes zero and isNaR marks NaR.
// These formulas follow the standard posit formats (WES = log2(N) - 3); the
// packing order of the fields inside a PIF vector is this design's choice.
package posit_pkg;

  function automatic int clog2i(input int v);
    int r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  function automatic int wf_of(input int n, input int wes);
    return n - 3 - wes;
  endfunction

  function automatic int we_of(input int n, input int wes);
    return 1 + wes + clog2i(n - 2);
  endfunction

  function automatic int emax_of(input int n, input int wes);
    return (n - 2) << wes;
  endfunction

  function automatic int wpif_of(input int n, input int wes);
    return we_of(n, wes) + wf_of(n, wes) + 3;
  endfunction

  function automatic int wupif_of(input int n, input int wes);
    return wpif_of(n, wes) + 2;
  endfunction

  // Quire of a standard posit format: N^2/2 bits, C = N-2 carry guard bits.
  function automatic int wq_of(input int n);
    return (n * n) / 2;
  endfunction

  // Carry guard bits: whatever is left of WQ above sign + product range.
  function automatic int qcarry_of(input int n, input int wes);
    return wq_of(n) - 4 * emax_of(n, wes) - 2;
  endfunction

  // PAU instruction set (PIF-register architecture).
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_LOAD   = 4'd1,   // rd <- decode(in_data)
    OP_STORE  = 4'd2,   // out_data <- encode(rs1)
    OP_ADD    = 4'd3,   // rd <- round(rs1 + rs2)
    OP_SUB    = 4'd4,   // rd <- round(rs1 - rs2)
    OP_MUL    = 4'd5,   // rd <- round(rs1 * rs2)
    OP_QCLR   = 4'd6,   // quire <- 0
    OP_QMADD  = 4'd7,   // quire <- quire + rs1*rs2 (exact)
    OP_QMSUB  = 4'd8,   // quire <- quire - rs1*rs2 (exact)
    OP_QADD   = 4'd9,   // quire <- quire + rs1 (exact)
    OP_QROUND = 4'd10   // rd <- round(quire), after carry propagation
  } pau_op_e;

endpackage
