// pif_to_posit: exact PIF to posit encoder, used on the store path of the
// PIF-register architecture, where every register already holds a value that
// is exactly a posit (results are rounded in place before write-back).
//
// Same construction as upif_to_posit without the rounding: the word
// { N-1 copies of the regime bit b, not b, e_l xor s, f } is shifted right by
// the regime length l and its N-1 low bits become the posit body. Bits that
// fall off the end are dropped; they are zero for a value that is exactly a
// posit. Interface: PIF in, posit out. Combinational.
// The shifter-based encoder follows the published rounding encoder with the
// round and sticky logic removed, as described for the store path.
module pif_to_posit
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF   = wf_of(N, WES),
  localparam int WE   = we_of(N, WES),
  localparam int WPIF = wpif_of(N, WES)
) (
  input  logic [WPIF-1:0] pif,
  output logic [N-1:0]    posit
);
  localparam int WT = 2 * N - 2;

  logic                 nar, s, i;
  logic signed [WE-1:0] e;
  logic [WF-1:0]        f;

  assign {nar, s, e, i, f} = pif;

  logic signed [WE-1:0] e_h;
  int                   l;
  logic                 b;
  logic [N-2:0]         stem;
  logic [WE+WF:0]       low;   // {e xor s, f, round}; its low WES+WF+1 bits are used
  logic [WT-1:0]        v;

  always_comb begin
    e_h = e >>> WES;
    if (e_h >= 0) begin
      l = int'(e_h) + 1;
      b = ~s;
    end else begin
      l = -int'(e_h);
      b = s;
    end
    // stem carries one spare zero LSB so the shift by l lines up as in the
    // rounding encoder
    low  = {e ^ {WE{s}}, f, 1'b0};
    stem = {~b, low[WES+WF:0]};
    v = {{(N-1){b}}, stem} >> l;
    if (nar)
      posit = {1'b1, {(N-1){1'b0}}};
    else if (!s && !i)
      posit = '0;
    else
      posit = {s, v[N-2:0]};
  end
endmodule
