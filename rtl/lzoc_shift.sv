// lzoc_shift: combined leading zero/one counter and left shifter.
//
// Counts how many leading bits of `x` (from the MSB down) are equal to `fill`
// and shifts `x` left by that count, so that the first bit that differs from
// `fill` ends up in the MSB. `cnt` saturates at W when every bit equals
// `fill` (the shifted output is then all zeros). Zeros are shifted in.
// The count is built MSB-first, one stage per bit of the count: stage k tests
// whether the top 2^k bits of the partially shifted word all equal `fill`
// (an AND reduction) and, if so, shifts by 2^k. This is the structure
// described for the fused LZOC+shift; the code is purely combinational.
// The stage-by-stage realisation is this design's choice.
module lzoc_shift #(
  parameter int W = 32,
  parameter int CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  input  logic          fill,
  output logic [CW-1:0] cnt,
  output logic [W-1:0]  y
);
  localparam int PW = 1 << CW;   // padded width, power of two >= W+1

  logic [PW-1:0] stage;
  logic [PW-1:0] pat;
  logic [CW-1:0] c;

  always_comb begin
    // Pad on the right with ~fill so the count can never exceed W.
    stage = {x, {(PW - W){~fill}}};
    pat   = {PW{fill}};
    c     = '0;
    for (int k = CW - 1; k >= 0; k--) begin
      // mask selecting the top 2^k bits
      if (((stage ^ pat) & ~({PW{1'b1}} >> (1 << k))) == '0) begin
        stage = stage << (1 << k);
        c[k]  = 1'b1;
      end
    end
    cnt = c;
    y   = x << c;
  end
endmodule
