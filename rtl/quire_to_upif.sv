// quire_to_upif: converts a (carry-resolved) quire to an Unrounded PIF, to be
// encoded to a posit or rounded in place.
//
// The quire is read as four zones (bit j has weight 2^(j - 2*EMAX)):
//   sign (1) | overflow zone WO = EMAX + C | range zone WR = 2*EMAX + 1 |
//   underflow zone WZ = EMAX
// which for posit<32,2> are 1 | 150 | 241 | 120 bits.
//  - NaR flag set: the result is NaR.
//  - Overflow: some overflow-zone bit differs from the sign; the magnitude is
//    above maxpos and the result saturates to +maxpos or -maxpos.
//  - Otherwise {sign, range zone} is normalised by a leading zero/one count
//    and shift (upif_normalize); the underflow zone is OR-reduced into the
//    sticky bit, except for its top WF+2 bits, which join the normalised word
//    because a value near minpos in formats with few exponent bits (posit<8,0>)
//    keeps fraction and round bits below the range zone.
//  - A positive quire whose range zone is zero is either exactly zero or below
//    minpos; in the latter case (underflow zone non-zero) the result is
//    minpos. A negative value below minpos in magnitude normalises to -minpos
//    with the sticky bit set, which both encoders truncate to -minpos.
// Interface: quire value and NaR flag in, UPIF out. Combinational.
// The zone split (sign, overflow, range, underflow) and the range-zone
// LZOC+shift follow the published conversion; keeping the top underflow
// bits in the normalised word and the minpos / zero rule are this design's
// choices.
module quire_to_upif
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int EMAX  = emax_of(N, WES),
  localparam int WQ    = wq_of(N),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic [WQ-1:0]    q,
  input  logic             q_nar,
  output logic [WUPIF-1:0] upif
);
  localparam int WZ = EMAX;
  localparam int WR = 2 * EMAX + 1;
  localparam int WO = WQ - 1 - WR - WZ;
  // underflow-zone bits kept next to the range zone: a value near the bottom
  // of the range can still have its fraction and round bits down there
  localparam int WX = (WF + 2 < WZ) ? WF + 2 : WZ;

  logic                  sgn, ovf, rng_zero, unf_nz;
  logic [WO-1:0]         ozone;
  logic [WR-1:0]         rzone;
  logic [WZ-1:0]         uzone;
  logic [WUPIF-1:0]      u_rng;

  assign sgn   = q[WQ-1];
  assign ozone = q[WQ-2 -: WO];
  assign rzone = q[WZ +: WR];
  assign uzone = q[WZ-1:0];

  assign ovf      = (ozone != {WO{sgn}});
  assign rng_zero = (rzone == '0);
  assign unf_nz   = |uzone;

  logic unf_low_nz;
  if (WX < WZ) begin : g_low
    assign unf_low_nz = |uzone[WZ-WX-1:0];
  end else begin : g_nolow
    assign unf_low_nz = 1'b0;
  end

  upif_normalize #(.N(N), .WES(WES), .W(WR + 1 + WX), .FB(EMAX + WX), .EBW(2)) u_norm (
    .nar(1'b0), .x({sgn, rzone, uzone[WZ-1 -: WX]}), .eb(2'sd0), .sticky_in(unf_low_nz),
    .upif(u_rng)
  );

  always_comb begin
    if (q_nar)
      upif = {1'b1, 1'b1, {WE{1'b0}}, 1'b0, {WF{1'b0}}, 2'b00};
    else if (ovf)
      upif = sgn ? {1'b0, 1'b1, WE'(EMAX - 1), 1'b0, {WF{1'b0}}, 2'b00}
                 : {1'b0, 1'b0, WE'(EMAX),     1'b1, {WF{1'b0}}, 2'b00};
    else if (!sgn && rng_zero)
      upif = unf_nz ? {1'b0, 1'b0, WE'(-EMAX), 1'b1, {WF{1'b0}}, 2'b00} : '0;
    else
      upif = u_rng;
  end
endmodule
