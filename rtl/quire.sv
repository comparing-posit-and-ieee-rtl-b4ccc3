// quire: exact accumulator for sums of posit products (Kulisch-style), kept
// in two's complement and split into SEG-bit segments.
//
// Quire layout (WQ = N*N/2 bits, bit j has weight 2^(j - 2*EMAX)):
//   sign | C = WQ - 4*EMAX - 2 carry guard bits | 4*EMAX+1 product bits.
// Accumulation (one product per cycle): the exact product
//   prod_sig * 2^(prod_exp - 2*WF)
// is placed at its position by a sign-extending left shifter, inverted for
// a subtraction (the +1 of the two's complement negation enters as the carry
// into the lowest segment), and added to the quire. Each SEG-bit segment has
// its own adder; the carry out of segment k is stored in a register and added
// into segment k+1 on the next cycle, so no carry chain is longer than SEG
// bits. The quire is therefore held in a redundant (carry-save, radix 2^SEG)
// form. Every cycle adds the registered carries, so with a zero summand the
// carries drain by themselves; `resolve` reserves NSEG = WQ/SEG such cycles,
// during which `busy` is high and new products are ignored, after which the
// segments alone hold the exact value (`q_clean`). SEG = WQ gives the
// unsegmented quire, whose resolve phase is a single cycle.
// A NaR product sets the sticky `q_nar` flag, which only `clear` resets.
// The carry-out of the top segment is dropped (overflow beyond the C guard
// bits wraps, as in any fixed-size accumulator).
// Ports: clear / acc_valid / resolve are sampled on the rising clock edge;
// q and q_nar are registered outputs. Reset (rst_n low) clears everything.
// The shifter, the XOR-plus-carry-in subtraction, the segmentation with
// registered inter-segment carries and the W_q/SEG resolve cycles follow the
// published quire; the dropped top carry and the port protocol are this
// design's choices.
module quire
  import posit_pkg::*;
#(
  parameter int N   = 32,
  parameter int WES = 2,
  parameter int SEG = 32,
  localparam int WF   = wf_of(N, WES),
  localparam int WE   = we_of(N, WES),
  localparam int EMAX = emax_of(N, WES),
  localparam int WQ   = wq_of(N),
  localparam int NSEG = WQ / SEG
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   acc_valid,
  input  logic                   acc_sub,
  input  logic                   prod_nar,
  input  logic signed [WE:0]     prod_exp,
  input  logic signed [2*WF+3:0] prod_sig,
  input  logic                   resolve,
  output logic                   busy,
  output logic                   q_clean,
  output logic [WQ-1:0]          q,
  output logic                   q_nar
);
  localparam int WP  = 2 * WF + 4;         // product significand width
  localparam int WSH = WQ + WP - 2;        // shifter width
  localparam int CW  = $clog2(NSEG + 1);

  // ---------------------------------------------------------------- shifter
  logic [WSH-1:0] wide;
  logic [WQ-1:0]  addend;
  logic           take;
  int             sh;

  assign take = acc_valid && !busy && !clear;

  always_comb begin
    // product LSB lands on quire bit prod_exp + 2*EMAX - 2*WF; shift by a
    // non-negative amount and drop the 2*WF+2 bits below the quire
    sh     = int'(prod_exp) + 2 * EMAX + 2;
    wide   = WSH'(prod_sig) << sh;
    addend = wide[WSH-1 -: WQ];
    if (!take || prod_nar) addend = '0;
    else if (acc_sub)      addend = ~addend;
  end

  // ------------------------------------------------------- segmented adder
  logic [SEG-1:0] seg   [NSEG];
  logic           cy    [NSEG];            // cy[k]: carry into segment k
  logic [SEG:0]   sum   [NSEG];
  logic [CW-1:0]  rcnt;

  always_comb begin
    for (int k = 0; k < NSEG; k++) begin
      logic cin;
      cin    = (k == 0) ? (take && !prod_nar && acc_sub) : cy[k];
      sum[k] = {1'b0, seg[k]} + {1'b0, addend[k*SEG +: SEG]} + (SEG+1)'(cin);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NSEG; k++) begin
        seg[k] <= '0;
        cy[k]  <= 1'b0;
      end
      q_nar <= 1'b0;
      rcnt  <= '0;
    end else if (clear) begin
      for (int k = 0; k < NSEG; k++) begin
        seg[k] <= '0;
        cy[k]  <= 1'b0;
      end
      q_nar <= 1'b0;
      rcnt  <= '0;
    end else begin
      for (int k = 0; k < NSEG; k++) begin
        seg[k] <= sum[k][SEG-1:0];
        cy[k]  <= (k == 0) ? 1'b0 : sum[k-1][SEG];
      end
      if (take && prod_nar) q_nar <= 1'b1;
      if (busy)         rcnt <= rcnt - 1'b1;
      else if (resolve) rcnt <= CW'(NSEG);
    end
  end

  assign busy = (rcnt != '0);

  always_comb begin
    q_clean = 1'b1;
    for (int k = 0; k < NSEG; k++) begin
      q[k*SEG +: SEG] = seg[k];
      if (cy[k]) q_clean = 1'b0;
    end
  end

  // After the NSEG resolve cycles every stored carry must be zero.
  property p_resolved;
    @(posedge clk) disable iff (!rst_n)
      (busy && rcnt == CW'(1) && !clear) |=> q_clean;
  endproperty
  a_resolved: assert property (p_resolved);
endmodule
