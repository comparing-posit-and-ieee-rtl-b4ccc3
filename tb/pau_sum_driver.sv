// pau_sum_driver: runs the "sum of 1000 products" workload on one posit_pau
// configuration. It loads the 16 registers with random posits, issues 1000
// QMADD instructions on random register pairs back to back (one per cycle),
// then QROUND into a register and STORE. The stored posit must equal the
// reference rounding of the exact sum, and the loop must take exactly
// 1000 + WQ/SEG + 2 cycles from the first QMADD to the completion of QROUND
// (QROUND: one cycle to start the carry resolution, WQ/SEG resolve cycles,
// one cycle to round and write).
// The workload (1000 products rounded once) is the published quire
// benchmark; the cycle formula is this design's reading of it.
`include "posit_ref.svh"
module pau_sum_driver #(
  parameter int N = 32, parameter int WES = 2, parameter int SEG = 32,
  parameter int NPROD = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cycles,
  output logic done
);
  import posit_pkg::*;
  typedef posit_ref #(N, WES) R;
  localparam int WQ = N * N / 2, NSEG = WQ / SEG, EMAX = R::EMAX;

  logic         in_valid, in_ready, out_valid, p2p_sub;
  logic [3:0]   in_op, in_rd, in_rs1, in_rs2;
  logic [N-1:0] in_data, out_data, p2p_a, p2p_b, p2p_sum, p2p_prod;

  posit_pau #(.N(N), .WES(WES), .SEG(SEG)) dut (.*);

  logic [N-1:0] model [16];

  initial begin
    R::big_t expq, ma, mb, mp, qv;
    bit na, nb;
    int xa, xb, ra, rb, t0;
    logic [N-1:0] exp_p;
    checks = 0; failures = 0; cycles = 0; done = 0;
    in_valid = 0; in_op = 0; in_rd = 0; in_rs1 = 0; in_rs2 = 0; in_data = 0;
    p2p_sub = 0; p2p_a = 0; p2p_b = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int r = 0; r < 16; r++) begin
      // magnitudes near 1 so that the sum has real cancellation
      model[r] = {1'($urandom), 2'b01, (N-3)'({$urandom, $urandom})};
      if (model[r][N-1]) model[r][N-2:N-3] = 2'b10;
      in_valid = 1; in_op = OP_LOAD; in_rd = 4'(r); in_data = model[r];
      @(negedge clk);
    end
    in_op = OP_QCLR; @(negedge clk);
    expq = '0;
    t0 = 0;
    for (int k = 0; k < NPROD; k++) begin
      ra = $urandom_range(0, 15); rb = $urandom_range(0, 15);
      in_op = OP_QMADD; in_rs1 = 4'(ra); in_rs2 = 4'(rb);
      R::decode(model[ra], na, ma, xa); R::decode(model[rb], nb, mb, xb);
      mp = ma * mb;
      expq = expq + ((xa + xb + 2 * EMAX >= 0) ? (mp <<< (xa + xb + 2 * EMAX)) : (mp >>> (-(xa + xb + 2 * EMAX))));
      @(negedge clk);
      t0++;
      if (!in_ready) begin failures++; $display("FAIL: QMADD stalled"); end
    end
    in_op = OP_QROUND; in_rd = 0;
    #1;
    while (!in_ready) begin t0++; @(negedge clk); #1; end
    @(negedge clk); t0++;
    in_op = OP_STORE; in_rs1 = 0;
    @(negedge clk);
    in_valid = 0;
    #1;
    qv = R::big_t'(signed'(expq[WQ-1:0]));
    exp_p = R::encode(qv, -2 * EMAX);
    cycles = t0;
    checks++;
    if (!out_valid || out_data !== exp_p) begin
      failures++; $display("FAIL sum posit<%0d,%0d>/%0d: got %h exp %h", N, WES, SEG, out_data, exp_p);
    end
    checks++;
    if (t0 != NPROD + NSEG + 2) begin
      failures++; $display("FAIL sum posit<%0d,%0d>/%0d: %0d cycles, expected %0d", N, WES, SEG, t0, NPROD + NSEG + 2);
    end
    $display("posit<%0d,%0d> quire %0d bits, %0d-bit segments: %0d products in %0d cycles, result %h",
             N, WES, WQ, SEG, NPROD, t0, out_data);
    done = 1;
  end
endmodule
