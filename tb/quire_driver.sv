// quire_driver: drives one quire configuration for tb_quire and checks it.
// Each episode clears the quire, accumulates a random number of random exact
// products (random signs, add or subtract, idle cycles in between, sometimes
// a NaR), requests the carry resolution and checks that
//  - busy stays high for exactly WQ/SEG cycles,
//  - afterwards no carry is pending and the quire equals the exact sum,
//    computed by the reference model modulo 2^WQ,
//  - the NaR flag is set exactly when a NaR was accumulated.
// It also counts how often a segment carry was stored, so the caller can
// check that the carry path was exercised.
// The checks are this testbench's choice; the reference is the exact sum.
`include "posit_ref.svh"
module quire_driver #(
  parameter int N = 16, parameter int WES = 1, parameter int SEG = 32,
  parameter int EPISODES = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   carries,
  output logic done
);
  typedef posit_ref #(N, WES) R;
  localparam int WQ   = N * N / 2;
  localparam int NSEG = WQ / SEG;
  localparam int WF   = R::WF;
  localparam int WE   = R::WE;
  localparam int EMAX = R::EMAX;

  logic clear, acc_valid, acc_sub, prod_nar, resolve, busy, q_clean, q_nar;
  logic signed [WE:0]     prod_exp;
  logic signed [2*WF+3:0] prod_sig;
  logic [WQ-1:0]          q;

  quire #(.N(N), .WES(WES), .SEG(SEG)) dut (
    .clk, .rst_n, .clear, .acc_valid, .acc_sub, .prod_nar, .prod_exp, .prod_sig,
    .resolve, .busy, .q_clean, .q, .q_nar
  );

  always @(posedge clk) if (rst_n && !q_clean) carries++;

  initial begin
    R::big_t expq, ma, mb, mp;
    bit na, nb, exp_nar;
    int xa, xb, nops, cyc;
    logic [R::WPIF-1:0] pa, pb;
    checks = 0; failures = 0; carries = 0; done = 0;
    clear = 0; acc_valid = 0; acc_sub = 0; prod_nar = 0; resolve = 0;
    prod_exp = '0; prod_sig = '0;
    @(posedge rst_n);
    repeat (EPISODES) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      expq = '0; exp_nar = 0;
      nops = $urandom_range(1, 40);
      for (int k = 0; k < nops; k++) begin
        R::decode(R::rand_posit(), na, ma, xa);
        R::decode(R::rand_posit(), nb, mb, xb);
        if ($urandom_range(0, 60) != 0) begin na = 0; nb = 0; end
        if (na) begin ma = 0; xa = 0; end
        if (nb) begin mb = 0; xb = 0; end
        pa = R::to_pif(na, ma, xa); pb = R::to_pif(nb, mb, xb);
        prod_sig = (2*WF+4)'(signed'({pa[R::WPIF-2], pa[WF:0]})) *
                   (2*WF+4)'(signed'({pb[R::WPIF-2], pb[WF:0]}));
        prod_exp = (WE+1)'(signed'(pa[WF+1 +: WE])) + (WE+1)'(signed'(pb[WF+1 +: WE]));
        prod_nar = na | nb;
        acc_sub  = 1'($urandom);
        acc_valid = 1;
        mp = ma * mb;
        if (xa + xb + 2 * EMAX >= 0) mp = mp <<< (xa + xb + 2 * EMAX);
        else mp = mp >>> (-(xa + xb + 2 * EMAX));
        if (na | nb) exp_nar = 1;
        else if (acc_sub) expq = expq - mp;
        else expq = expq + mp;
        @(negedge clk);
        acc_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      resolve = 1; @(negedge clk); resolve = 0;
      cyc = 0;
      while (busy && cyc < 10 * NSEG) begin cyc++; @(negedge clk); end
      checks++;
      if (cyc != NSEG) begin
        failures++; $display("FAIL quire %0d/%0d: resolve took %0d cycles", N, SEG, cyc);
      end
      checks++;
      if (!q_clean || q !== expq[WQ-1:0] || q_nar !== exp_nar) begin
        failures++;
        if (failures < 5) $display("FAIL quire %0d/%0d: q=%h exp=%h nar=%0d/%0d", N, SEG, q, expq[WQ-1:0], q_nar, exp_nar);
      end
    end
    done = 1;
  end
endmodule
