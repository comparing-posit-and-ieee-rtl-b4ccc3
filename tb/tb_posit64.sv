// tb_posit64: checks the operators at posit<64,3>, the largest standard size.
// Random operand pairs (biased to long regimes and to near-cancellation) go
// through both organisations side by side:
//  - posit to posit: posit_adder and posit_multiplier;
//  - PIF registers: posit_to_pif on each operand, pif_adder / pif_multiplier,
//    upif_inplace_round, then pif_to_posit for the store.
// Both results must equal the reference posit of the exact sum or product,
// rounded to nearest, ties to even, with saturation. This covers the
// decoder, both encoders and the in-place rounding at N = 64.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_posit64;
  typedef posit_ref #(64, 3) r64;
  localparam int N = 64, WES = 3;
  localparam int WPIF = r64::WPIF, WUPIF = r64::WUPIF;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             sub;
  logic [N-1:0]     a, b, sum_p2p, prod_p2p, sum_pif, prod_pif;
  logic [WPIF-1:0]  pa, pb, rs, rp;
  logic [WUPIF-1:0] us, up;
  logic             pn;
  logic [r64::WE:0] pe;
  logic [2*r64::WF+3:0] ps;

  posit_adder      #(.N(N), .WES(WES)) u_padd (.a, .b, .sub, .r(sum_p2p));
  posit_multiplier #(.N(N), .WES(WES)) u_pmul (.a, .b, .r(prod_p2p));

  posit_to_pif       #(.N(N), .WES(WES)) u_da (.posit(a), .pif(pa));
  posit_to_pif       #(.N(N), .WES(WES)) u_db (.posit(b), .pif(pb));
  pif_adder          #(.N(N), .WES(WES)) u_add (.a(pa), .b(pb), .sub, .upif(us));
  pif_multiplier     #(.N(N), .WES(WES)) u_mul (.a(pa), .b(pb), .upif(up),
                                                .prod_nar(pn), .prod_exp(pe), .prod_sig(ps));
  upif_inplace_round #(.N(N), .WES(WES)) u_rs (.upif(us), .pif(rs));
  upif_inplace_round #(.N(N), .WES(WES)) u_rp (.upif(up), .pif(rp));
  pif_to_posit       #(.N(N), .WES(WES)) u_es (.pif(rs), .posit(sum_pif));
  pif_to_posit       #(.N(N), .WES(WES)) u_ep (.pif(rp), .posit(prod_pif));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h sub=%0d got=%h exp=%h", what, a, b, sub, got, exp);
    end
  endtask

  initial begin
    bit na, nb;
    r64::big_t ma, mb, ms, mp;
    int xa, xb, xs;
    logic [N-1:0] es, ep, nar;
    int sat;
    sat = 0;
    nar = {1'b1, {(N-1){1'b0}}};
    for (int v = 0; v < 20000; v++) begin
      a = r64::rand_posit(); b = r64::rand_posit();
      if (v % 5 == 0) b = a ^ N'($urandom_range(0, 3));   // near cancellation
      sub = v[0];
      #1;
      r64::decode(a, na, ma, xa); r64::decode(b, nb, mb, xb);
      if (sub) mb = -mb;
      xs = (xa < xb) ? xa : xb;
      ms = (ma <<< (xa - xs)) + (mb <<< (xb - xs));
      es = (na | nb) ? nar : r64::encode(ms, xs);
      if (sub) mb = -mb;
      mp = ma * mb;
      ep = (na | nb) ? nar : r64::encode(mp, xa + xb);
      if (ep[N-2:0] == {(N-1){~ep[N-1]}} || ep[N-2:0] == {{(N-2){ep[N-1]}}, ~ep[N-1]}) sat++;
      cmp("p2p add", sum_p2p, es);
      cmp("pif add", sum_pif, es);
      cmp("p2p mul", prod_p2p, ep);
      cmp("pif mul", prod_pif, ep);
      if (v % 16 == 0) @(posedge clk);
    end
    // saturated (maxpos / minpos) products must have been exercised
    checks++;
    if (sat == 0) begin failures++; $display("FAIL: no saturated product"); end
    $display("saturated products: %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
