// tb_posit_pau: end-to-end test of the posit arithmetic unit at its default
// parameters (posit<32,2>, 16 PIF registers, 512-bit quire in 32-bit
// segments). A random instruction stream is run against a model that keeps
// every register as the posit it must equal and computes results with the
// reference model: LOAD / STORE round trips, ADD / SUB / MUL with in-place
// rounding (every result is read back with STORE and compared), quire
// multiply-add / multiply-subtract / add / clear and QROUND. The posit-to-
// posit operators are checked on random operands every cycle.
// Each mechanism must happen at least once, otherwise a failure is counted:
// QROUND stall, quire segment carries, saturation to maxpos and to minpos,
// quire overflow saturation, NaR propagation, sticky quire NaR, inexact
// rounding, subtraction. The QROUND stall length must be WQ/SEG + 1 cycles.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_posit_pau;
  import posit_pkg::*;
  localparam int N = 32, WES = 2, NREG = 16;
  typedef posit_ref #(N, WES) R;
  localparam int EMAX = R::EMAX, WQ = N * N / 2, NSEG = WQ / 32;
  localparam logic [N-1:0] NAR = {1'b1, {(N-1){1'b0}}};
  localparam logic [N-1:0] MAXP = {1'b0, {(N-1){1'b1}}};
  localparam logic [N-1:0] MINP = {{(N-1){1'b0}}, 1'b1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid = 0, in_ready, out_valid, p2p_sub = 0;
  logic [3:0]   in_op = 0;
  logic [3:0]   in_rd = 0, in_rs1 = 0, in_rs2 = 0;
  logic [N-1:0] in_data = 0, out_data, p2p_a = 0, p2p_b = 0, p2p_sum, p2p_prod;

  posit_pau dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_carry = 0, n_satmax = 0, n_satmin = 0, n_qovf = 0, n_nar = 0,
      n_qnar = 0, n_inexact = 0, n_sub = 0;

  logic [N-1:0] model [NREG];
  R::big_t      expq;
  bit           qnar;

  always @(posedge clk) if (rst_n && !dut.u_quire.q_clean) n_carry++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s", what);
  endtask

  // one instruction; returns the number of cycles in_ready was low
  task automatic issue(input pau_op_e op, input int rd, input int rs1, input int rs2,
                       input logic [N-1:0] data, output int stall);
    @(negedge clk);
    in_valid = 1; in_op = op; in_rd = 4'(rd); in_rs1 = 4'(rs1); in_rs2 = 4'(rs2); in_data = data;
    stall = 0;
    #1;
    while (!in_ready) begin stall++; @(negedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  function automatic logic [N-1:0] ref_op(input pau_op_e op, input logic [N-1:0] a, input logic [N-1:0] b);
    bit na, nb; R::big_t ma, mb; int xa, xb, xs;
    R::decode(a, na, ma, xa); R::decode(b, nb, mb, xb);
    if (na || nb) return NAR;
    if (op == OP_MUL) return R::encode(ma * mb, xa + xb);
    if (op == OP_SUB) mb = -mb;
    xs = (xa < xb) ? xa : xb;
    return R::encode((ma <<< (xa - xs)) + (mb <<< (xb - xs)), xs);
  endfunction

  function automatic bit exact_op(input pau_op_e op, input logic [N-1:0] a, input logic [N-1:0] b);
    bit na, nb, nr; R::big_t ma, mb, mr; int xa, xb, xr, xs;
    R::decode(a, na, ma, xa); R::decode(b, nb, mb, xb);
    if (na || nb) return 1;
    R::decode(ref_op(op, a, b), nr, mr, xr);
    if (op == OP_MUL) return R::val_eq(ma * mb, xa + xb, mr, xr);
    if (op == OP_SUB) mb = -mb;
    xs = (xa < xb) ? xa : xb;
    return R::val_eq((ma <<< (xa - xs)) + (mb <<< (xb - xs)), xs, mr, xr);
  endfunction

  task automatic check_reg(input int r);
    int st;
    issue(OP_STORE, 0, r, 0, '0, st);
    @(negedge clk);
    checks++;
    if (!out_valid || out_data !== model[r])
      fail($sformatf("reg %0d: got %h exp %h", r, out_data, model[r]));
  endtask

  function automatic logic [N-1:0] pick_posit();
    case ($urandom_range(0, 19))
      0: return NAR;
      1: return MAXP;
      2: return MINP;
      3: return -MAXP;
      4: return '0;
      default: return R::rand_posit();
    endcase
  endfunction

  // posit-to-posit operators, checked on random operands every cycle
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (p2p_sum !== ref_op(p2p_sub ? OP_SUB : OP_ADD, p2p_a, p2p_b) ||
        p2p_prod !== ref_op(OP_MUL, p2p_a, p2p_b))
      fail($sformatf("p2p a=%h b=%h", p2p_a, p2p_b));
    p2p_a = R::rand_posit(); p2p_b = R::rand_posit(); p2p_sub = 1'($urandom);
  end

  initial begin
    int st, rd, ra, rb, kind;
    pau_op_e op;
    bit na, nb; R::big_t ma, mb, mp; int xa, xb;
    logic [N-1:0] qexp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NREG; r++) begin
      model[r] = pick_posit();
      issue(OP_LOAD, r, 0, 0, model[r], st);
      check_reg(r);
    end
    issue(OP_QCLR, 0, 0, 0, '0, st); expq = '0; qnar = 0;

    for (int it = 0; it < 4000; it++) begin
      kind = $urandom_range(0, 99);
      rd = $urandom_range(0, NREG - 1); ra = $urandom_range(0, NREG - 1); rb = $urandom_range(0, NREG - 1);
      if (kind < 40) begin
        op = (kind < 15) ? OP_ADD : (kind < 25) ? OP_SUB : OP_MUL;
        if (op == OP_SUB) n_sub++;
        qexp = ref_op(op, model[ra], model[rb]);
        if (!exact_op(op, model[ra], model[rb])) n_inexact++;
        if (qexp == NAR) n_nar++;
        if (model[ra] != NAR && model[rb] != NAR && (qexp == MAXP || qexp == -MAXP)) n_satmax++;
        if (model[ra] != NAR && model[rb] != NAR && (qexp == MINP || qexp == -MINP)) n_satmin++;
        issue(op, rd, ra, rb, '0, st);
        model[rd] = qexp;
        check_reg(rd);
      end else if (kind < 55) begin
        model[rd] = pick_posit();
        issue(OP_LOAD, rd, 0, 0, model[rd], st);
        check_reg(rd);
      end else if (kind < 80) begin
        op = (kind < 68) ? OP_QMADD : (kind < 74) ? OP_QMSUB : OP_QADD;
        R::decode(model[ra], na, ma, xa);
        if (op == OP_QADD) begin nb = 0; mb = 1; xb = 0; end
        else R::decode(model[rb], nb, mb, xb);
        if (na || nb) qnar = 1;
        else begin
          mp = ma * mb;
          mp = (xa + xb + 2 * EMAX >= 0) ? (mp <<< (xa + xb + 2 * EMAX)) : (mp >>> (-(xa + xb + 2 * EMAX)));
          expq = (op == OP_QMSUB) ? expq - mp : expq + mp;
        end
        issue(op, 0, ra, rb, '0, st);
      end else if (kind < 83) begin
        issue(OP_QCLR, 0, 0, 0, '0, st); expq = '0; qnar = 0;
      end else begin
        R::big_t qv;
        qv = R::big_t'(signed'(expq[WQ-1:0]));
        qexp = qnar ? NAR : R::encode(qv, -2 * EMAX);
        if (qnar) n_qnar++;
        else if (R::msb(qv < 0 ? -qv : qv) > 3 * EMAX) n_qovf++;
        issue(OP_QROUND, rd, 0, 0, '0, st);
        checks++;
        if (st != NSEG + 1) fail($sformatf("QROUND stalled %0d cycles, expected %0d", st, NSEG + 1));
        if (st > 0) n_stall++;
        model[rd] = qexp;
        check_reg(rd);
        // sometimes push the quire far out of range
        if ($urandom_range(0, 3) == 0) begin
          issue(OP_LOAD, 15, 0, 0, MAXP, st); model[15] = MAXP;
          issue(OP_QMADD, 0, 15, 15, '0, st);
          expq = expq + (R::big_t'(1) << (4 * EMAX));
        end
      end
    end
    $display("mechanisms: stall=%0d carry=%0d sat_max=%0d sat_min=%0d quire_ovf=%0d nar=%0d quire_nar=%0d inexact=%0d sub=%0d",
             n_stall, n_carry, n_satmax, n_satmin, n_qovf, n_nar, n_qnar, n_inexact, n_sub);
    checks++;
    if (n_stall == 0 || n_carry == 0 || n_satmax == 0 || n_satmin == 0 || n_qovf == 0 ||
        n_nar == 0 || n_qnar == 0 || n_inexact == 0 || n_sub == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
