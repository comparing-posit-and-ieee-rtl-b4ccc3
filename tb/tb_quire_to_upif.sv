// tb_quire_to_upif: checks the quire to UPIF conversion for posit<8,0>,
// posit<16,1>, posit<32,2> and posit<64,3>. Quire values are drawn from several families:
// random bit patterns (mostly overflow), sums of a few exact products (in
// range), values only in the underflow zone (both signs), zero, values near
// +-maxpos and near +-minpos, and NaR. The UPIF must round, in the reference
// encoder, to the same posit as the exact quire value; counts of the
// overflow, underflow, normal and NaR cases are checked to be non-zero.
// The reference values come from a model written from the posit definition,
// independent of the hardware's algorithms; formats and vector counts are
// this testbench's choices.
`include "posit_ref.svh"
module tb_quire_to_upif;
  typedef posit_ref #(16, 1) r16;
  typedef posit_ref #(8, 0)  r8;
  typedef posit_ref #(32, 2) r32;
  typedef posit_ref #(64, 3) r64;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_norm = 0, n_nar = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic nar;
  logic [r8::N*r8::N/2-1:0]   q8;  logic [r8::WUPIF-1:0]  u8;
  logic [r16::N*r16::N/2-1:0] q16; logic [r16::WUPIF-1:0] u16;
  logic [r32::N*r32::N/2-1:0] q32; logic [r32::WUPIF-1:0] u32;
  logic [r64::N*r64::N/2-1:0] q64; logic [r64::WUPIF-1:0] u64;

  quire_to_upif #(.N(8),  .WES(0)) dut8  (.q(q8),  .q_nar(nar), .upif(u8));
  quire_to_upif #(.N(16), .WES(1)) dut16 (.q(q16), .q_nar(nar), .upif(u16));
  quire_to_upif #(.N(32), .WES(2)) dut32 (.q(q32), .q_nar(nar), .upif(u32));
  quire_to_upif #(.N(64), .WES(3)) dut64 (.q(q64), .q_nar(nar), .upif(u64));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define GEN_Q(R, Q) \
    begin R::big_t v_, m_; int x_; localparam int WQ_ = R::N * R::N / 2; \
      v_ = '0; \
      case ($urandom_range(0, 6)) \
        0: for (int j = 0; j < WQ_; j += 32) v_[j +: 32] = $urandom; \
        1, 2: for (int j = 0; j < $urandom_range(1, 3); j++) begin \
             R::big_t ma_, mb_; int xa_, xb_; bit na_, nb_; \
             R::decode(R::rand_posit(), na_, ma_, xa_); R::decode(R::rand_posit(), nb_, mb_, xb_); \
             if (!na_ && !nb_) begin m_ = ma_ * mb_; x_ = xa_ + xb_ + 2 * R::EMAX; \
               v_ = v_ + ((x_ >= 0) ? (m_ <<< x_) : (m_ >>> (-x_))); end \
           end \
        3: begin v_ = R::big_t'($urandom) & ((R::big_t'(1) << R::EMAX) - 1); if ($urandom_range(0,1)) v_ = -v_; end \
        4: v_ = '0; \
        5: begin v_ = (R::big_t'(1) << (3 * R::EMAX)) + R::big_t'($urandom_range(0, 3)) - 2; if ($urandom_range(0,1)) v_ = -v_; end \
        default: begin v_ = (R::big_t'(1) << R::EMAX) + R::big_t'($urandom_range(0, 3)) - 2; if ($urandom_range(0,1)) v_ = -v_; end \
      endcase \
      Q = v_[WQ_-1:0]; \
    end

  `define CHECK_Q(R, Q, U) \
    begin R::big_t qv_, mu_; int xu_; bit nu_; logic [R::N-1:0] ex_, got_; \
      qv_ = R::big_t'(signed'(Q)); \
      ex_ = nar ? {1'b1, {(R::N-1){1'b0}}} : R::encode(qv_, -2 * R::EMAX); \
      R::upif_val(U, nu_, mu_, xu_); \
      got_ = nu_ ? {1'b1, {(R::N-1){1'b0}}} : R::encode(mu_, xu_); \
      checks++; \
      if (got_ !== ex_) begin failures++; \
        if (failures < 10) $display("FAIL %m q=%h upif=%h got=%h exp=%h", Q, U, got_, ex_); end \
      if (nar) n_nar++; \
      else if (ex_ == {1'b0, {(R::N-1){1'b1}}} || ex_ == {1'b1, {(R::N-2){1'b0}}, 1'b1}) n_ovf++; \
      else if (ex_ == {{(R::N-1){1'b0}}, 1'b1} || ex_ == {R::N{1'b1}}) n_unf++; \
      else n_norm++; \
    end

  initial begin
    for (int v = 0; v < 20000; v++) begin
      nar = ($urandom_range(0, 50) == 0);
      `GEN_Q(r8, q8)
      `GEN_Q(r16, q16)
      `GEN_Q(r32, q32)
      `GEN_Q(r64, q64)
      #1;
      `CHECK_Q(r8, q8, u8)
      `CHECK_Q(r16, q16, u16)
      `CHECK_Q(r32, q32, u32)
      `CHECK_Q(r64, q64, u64)
      if (v % 64 == 0) @(posedge clk);
    end
    $display("cases: overflow=%0d underflow=%0d normal=%0d nar=%0d", n_ovf, n_unf, n_norm, n_nar);
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_norm == 0 || n_nar == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
