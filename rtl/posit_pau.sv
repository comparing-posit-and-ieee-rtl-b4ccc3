// posit_pau: posit arithmetic unit that uses posits only as a memory
// encoding, plus a pair of classical posit-to-posit operators.
//
// Register side (main datapath): NREG registers hold decoded PIF values.
//   LOAD   rd <- posit_to_pif(in_data)               (exact decode)
//   STORE  out_data <- pif_to_posit(rs1)             (exact encode)
//   ADD/SUB/MUL  rd <- inplace_round(rs1 op rs2)     (PIF operator, then
//          rounding to the value of the nearest posit without encoding it,
//          so every register always holds exactly a posit value)
//   QCLR   clear the quire
//   QMADD / QMSUB  quire +/-= rs1 * rs2              (exact product from the
//          PIF multiplier, exact accumulation)
//   QADD   quire += rs1                              (PIF cast to the
//          exact-product format: significand shifted by WF, same exponent)
//   QROUND rd <- inplace_round(quire_to_upif(quire)) after the quire's carry
//          propagation: the unit drops in_ready for WQ/SEG + 1 cycles.
// Results that need rounding share one in-place rounding block.
// Side by side, p2p_sum / p2p_prod are the posit-to-posit adder/subtracter
// and multiplier on the p2p_a / p2p_b ports (combinational).
//
// Handshake: an instruction is taken on a rising edge where in_valid and
// in_ready are both high; it must stay stable while in_valid is high and
// in_ready is low. Every instruction except QROUND is accepted in the cycle
// it is presented (in_ready high) and writes its register at that edge;
// STORE data appears on out_data with out_valid one cycle later.
// QROUND: in the first cycle in_ready is low and the quire starts resolving
// its segment carries; in_ready rises when they are resolved and the
// instruction completes then.
// The register count, instruction set and this handshake are this design's
// own choices; the split into decode / PIF operator / in-place rounding /
// encode, the quire and its conversion follow the described architecture.
// Reset (rst_n low, asynchronous) zeroes the registers and the quire.
module posit_pau
  import posit_pkg::*;
#(
  parameter int N    = 32,
  parameter int WES  = 2,
  parameter int SEG  = 32,
  parameter int NREG = 16,
  localparam int RW    = $clog2(NREG),
  localparam int WF    = wf_of(N, WES),
  localparam int WE    = we_of(N, WES),
  localparam int WQ    = wq_of(N),
  localparam int WPIF  = wpif_of(N, WES),
  localparam int WUPIF = wupif_of(N, WES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // PIF-register unit
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [3:0]    in_op,
  input  logic [RW-1:0] in_rd,
  input  logic [RW-1:0] in_rs1,
  input  logic [RW-1:0] in_rs2,
  input  logic [N-1:0]  in_data,
  output logic          out_valid,
  output logic [N-1:0]  out_data,
  // posit-to-posit operators
  input  logic [N-1:0]  p2p_a,
  input  logic [N-1:0]  p2p_b,
  input  logic          p2p_sub,
  output logic [N-1:0]  p2p_sum,
  output logic [N-1:0]  p2p_prod
);
  pau_op_e op;
  assign op = pau_op_e'(in_op);

  // ------------------------------------------------------------- registers
  logic [WPIF-1:0] regs [NREG];
  logic [WPIF-1:0] ra, rb;
  assign ra = regs[in_rs1];
  assign rb = regs[in_rs2];

  // -------------------------------------------------------- memory path
  logic [WPIF-1:0] ld_pif;
  logic [N-1:0]    st_posit;
  posit_to_pif #(.N(N), .WES(WES)) u_load  (.posit(in_data), .pif(ld_pif));
  pif_to_posit #(.N(N), .WES(WES)) u_store (.pif(ra), .posit(st_posit));

  // ------------------------------------------------------- PIF operators
  logic [WUPIF-1:0]       add_u, mul_u, q_u, rnd_in;
  logic [WPIF-1:0]        rnd_out;
  logic                   p_nar;
  logic signed [WE:0]     p_exp;
  logic signed [2*WF+3:0] p_sig;

  pif_adder      #(.N(N), .WES(WES)) u_add (.a(ra), .b(rb), .sub(op == OP_SUB), .upif(add_u));
  pif_multiplier #(.N(N), .WES(WES)) u_mul (.a(ra), .b(rb), .upif(mul_u),
                                            .prod_nar(p_nar), .prod_exp(p_exp), .prod_sig(p_sig));

  // --------------------------------------------------------------- quire
  logic                   q_clear, q_acc, q_sub, q_nar_in, q_resolve, q_busy, q_clean, q_nar;
  logic signed [WE:0]     q_exp;
  logic signed [2*WF+3:0] q_sig;
  logic [WQ-1:0]          q_val;

  quire #(.N(N), .WES(WES), .SEG(SEG)) u_quire (
    .clk, .rst_n, .clear(q_clear), .acc_valid(q_acc), .acc_sub(q_sub),
    .prod_nar(q_nar_in), .prod_exp(q_exp), .prod_sig(q_sig), .resolve(q_resolve),
    .busy(q_busy), .q_clean(q_clean), .q(q_val), .q_nar(q_nar)
  );
  quire_to_upif #(.N(N), .WES(WES)) u_q2u (.q(q_val), .q_nar(q_nar), .upif(q_u));

  upif_inplace_round #(.N(N), .WES(WES)) u_round (.upif(rnd_in), .pif(rnd_out));

  // ------------------------------------------------------------- control
  typedef enum logic {S_IDLE, S_RESOLVE} state_e;
  state_e state;
  logic   fire;

  always_comb begin
    in_ready = 1'b1;
    if (op == OP_QROUND)
      in_ready = (state == S_RESOLVE) && !q_busy;
  end
  assign fire = in_valid && in_ready;

  always_comb begin
    q_clear   = fire && (op == OP_QCLR);
    q_acc     = fire && (op == OP_QMADD || op == OP_QMSUB || op == OP_QADD);
    q_sub     = (op == OP_QMSUB);
    q_resolve = in_valid && (op == OP_QROUND) && (state == S_IDLE);
    if (op == OP_QADD) begin
      // a PIF is the exact product of itself and 1
      q_nar_in = ra[WPIF-1];
      q_exp    = (WE+1)'(signed'(ra[WF+1 +: WE]));
      q_sig    = (2*WF+4)'(signed'({ra[WPIF-2], ra[WF:0]})) <<< WF;
    end else begin
      q_nar_in = p_nar;
      q_exp    = p_exp;
      q_sig    = p_sig;
    end
    case (op)
      OP_MUL:    rnd_in = mul_u;
      OP_QROUND: rnd_in = q_u;
      default:   rnd_in = add_u;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NREG; k++) regs[k] <= '0;
      state     <= S_IDLE;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= fire && (op == OP_STORE);
      if (fire && op == OP_STORE) out_data <= st_posit;
      if (fire) begin
        case (op)
          OP_LOAD:                            regs[in_rd] <= ld_pif;
          OP_ADD, OP_SUB, OP_MUL, OP_QROUND:  regs[in_rd] <= rnd_out;
          default: ;
        endcase
      end
      if (q_resolve)                      state <= S_RESOLVE;
      else if (fire && op == OP_QROUND)   state <= S_IDLE;
    end
  end

  // instruction must be held while stalled
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid && $stable(in_op) && $stable(in_rd));
  // the quire is carry-free whenever QROUND reads it
  a_clean: assert property (@(posedge clk) disable iff (!rst_n)
                            fire && op == OP_QROUND |-> q_clean);

  // ------------------------------------------------ posit-to-posit operators
  posit_adder      #(.N(N), .WES(WES)) u_p2p_add (.a(p2p_a), .b(p2p_b), .sub(p2p_sub), .r(p2p_sum));
  posit_multiplier #(.N(N), .WES(WES)) u_p2p_mul (.a(p2p_a), .b(p2p_b), .r(p2p_prod));
endmodule
