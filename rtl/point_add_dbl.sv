// point_add_dbl: one Montgomery-ladder step in Lopez-Dahab projective coordinates,
// an x-only point addition and a point doubling computed side by side with three
// digit-serial multipliers, five squarers and two XOR adders.
//   Addition  (inputs X1,Z1,X2,Z2, difference x_P):
//     Z_add = (X1*Z2 + X2*Z1)^2,  X_add = x_P*Z_add + (X1*Z2)*(X2*Z1)
//   Doubling  (input X,Z):
//     X_dbl = X^4 + b*Z^4,        Z_dbl = X^2 * Z^2
// The six products run in two stages of three parallel multiplications:
//   stage 1: X1*Z2, X2*Z1, b*Z^4;   then t1 <= X1*Z2 + X2*Z1, t2 <= X^4 + b*Z^4
//   stage 2: x_P*t1^2, (X1*Z2)*(X2*Z1), X^2*Z^2
// Squarers 1-4 form Z^2, Z^4, X^2, X^4 of the doubling input; squarer 5 forms t1^2.
// The stage-1 products are passed to stage 2 through the multipliers' inputs, which
// are sampled at start while the accumulators still hold them, so no extra register
// is needed besides t1 and t2. The addition does not depend on the key bit: the
// caller only chooses which point is doubled and where the results go.
// When init is high the four outputs show the ladder's starting values instead
// (add: x_P, 1; dbl: 1, 0), as the output multiplexers of the document's figure do.
// Timing: start for one cycle; done rises 2*NDIG+2 clock edges after the edge that
// samples start (10 for G = 41), NDIG = ceil(163/G);
// the outputs stay valid until the next start. The inputs must be stable from start
// to done. The FSM and the choice of b*Z^4 for stage 1 are this design's own reading.
module point_add_dbl
  import gf163_pkg::*;
#(
  parameter int unsigned G = 41
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic init,
  input  gf_t  xp,
  input  gf_t  b,
  input  gf_t  add_in_x1,
  input  gf_t  add_in_z1,
  input  gf_t  add_in_x2,
  input  gf_t  add_in_z2,
  input  gf_t  dob_in_x,
  input  gf_t  dob_in_z,
  output gf_t  add_out_x,
  output gf_t  add_out_z,
  output gf_t  dob_out_x,
  output gf_t  dob_out_z,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_STAGE1, S_SEL, S_STAGE2} state_t;
  state_t state_q;

  gf_t z2, z4, x2, x4, t1_sq;
  gf_t t1_q, t2_q;
  gf_t m1_a, m1_b, m2_a, m2_b, m3_a, m3_b;
  gf_t m1_c, m2_c, m3_c;
  logic m_start, stage2;
  logic m1_done, m2_done, m3_done;

  gf_squarer u_square1 (.a(dob_in_z), .c(z2));
  gf_squarer u_square2 (.a(z2),       .c(z4));
  gf_squarer u_square3 (.a(dob_in_x), .c(x2));
  gf_squarer u_square4 (.a(x2),       .c(x4));
  gf_squarer u_square5 (.a(t1_q),     .c(t1_sq));

  assign stage2  = (state_q == S_SEL);
  assign m_start = (state_q == S_IDLE && start) || stage2;

  // Operand selection (the AND-OR selectors in front of each multiplier).
  always_comb begin
    if (stage2) begin
      m1_a = xp;    m1_b = t1_sq;
      m2_a = m1_c;  m2_b = m2_c;
      m3_a = x2;    m3_b = z2;
    end else begin
      m1_a = add_in_x1; m1_b = add_in_z2;
      m2_a = add_in_x2; m2_b = add_in_z1;
      m3_a = b;         m3_b = z4;
    end
  end

  lsd_multiplier #(.G(G)) u_mult1 (.clk, .reset, .start(m_start), .a(m1_a), .b(m1_b),
                                   .c(m1_c), .done(m1_done), .busy());
  lsd_multiplier #(.G(G)) u_mult2 (.clk, .reset, .start(m_start), .a(m2_a), .b(m2_b),
                                   .c(m2_c), .done(m2_done), .busy());
  lsd_multiplier #(.G(G)) u_mult3 (.clk, .reset, .start(m_start), .a(m3_a), .b(m3_b),
                                   .c(m3_c), .done(m3_done), .busy());

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      t1_q    <= '0;
      t2_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:   if (start) state_q <= S_STAGE1;
        S_STAGE1: if (m1_done) begin
          t1_q    <= m1_c ^ m2_c;
          t2_q    <= x4 ^ m3_c;
          state_q <= S_SEL;
        end
        S_SEL:    state_q <= S_STAGE2;
        S_STAGE2: if (m1_done) state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  assign done = (state_q == S_STAGE2) && m1_done;

  // Output multiplexers: starting values while init is high.
  assign add_out_x = init ? xp      : (m1_c ^ m2_c);
  assign add_out_z = init ? GF_ONE  : t1_sq;
  assign dob_out_x = init ? GF_ONE  : t2_q;
  assign dob_out_z = init ? GF_ZERO : m3_c;

  // The three multipliers are started together and have the same latency.
  property p_lockstep;
    @(posedge clk) disable iff (reset) (m1_done == m2_done) && (m1_done == m3_done);
  endproperty
  assert property (p_lockstep);
endmodule
