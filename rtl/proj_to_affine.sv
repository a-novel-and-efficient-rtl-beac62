// proj_to_affine: converts the ladder's result to the affine point (x3, y3) = kP.
// It evaluates the Lopez-Dahab y-recovery with (Z1*Z2)^-1 moved inside the bracket:
//   x3 = X1/Z1
//   y3 = (x_P + X1/Z1) * [ (X1/Z1 + x_P)(X2/Z2 + x_P) + x_P^2 + y_P ] * x_P^-1 + y_P
// Three Itoh-Tsujii inverters find Z1^-1, Z2^-1 and x_P^-1 at the same time. Then two
// digit-serial multipliers do three stages, without registers between them (a product
// is handed on through the next multiplication's sampled inputs):
//   stage A: ma = X1*Z1^-1,                       mb = X2*Z2^-1
//   stage B: ma = (ma + x_P)*(mb + x_P),          mb = (ma + x_P)*x_P^-1
//   stage C: ma = (ma + x_P^2 + y_P)*mb,          mb = X1*Z1^-1  (x3 again)
// so y3 = ma + y_P and x3 = mb. Five XOR adders and one squarer (x_P^2) complete it.
// Recomputing X1*Z1^-1 in stage C, instead of storing it, follows the document; the
// order of the stage B/C products is this design's reading of its "five
// multiplications in three stages". Z1 = 0 (kP = O) or Z2 = 0 give meaningless output.
// Timing: start for one cycle; inputs stay stable until done. done rises
// INV_LAT + 3*(NDIG+1) + 1 clock edges after the edge that samples start, with
// NDIG = ceil(163/G) and INV_LAT = 9*(NDIG+2)+159 the inverters' latency (361 for
// G = 11); x3 and y3 hold until the next start.
module proj_to_affine
  import gf163_pkg::*;
#(
  parameter int unsigned G = 11
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t  x1,
  input  gf_t  z1,
  input  gf_t  x2,
  input  gf_t  z2,
  input  gf_t  xp,
  input  gf_t  yp,
  output gf_t  x3,
  output gf_t  y3,
  output logic done
);
  typedef enum logic [2:0] {S_IDLE, S_INV, S_A, S_B, S_C} state_t;
  state_t state_q;

  gf_t z1_inv, z2_inv, xp_inv, xp_sq;
  logic inv1_done, inv2_done, inv3_done;
  gf_t ma_a, ma_b, mb_a, mb_b, ma_c, mb_c;
  logic ma_start, ma_done, mb_done;
  logic stage_b, stage_c;
  gf_t s1, s2, s3, s4;

  itmia_inverter #(.G(G)) u_inv_z1 (.clk, .reset, .start(start && state_q == S_IDLE),
    .inversion_in(z1), .inversion_out(z1_inv), .done(inv1_done), .busy());
  itmia_inverter #(.G(G)) u_inv_z2 (.clk, .reset, .start(start && state_q == S_IDLE),
    .inversion_in(z2), .inversion_out(z2_inv), .done(inv2_done), .busy());
  itmia_inverter #(.G(G)) u_inv_xp (.clk, .reset, .start(start && state_q == S_IDLE),
    .inversion_in(xp), .inversion_out(xp_inv), .done(inv3_done), .busy());

  gf_squarer u_sq_xp (.a(xp), .c(xp_sq));

  // The five adders.
  assign s1 = ma_c ^ xp;            // X1/Z1 + x_P
  assign s2 = mb_c ^ xp;            // X2/Z2 + x_P
  assign s3 = xp_sq ^ yp;           // x_P^2 + y_P
  assign s4 = ma_c ^ s3;            // bracket
  assign y3 = ma_c ^ yp;

  // A stage's multiplications start in the cycle its predecessor reports done.
  assign stage_b  = (state_q == S_A) && ma_done;
  assign stage_c  = (state_q == S_B) && ma_done;
  assign ma_start = (state_q == S_INV && inv1_done) || stage_b || stage_c;

  always_comb begin
    if (stage_b) begin
      ma_a = s1;   ma_b = s2;
      mb_a = s1;   mb_b = xp_inv;
    end else if (stage_c) begin
      ma_a = s4;   ma_b = mb_c;
      mb_a = x1;   mb_b = z1_inv;
    end else begin
      ma_a = x1;   ma_b = z1_inv;
      mb_a = x2;   mb_b = z2_inv;
    end
  end

  lsd_multiplier #(.G(G)) u_mult_a (.clk, .reset, .start(ma_start), .a(ma_a), .b(ma_b),
                                    .c(ma_c), .done(ma_done), .busy());
  lsd_multiplier #(.G(G)) u_mult_b (.clk, .reset, .start(ma_start), .a(mb_a), .b(mb_b),
                                    .c(mb_c), .done(mb_done), .busy());

  assign x3 = mb_c;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) state_q <= S_INV;
        S_INV:  if (inv1_done) state_q <= S_A;
        S_A:    if (ma_done) state_q <= S_B;
        S_B:    if (ma_done) state_q <= S_C;
        S_C:    if (ma_done) begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The parallel units are started together and must finish together.
  assert property (@(posedge clk) disable iff (reset)
                   (inv1_done == inv2_done) && (inv1_done == inv3_done));
  assert property (@(posedge clk) disable iff (reset) ma_done == mb_done);
endmodule
