// ecc_point_mult: elliptic-curve scalar point multiplier Q = kP over GF(2^163)
// (curves y^2 + xy = x^3 + ax^2 + b in polynomial basis, P(x) = x^163+x^7+x^6+x^3+1).
// Two parts run one after the other:
//  1. ladder_unit: the Lopez-Dahab ladder in projective coordinates, one key bit per
//     step, with three parallel digit-serial multipliers of digit size G1 (default 41)
//     so that a step costs two multiplication times;
//  2. proj_to_affine: the conversion of the ladder pair to the affine result, with
//     three parallel Itoh-Tsujii inverters and two multipliers of digit size G2
//     (default 11), small digits because this part runs only once per operation.
// The x-only ladder never uses the curve coefficient a, so only b is an input.
// Interface: start (one cycle) samples k, x_P, y_P and b into registers; busy is high
// until done pulses for one cycle with (x3, y3) valid; the result holds until the
// next start. P must be a point of the curve with x_P != 0; k*P and (k+1)*P must
// not be the point at infinity (then Z1 or Z2 is 0 and the result is meaningless).
// Timing: done rises KBITS*(2*N1+4) + INV_LAT + 3*(N2+1) + 5 clock edges after the
// edge that samples start, with N1 = ceil(163/G1), N2 = ceil(163/G2) and
// INV_LAT = 9*(N2+2)+159: 2321 cycles at the defaults, independent of k.
// The sequencing of the two parts and the input registers are this design's own. Reset is synchronous, active high.
module ecc_point_mult
  import gf163_pkg::*;
#(
  parameter int unsigned G1    = 41,
  parameter int unsigned G2    = 11,
  parameter int unsigned KBITS = 163
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [KBITS-1:0] k,
  input  gf_t              xp,
  input  gf_t              yp,
  input  gf_t              b,
  output gf_t              x3,
  output gf_t              y3,
  output logic             done,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_LADDER, S_CONV} state_t;
  state_t state_q;

  logic [KBITS-1:0] k_q;
  gf_t  xp_q, yp_q, b_q;
  gf_t  x1, z1, x2, z2;
  logic lad_start, lad_done, conv_done;

  ladder_unit #(.G(G1), .KBITS(KBITS)) u_ladder (
    .clk, .reset, .start(lad_start), .k(k_q), .xp(xp_q), .b(b_q),
    .x1, .z1, .x2, .z2, .done(lad_done), .busy()
  );

  proj_to_affine #(.G(G2)) u_conv (
    .clk, .reset, .start(lad_done), .x1, .z1, .x2, .z2, .xp(xp_q), .yp(yp_q),
    .x3, .y3, .done(conv_done)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q         <= S_IDLE;
      k_q             <= '0;
      xp_q            <= '0;
      yp_q            <= '0;
      b_q             <= '0;
      lad_start       <= 1'b0;
      busy            <= 1'b0;
      done            <= 1'b0;
    end else begin
      done      <= 1'b0;
      lad_start <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q             <= k;
          xp_q            <= xp;
          yp_q            <= yp;
          b_q             <= b;
          lad_start       <= 1'b1;
          busy            <= 1'b1;
          state_q         <= S_LADDER;
        end
        S_LADDER: if (lad_done) state_q <= S_CONV;
        S_CONV: if (conv_done) begin
          done    <= 1'b1;
          busy    <= 1'b0;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
