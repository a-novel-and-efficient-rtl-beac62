// itmia_inverter: GF(2^163) multiplicative inverse by the Itoh-Tsujii algorithm,
// out = in^(2^163 - 2) = in^-1 (and 0 for in = 0).
// With beta_u(a) = a^(2^u - 1), the addition chain 1,2,4,5,10,20,40,80,81,162 builds
// beta_162 by beta_(u+v) = beta_u^(2^v) * beta_v, and one last squaring gives a^-1.
// Following the document, the unit has one digit-serial multiplier and two squarers
// so that no squarer sits behind a 3-to-1 multiplexer:
//  - squarer 1 does the single squarings (chain steps 1, 3 and 8, where v = 1, and
//    the final squaring); its output feeds the multiplier directly;
//  - squarer 2 does the runs of repeated squarings (steps 2, 4..7 and 9), one
//    squaring per clock, iterating on its own register, counted by an 8-bit counter.
// Step i multiplies by beta_(u_(i-1)) (the value just built) on doubling steps and
// by the captured input a on the "+1" steps 3 and 8.
// Timing: start (one cycle) samples in. A multiplication step costs 2 + NDIG cycles
// (start, NDIG digit cycles, result capture); a run of v squarings costs v cycles.
// In all, done rises 9*(NDIG+2) + 159 clock edges after the edge that samples start
// (312 for G = 11), with out valid; out holds until the next start. Sequencing (FSM, table of steps) is this
// design's own; reset is synchronous, active high.
module itmia_inverter
  import gf163_pkg::*;
#(
  parameter int unsigned G = 11
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t  inversion_in,
  output gf_t  inversion_out,
  output logic done,
  output logic busy
);
  typedef enum logic [2:0] {S_IDLE, S_SQ, S_MSTART, S_MWAIT, S_FINAL} state_t;

  localparam int unsigned NSTEPS = 9;

  // Squarings of step i (v in beta_(u+v) = beta_u^(2^v) * beta_v) and whether the
  // second factor is the input a (steps with v = u0 = 1 that add one to the chain).
  function automatic logic [7:0] step_sq(input logic [3:0] i);
    case (i)
      4'd1: return 8'd1;
      4'd2: return 8'd2;
      4'd3: return 8'd1;
      4'd4: return 8'd5;
      4'd5: return 8'd10;
      4'd6: return 8'd20;
      4'd7: return 8'd40;
      4'd8: return 8'd1;
      default: return 8'd81;
    endcase
  endfunction

  function automatic logic step_uses_a(input logic [3:0] i);
    return (i == 4'd3) || (i == 4'd8);
  endfunction

  state_t     state_q;
  logic [3:0] step_q;
  logic [7:0] counter_q;     // squarings still to do in the current run
  gf_t        a_q;           // captured input, beta_u0
  gf_t        beta_q;        // beta of the last completed chain step
  gf_t        sq2_q;         // register of the repeated-squaring path

  gf_t sq1_out, sq2_in, sq2_out;
  gf_t mul_a, mul_b, mul_c;
  logic mul_start, mul_done;
  logic single_sq;

  assign single_sq = (step_sq(step_q) == 8'd1);

  // Squarer 1: single squarings of the current beta.
  gf_squarer u_sq1 (.a(beta_q), .c(sq1_out));
  // Squarer 2: first squaring of a run starts from beta, later ones from itself.
  assign sq2_in = (state_q == S_SQ && counter_q != step_sq(step_q)) ? sq2_q : beta_q;
  gf_squarer u_sq2 (.a(sq2_in), .c(sq2_out));

  assign mul_a     = single_sq ? sq1_out : sq2_q;
  assign mul_b     = step_uses_a(step_q) ? a_q : beta_q;
  assign mul_start = (state_q == S_MSTART);

  lsd_multiplier #(.G(G)) u_mul (
    .clk, .reset, .start(mul_start), .a(mul_a), .b(mul_b),
    .c(mul_c), .done(mul_done), .busy()
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q       <= S_IDLE;
      step_q        <= '0;
      counter_q     <= '0;
      a_q           <= '0;
      beta_q        <= '0;
      sq2_q         <= '0;
      inversion_out <= '0;
      done          <= 1'b0;
      busy          <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          a_q     <= inversion_in;
          beta_q  <= inversion_in;
          step_q  <= 4'd1;
          state_q <= S_MSTART;       // step 1 is a single squaring
          busy    <= 1'b1;
        end
        S_SQ: begin
          sq2_q     <= sq2_out;
          counter_q <= counter_q - 1'b1;
          if (counter_q == 8'd1) state_q <= S_MSTART;
        end
        S_MSTART: state_q <= S_MWAIT;
        S_MWAIT: if (mul_done) begin
          beta_q <= mul_c;
          if (step_q == 4'(NSTEPS)) begin
            state_q <= S_FINAL;
          end else begin
            step_q <= step_q + 1'b1;
            if (step_sq(step_q + 1'b1) == 8'd1) begin
              state_q <= S_MSTART;
            end else begin
              counter_q <= step_sq(step_q + 1'b1);
              state_q   <= S_SQ;
            end
          end
        end
        S_FINAL: begin
          inversion_out <= sq1_out;   // final squaring: beta_162^2 = a^-1
          done          <= 1'b1;
          busy          <= 1'b0;
          state_q       <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
