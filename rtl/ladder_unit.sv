// ladder_unit: the key-driven iteration of the Lopez-Dahab (Montgomery ladder)
// scalar multiplication in projective coordinates, around one point_add_dbl.
// Registers hold the ladder pair P1 = (X1:Z1), P2 = (X2:Z2). For each key bit k_i,
// from the most significant bit down:
//   k_i = 1: P1 <= P1 + P2, P2 <= 2*P2      k_i = 0: P2 <= P1 + P2, P1 <= 2*P1
// The addition always takes the four registers as they are (it is symmetric and
// key-independent); only the doubling input is chosen by k_i, and four 2-to-1
// multiplexers steered by k_i route the addition and doubling results back into
// (X1,Z1) or (X2,Z2). A key shift register presents k_i and shifts once per step.
// The pair starts at (O, P) = (1:0, x_P:1), loaded through the same multiplexers from
// point_add_dbl's init outputs; the first step with a 1 bit then gives (P, 2P), so the
// document's separate initialisation step is not needed and leading zero bits of k
// leave (O, P) unchanged. All KBITS bits are scanned, so the time does not depend on k.
// Timing: start for one cycle samples k; x_P and b must stay stable until done.
// Each key bit costs 2*NDIG+4 cycles; done rises KBITS*(2*NDIG+4) + 1 clock edges
// after the edge that samples start (1957 at the defaults); X1..Z2 hold until the
// next start. x3 of kP is X1/Z1; X2/Z2 is x of (k+1)P.
module ladder_unit
  import gf163_pkg::*;
#(
  parameter int unsigned G     = 41,
  parameter int unsigned KBITS = 163
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [KBITS-1:0] k,
  input  gf_t              xp,
  input  gf_t              b,
  output gf_t              x1,
  output gf_t              z1,
  output gf_t              x2,
  output gf_t              z2,
  output logic             done,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_STEP, S_WAIT} state_t;
  localparam int unsigned CW = $clog2(KBITS + 1);

  state_t           state_q;
  logic [KBITS-1:0] key_q;
  logic [CW-1:0]    bits_q;
  logic             k_m, init, pad_start, pad_done, load, swap;
  gf_t              add_x, add_z, dob_x, dob_z, dob_in_x, dob_in_z;

  assign k_m       = key_q[KBITS-1];
  assign init      = (state_q == S_INIT);
  assign pad_start = (state_q == S_STEP);
  assign dob_in_x  = k_m ? x2 : x1;
  assign dob_in_z  = k_m ? z2 : z1;

  point_add_dbl #(.G(G)) u_pad (
    .clk, .reset, .start(pad_start), .init, .xp, .b,
    .add_in_x1(x1), .add_in_z1(z1), .add_in_x2(x2), .add_in_z2(z2),
    .dob_in_x, .dob_in_z,
    .add_out_x(add_x), .add_out_z(add_z), .dob_out_x(dob_x), .dob_out_z(dob_z),
    .done(pad_done)
  );

  assign load = init || (state_q == S_WAIT && pad_done);
  assign swap = init ? 1'b0 : k_m;

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      key_q   <= '0;
      bits_q  <= '0;
      x1      <= '0;
      z1      <= '0;
      x2      <= '0;
      z2      <= '0;
      done    <= 1'b0;
      busy    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        x1 <= swap ? add_x : dob_x;
        z1 <= swap ? add_z : dob_z;
        x2 <= swap ? dob_x : add_x;
        z2 <= swap ? dob_z : add_z;
      end
      unique case (state_q)
        S_IDLE: if (start) begin
          key_q   <= k;
          bits_q  <= '0;
          busy    <= 1'b1;
          state_q <= S_INIT;
        end
        S_INIT: state_q <= S_STEP;
        S_STEP: state_q <= S_WAIT;
        S_WAIT: if (pad_done) begin
          key_q  <= key_q << 1;
          bits_q <= bits_q + 1'b1;
          if (bits_q == CW'(KBITS - 1)) begin
            done    <= 1'b1;
            busy    <= 1'b0;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_STEP;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
