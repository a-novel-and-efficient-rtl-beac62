// lsd_multiplier: digit-serial, least-significant-digit-first GF(2^163) multiplier,
// c = a * b mod P(x), with digit size G.
// Structure (follows the document's block diagram of the LSD multiplier):
//  - an m-bit register holds A^(i); each cycle it is replaced by A^(i-1)*x^G mod P,
//    i.e. A shifted up by G bits and reduced by a gf_reduce with EXT = G;
//  - a G-bit-per-step shift register holds B and presents its low digit B_(i-1);
//  - the "multiplier function" (gf_digit_mult, XOR trees) forms A^(i-1)*B_(i-1),
//    which is XORed into an (m+G-1)-bit accumulator D^(i);
//  - a second gf_reduce with EXT = G-1 turns the accumulator into c, combinationally.
// Timing: a one-cycle start pulse loads a and b and clears D ("inic" in the diagram).
// Then NDIG = ceil(163/G) cycles accumulate; done is a one-cycle pulse in the cycle
// after the last accumulation, and c stays valid until the next start. A start is
// accepted at any time and restarts the unit; a and b are sampled only at start.
// Reset is synchronous and active high (this design's choice).
module lsd_multiplier
  import gf163_pkg::*;
#(
  parameter int unsigned G = 41
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  gf_t  a,
  input  gf_t  b,
  output gf_t  c,
  output logic done,
  output logic busy
);
  localparam int unsigned NDIG = (M + G - 1) / G;
  localparam int unsigned CW   = $clog2(NDIG + 1);
  localparam int unsigned BW   = NDIG * G;          // B padded to whole digits

  gf_t               a_q;
  logic [BW-1:0]     b_q;
  logic [M+G-2:0]    d_q;
  logic [CW-1:0]     cnt_q;

  logic [M+G-2:0]    partial;
  gf_t               a_next;

  gf_digit_mult #(.G(G)) u_digit (.a(a_q), .b(b_q[G-1:0]), .d(partial));
  gf_reduce #(.EXT(G))   u_red_a (.d({a_q, {G{1'b0}}}), .c(a_next));
  gf_reduce #(.EXT(G-1)) u_red_c (.d(d_q), .c(c));

  always_ff @(posedge clk) begin
    if (reset) begin
      a_q   <= '0;
      b_q   <= '0;
      d_q   <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q   <= a;
        b_q   <= BW'(b);
        d_q   <= '0;
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        a_q   <= a_next;
        b_q   <= b_q >> G;
        d_q   <= d_q ^ partial;
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CW'(NDIG - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
