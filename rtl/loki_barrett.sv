// loki_barrett: Barrett reduction modulo q = 3329 of a signed 16-bit value
// (the "barrett" block of the butterfly unit).
//
//   t = (V * a + 2^25) >> 26,  V = round(2^26 / q) = 20159
//   r = a - t * q
// r is congruent to a and lies in [-(q-1)/2, (q-1)/2]. The constant 2^26 and
// the shift by 26 are the ones printed for this block; the multiplier constant
// V and the rounding term 2^25 are those of the Kyber reference software.
// Combinational.
module loki_barrett
  import loki_pkg::*;
(
  input  logic signed [15:0] a_i,
  output logic signed [15:0] r_o
);
  localparam int V = ((1 << 26) + KYBER_Q / 2) / KYBER_Q;

  logic signed [31:0] prod;
  logic signed [15:0] t;
  logic signed [31:0] tq;

  always_comb begin
    prod = 32'(V) * 32'(a_i) + 32'(1 << 25);
    t    = 16'(prod >>> 26);
    tq   = 32'(t) * 32'(KYBER_Q);
    r_o  = 16'(32'(a_i) - tq);
  end
endmodule
