// loki_montgomery: Montgomery reduction for q = 3329, R = 2^16 (the "montg"
// block of the butterfly unit).
//
// For a signed 32-bit input a with |a| < q * 2^15 it returns
// r = a * 2^-16 mod q with r in (-q, q):
//   t = (a mod 2^16) * QINV  truncated to a signed 16-bit value (QINV = -3327)
//   r = (a - t * q) >> 16
// The two multiplications by the constants -3327 and 3329 and the final
// subtraction are the three operators drawn for this block; the shift is
// exact because the low 16 bits of a - t*q are zero. Combinational.
module loki_montgomery
  import loki_pkg::*;
(
  input  logic signed [31:0] a_i,
  output logic signed [15:0] r_o
);
  logic signed [15:0] t;
  logic signed [31:0] tq;

  always_comb begin
    t   = 16'(32'(signed'(a_i[15:0])) * 32'(QINV));
    tq  = 32'(t) * 32'(KYBER_Q);
    r_o = 16'((a_i - tq) >>> 16);
  end
endmodule
