// loki_mod_sub: modular subtractor in Z_q (the "modsub" block of the
// butterfly unit). Computes a - b mod q for canonical inputs in [0, q): the
// difference is formed with a borrow bit and q is added back when it is
// negative. Purely combinational. The document names the block; the
// add-back structure is this design's choice.
module loki_mod_sub
  import loki_pkg::*;
(
  input  coef_t a_i,
  input  coef_t b_i,
  output coef_t d_o
);
  logic [COEF_W:0] diff;

  always_comb begin
    diff = {1'b0, a_i} - {1'b0, b_i};
    d_o  = diff[COEF_W] ? COEF_W'(diff + (COEF_W+1)'(KYBER_Q)) : diff[COEF_W-1:0];
  end
endmodule
