// loki_mod_add: modular adder in Z_q (the "modadd" block of the butterfly
// unit). Both inputs are canonical residues in [0, q); the sum is formed one
// bit wider and q is subtracted once if the sum reaches q, so the result is
// again canonical. Purely combinational. The document names the block; the
// conditional-subtraction structure is this design's choice.
module loki_mod_add
  import loki_pkg::*;
(
  input  coef_t a_i,
  input  coef_t b_i,
  output coef_t s_o
);
  logic [COEF_W:0] sum;

  always_comb begin
    sum = {1'b0, a_i} + {1'b0, b_i};
    s_o = (sum >= (COEF_W+1)'(KYBER_Q)) ? COEF_W'(sum - (COEF_W+1)'(KYBER_Q))
                                        : sum[COEF_W-1:0];
  end
endmodule
