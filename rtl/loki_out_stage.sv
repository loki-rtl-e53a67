// loki_out_stage: output stage of the polynomial core. It takes the
// coefficient read from the BRAM that holds the requested polynomial and
// post-processes it according to the last operation applied to that
// polynomial, then registers it:
//   POST_NONE    - the coefficient as stored (loaded data, PWM result)
//   POST_BARRETT - Barrett reduction, the final step of the forward NTT
//   POST_MODMUL  - Montgomery multiplication by F = mont^2/128 mod q = 1441,
//                  the final scaling of the inverse NTT (result in Montgomery
//                  form, as the reference function poly_invntt_tomont gives)
// Negative Barrett/Montgomery results are brought back to [0, q).
//
// Timing: valid_i with coef_i/post_i in one cycle gives valid_o with dout_o in
// the next. The Barrett and modular-multiplier blocks on the output path
// follow the block diagram; assigning them to NTT and INTT respectively is
// this design's reading of it.
module loki_out_stage
  import loki_pkg::*;
(
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  valid_i,
  input  coef_t coef_i,
  input  post_e post_i,
  output logic  valid_o,
  output coef_t dout_o
);
  logic signed [15:0] bar_r, mont_r;
  logic signed [31:0] prod;
  coef_t res;

  assign prod = 32'(coef_i) * 32'(INTT_F);

  loki_barrett    u_barrett (.a_i(16'(coef_i)), .r_o(bar_r));
  loki_montgomery u_modmul  (.a_i(prod),        .r_o(mont_r));

  always_comb begin
    unique case (post_i)
      POST_BARRETT: res = (bar_r  < 0) ? coef_t'(bar_r  + 16'(KYBER_Q)) : coef_t'(bar_r);
      POST_MODMUL:  res = (mont_r < 0) ? coef_t'(mont_r + 16'(KYBER_Q)) : coef_t'(mont_r);
      default:      res = coef_i;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_o <= 1'b0;
      dout_o  <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) dout_o <= res;
    end
  end
endmodule
