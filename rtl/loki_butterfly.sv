// loki_butterfly: unified butterfly unit (BU) for NTT, inverse NTT and
// point-wise multiplication.
//
// One integer multiplier, one modular adder, one modular subtractor, a
// Montgomery reduction and a Barrett reduction are shared by three modes.
// Every mode has the same latency of 3 cycles from the operands at the
// inputs to OUT1/OUT2, and a new operation can be started every cycle.
//
//   BU_CT  (Cooley-Tukey, NTT):    t = b*w*2^-16 mod q
//                                  OUT1 = a + t,  OUT2 = a - t
//          b*w is registered, Montgomery-reduced and registered, brought to
//          [0, q) ("ca2" correction), then added to / subtracted from `a`,
//          which travels through two delay registers.
//   BU_GS  (Gentleman-Sande, INTT): OUT1 = Barrett(a + b)
//                                  OUT2 = (a - b)*w*2^-16 mod q
//          The sum and difference are registered first; the difference is
//          multiplied with the twiddle delayed by one register, while the sum
//          passes a second register and the Barrett reduction.
//   BU_MUL (basemul steps of PWM): p = x*w*2^-16 mod q with x = b, or with x
//          the product captured earlier (mul_src_i = MUL_SRC_FB);
//          OUT1 = p + p_prev, the sum of this product and the one of the
//          operation issued one cycle earlier; OUT2 shows the bare product
//          of the operation issued two cycles before. cap_i marks the
//          operation whose product is captured as the feedback operand.
//          After the last operation of one mode, mode_i must stay at that
//          mode for at least three more cycles before it changes (the core
//          holds the mode of the last operation while idle).
//
// The operator set, the twiddle and `a` delay registers, the adder/subtractor
// registers, the register-Barrett-register chain on the sum and the
// Montgomery constants follow the block diagram of the unit. The product
// register in front of the Montgomery reduction, the feedback/accumulate
// registers used for basemul and the exact register count are this design's
// choice. Inputs are canonical residues in [0, q); outputs are canonical.
module loki_butterfly
  import loki_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  bu_mode_e mode_i,
  input  mul_src_e mul_src_i,
  input  logic     cap_i,
  input  coef_t    a_i,
  input  coef_t    b_i,
  input  coef_t    tw_i,
  output coef_t    out1_o,
  output coef_t    out2_o
);
  // mode follows the data through the pipeline
  bu_mode_e mode_d1, mode_d2, mode_d3;
  logic     cap_d1, cap_d2;

  coef_t a_d1, a_d2;          // delay of `a` for CT
  coef_t tw_d1;               // delay of the twiddle for GS
  coef_t add_q, sub_q;        // registers behind modadd / modsub
  coef_t add_q2;              // second register of the GS sum path
  coef_t bar_q;               // register behind Barrett
  logic signed [31:0] prod_q; // multiplier register
  logic signed [15:0] mont_q; // register behind montg
  coef_t fb_q;                // captured product (basemul feedback)
  coef_t prev_q;              // product of the previous cycle

  // ---------------- multiplier ----------------
  coef_t mul_x, mul_y;
  always_comb begin
    // A GS operation uses the multiplier one cycle after it entered.
    if (mode_i == BU_GS) begin
      mul_x = sub_q;
      mul_y = tw_d1;
    end else if (mode_i == BU_MUL && mul_src_i == MUL_SRC_FB) begin
      mul_x = fb_q;
      mul_y = tw_i;
    end else begin
      mul_x = b_i;
      mul_y = tw_i;
    end
  end

  logic signed [15:0] mont_r;
  loki_montgomery u_montg (.a_i(prod_q), .r_o(mont_r));

  // "ca2": bring the Montgomery result from (-q, q) to [0, q)
  coef_t p;
  always_comb begin
    if (mont_q < 0) p = coef_t'(mont_q + 16'(KYBER_Q));
    else            p = coef_t'(mont_q);
  end

  // ---------------- adder / subtractor ----------------
  coef_t add_x, add_y, sub_x, sub_y, add_r, sub_r;
  always_comb begin
    if (mode_i == BU_GS) begin
      add_x = a_i;    add_y = b_i;
      sub_x = a_i;    sub_y = b_i;
    end else if (mode_d2 == BU_MUL) begin
      add_x = prev_q; add_y = p;
      sub_x = a_d2;   sub_y = p;
    end else begin
      add_x = a_d2;   add_y = p;
      sub_x = a_d2;   sub_y = p;
    end
  end
  loki_mod_add u_add (.a_i(add_x), .b_i(add_y), .s_o(add_r));
  loki_mod_sub u_sub (.a_i(sub_x), .b_i(sub_y), .d_o(sub_r));

  // ---------------- Barrett on the GS sum ----------------
  logic signed [15:0] bar_r;
  coef_t bar_c;
  loki_barrett u_barrett (.a_i(16'(add_q2)), .r_o(bar_r));
  always_comb begin
    if (bar_r < 0) bar_c = coef_t'(bar_r + 16'(KYBER_Q));
    else           bar_c = coef_t'(bar_r);
  end

  // The adder/subtractor registers serve stage 1 in GS mode and stage 3 in
  // CT/MUL mode. Because the mode is held for at least three cycles after
  // the last operation of a mode, an operation entering in GS mode never
  // meets a CT/MUL operation that still needs these registers, and vice
  // versa; the same holds for the multiplier (stage 0 for CT/MUL, stage 1
  // for GS).
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mode_d1 <= BU_CT; mode_d2 <= BU_CT; mode_d3 <= BU_CT;
      cap_d1  <= 1'b0;  cap_d2  <= 1'b0;
      a_d1 <= '0; a_d2 <= '0; tw_d1 <= '0;
      add_q <= '0; sub_q <= '0; add_q2 <= '0; bar_q <= '0;
      prod_q <= '0; mont_q <= '0; fb_q <= '0; prev_q <= '0;
    end else begin
      mode_d1 <= mode_i;  mode_d2 <= mode_d1; mode_d3 <= mode_d2;
      cap_d1  <= cap_i;   cap_d2  <= cap_d1;
      a_d1    <= a_i;     a_d2    <= a_d1;
      tw_d1   <= tw_i;
      prod_q  <= 32'(mul_x) * 32'(mul_y);
      mont_q  <= mont_r;
      prev_q  <= p;
      if (cap_d2) fb_q <= p;
      add_q   <= add_r;
      sub_q   <= sub_r;
      add_q2  <= add_q;
      bar_q   <= bar_c;
    end
  end

  always_comb begin
    unique case (mode_d3)
      BU_GS:   begin out1_o = bar_q; out2_o = p;     end
      BU_MUL:  begin out1_o = add_q; out2_o = p;     end
      default: begin out1_o = add_q; out2_o = sub_q; end
    endcase
  end

endmodule
