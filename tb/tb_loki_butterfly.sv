// tb_loki_butterfly: self-checking testbench of the unified butterfly unit.
// Streams random operands, one operation per cycle, in each mode (CT, GS and
// the basemul multiply/accumulate sequence) and checks OUT1/OUT2 three
// cycles later against plain modular arithmetic:
//   CT : a + b*w*2^-16, a - b*w*2^-16
//   GS : a + b, (a - b)*w*2^-16
//   MUL: five-step basemul schedule, OUT1 = r1 after step 2, r0 after step 4
module tb_loki_butterfly;
  import loki_pkg::*;
  import loki_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bu_mode_e mode = BU_CT;
  mul_src_e msrc = MUL_SRC_B;
  logic     cap = 0;
  coef_t    a = '0, b = '0, tw = '0, out1, out2;
  int checks = 0, failures = 0;

  loki_butterfly dut (
    .clk_i(clk), .rst_ni(rst_n), .mode_i(mode), .mul_src_i(msrc), .cap_i(cap),
    .a_i(a), .b_i(b), .tw_i(tw), .out1_o(out1), .out2_o(out2)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values, indexed by issue cycle
  int e1 [$], e2 [$];
  bit c1 [$], c2 [$];

  function automatic int rnd();
    return int'($urandom_range(Q - 1));
  endfunction

  // drive one operation, then compare the outputs of the one issued 2 edges before (3-cycle latency)
  task automatic step(input bu_mode_e m, input int av, bv, wv, input mul_src_e s,
                      input bit cp, input bit chk1, input int x1, input bit chk2, input int x2);
    mode <= m; a <= coef_t'(av); b <= coef_t'(bv); tw <= coef_t'(wv); msrc <= s; cap <= cp;
    e1.push_back(x1); e2.push_back(x2); c1.push_back(chk1); c2.push_back(chk2);
    @(posedge clk);
    #1;
    if (e1.size() > 2) begin
      int v1 = e1.pop_front(), v2 = e2.pop_front();
      bit k1 = c1.pop_front(), k2 = c2.pop_front();
      if (k1) begin
        checks++;
        if (int'(out1) != v1) begin failures++; $display("FAIL out1 %0d exp %0d mode %s t=%0t", out1, v1, mode.name(), $time); end
      end
      if (k2) begin
        checks++;
        if (int'(out2) != v2) begin failures++; $display("FAIL out2 %0d exp %0d mode %s t=%0t", out2, v2, mode.name(), $time); end
      end
    end
  endtask

  task automatic flush(input bu_mode_e m);
    repeat (3) step(m, 0, 0, 0, MUL_SRC_B, 0, 0, 0, 0, 0);
  endtask

  initial begin
    int av, bv, wv, t;
    int a0, a1, b0, b1, z, p11;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // corner operands first, then random
    for (int i = 0; i < 300; i++) begin
      av = (i < 4) ? (i[0] ? Q - 1 : 0) : rnd();
      bv = (i < 4) ? (i[1] ? Q - 1 : 0) : rnd();
      wv = (i < 2) ? Q - 1 : rnd();
      t  = md(longint'(bv) * wv * RINV);
      step(BU_CT, av, bv, wv, MUL_SRC_B, 0, 1, md(av + t), 1, md(av - t));
    end
    flush(BU_CT);
    for (int i = 0; i < 300; i++) begin
      av = rnd(); bv = rnd(); wv = rnd();
      step(BU_GS, av, bv, wv, MUL_SRC_B, 0, 1, md(av + bv), 1,
           md(longint'(md(av - bv)) * wv * RINV));
    end
    flush(BU_GS);
    for (int i = 0; i < 100; i++) begin
      a0 = rnd(); a1 = rnd(); b0 = rnd(); b1 = rnd(); z = rnd();
      p11 = md(longint'(a1) * b1 * RINV);
      step(BU_MUL, 0, a1, b1, MUL_SRC_B, 1, 0, 0, 0, 0);
      step(BU_MUL, 0, a0, b1, MUL_SRC_B, 0, 0, 0, 0, 0);
      step(BU_MUL, 0, a1, b0, MUL_SRC_B, 0, 1,
           md(longint'(a0) * b1 * RINV + longint'(a1) * b0 * RINV), 0, 0);
      step(BU_MUL, 0, a0, b0, MUL_SRC_B, 0, 0, 0, 0, 0);
      step(BU_MUL, 0, 0, z, MUL_SRC_FB, 0, 1,
           md(longint'(p11) * z * RINV + longint'(a0) * b0 * RINV), 0, 0);
    end
    flush(BU_MUL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
