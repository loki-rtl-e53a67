// tb_loki_modarith: self-checking testbench of the modular adder and
// subtractor. Exhaustive over a grid that includes 0, 1, q-2 and q-1 and
// random pairs; results are compared with (a + b) mod q and (a - b) mod q.
module tb_loki_modarith;
  import loki_pkg::*;

  coef_t a, b, s, d;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  loki_mod_add u_add (.a_i(a), .b_i(b), .s_o(s));
  loki_mod_sub u_sub (.a_i(a), .b_i(b), .d_o(d));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int av, input int bv);
    a = coef_t'(av); b = coef_t'(bv);
    #1;
    checks += 2;
    if (int'(s) != (av + bv) % 3329) begin
      failures++; $display("FAIL %0d + %0d = %0d", av, bv, s);
    end
    if (int'(d) != (av - bv + 3329) % 3329) begin
      failures++; $display("FAIL %0d - %0d = %0d", av, bv, d);
    end
  endtask

  int edge_v [6] = '{0, 1, 2, 1664, 3327, 3328};
  initial begin
    foreach (edge_v[i]) foreach (edge_v[j]) check(edge_v[i], edge_v[j]);
    for (int i = 0; i < 20000; i++) check(int'($urandom_range(3328)), int'($urandom_range(3328)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
