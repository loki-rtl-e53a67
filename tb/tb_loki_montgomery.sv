// tb_loki_montgomery: self-checking testbench of the Montgomery reduction.
// For products of two values in (-q, q) and of a canonical value with a
// canonical twiddle, checks r = a * 2^-16 mod q (2^-16 = 169 mod q) and the
// output range -q < r < q.
module tb_loki_montgomery;
  logic signed [31:0] a;
  logic signed [15:0] r;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  loki_montgomery dut (.a_i(a), .r_o(r));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int x, input int y);
    longint p, e, g;
    p = longint'(x) * y;
    a = 32'(p);
    #1;
    e = ((p % 3329) * 169) % 3329;
    if (e < 0) e += 3329;
    g = longint'(r) % 3329;
    if (g < 0) g += 3329;
    checks++;
    if (g != e || r <= -3329 || r >= 3329) begin
      failures++; $display("FAIL %0d * %0d -> %0d, expected %0d mod q", x, y, r, e);
    end
  endtask

  initial begin
    check(0, 0); check(3328, 3328); check(-3328, 3328); check(1, 1); check(65536, 1);
    for (int i = 0; i < 20000; i++)
      check(int'($urandom_range(6656)) - 3328, int'($urandom_range(6656)) - 3328);
    for (int i = 0; i < 20000; i++)
      check(int'($urandom_range(3328)), int'($urandom_range(3328)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
