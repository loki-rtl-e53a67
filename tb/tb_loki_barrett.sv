// tb_loki_barrett: self-checking testbench of the Barrett reduction.
// Exhaustive over all signed 16-bit inputs: the output must be congruent to
// the input modulo q and lie in [-(q-1)/2, (q-1)/2].
module tb_loki_barrett;
  logic signed [15:0] a, r;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  loki_barrett dut (.a_i(a), .r_o(r));

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      int d;
      a = 16'(v);
      #1;
      d = (v - int'(r)) % 3329;
      checks++;
      if (d != 0 || r < -1664 || r > 1664) begin
        failures++;
        if (failures < 5) $display("FAIL barrett(%0d) = %0d", v, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
