// tb_loki_out_stage: self-checking testbench of the output stage. Random
// coefficients in each post-processing mode are checked one cycle later
// against: the value itself (none), the value mod q (Barrett, canonical) and
// value * 1441 * 2^-16 mod q (INTT scaling).
module tb_loki_out_stage;
  import loki_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  vin = 0, vout;
  coef_t cin = '0, dout;
  post_e post = POST_NONE;
  int checks = 0, failures = 0;

  loki_out_stage dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(vin), .coef_i(cin),
                      .post_i(post), .valid_o(vout), .dout_o(dout));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      v = (i < 6) ? 3328 - i : int'($urandom_range(3328));
      vin = 1; cin = coef_t'(v); post = post_e'(i % 3);
      case (i % 3)
        0: e = v;
        1: e = v % 3329;
        default: e = int'((longint'(v) * 1441 * 169) % 3329);
      endcase
      @(negedge clk);
      vin = 0;
      checks++;
      if (!vout || int'(dout) != e) begin
        failures++; $display("FAIL mode %0d in %0d out %0d exp %0d", i % 3, v, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
