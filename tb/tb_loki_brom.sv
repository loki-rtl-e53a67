// tb_loki_brom: self-checking testbench of the twiddle ROM. Every entry is
// read and compared with 2^16 * 17^bitrev7(k) mod q computed here by
// repeated multiplication; a few entries are also compared with the
// well-known first twiddles of the Kyber reference (in canonical form:
// zetas[1] = -758 -> 2571, zetas[2] = -359 -> 2970, zetas[127] = 1628)
// and the one-cycle read latency and hold are checked.
module tb_loki_brom;
  import loki_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       en = 0;
  logic [6:0] addr = '0;
  coef_t      zeta;
  int checks = 0, failures = 0;

  loki_brom #(.DEPTH(128)) dut (.clk_i(clk), .en_i(en), .addr_i(addr), .zeta_o(zeta));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_zeta(int k);
    int br = 0, p = 2285;   // 2^16 mod q
    for (int i = 0; i < 7; i++) if ((k >> i) % 2 == 1) br += 1 << (6 - i);
    for (int i = 0; i < br; i++) p = (p * 17) % 3329;
    return p;
  endfunction

  task automatic rd(input int k, input int exp);
    @(negedge clk); en = 1; addr = 7'(k);
    @(negedge clk); en = 0; addr = 7'(k + 1);
    checks++;
    if (int'(zeta) != exp) begin failures++; $display("FAIL rom[%0d] = %0d exp %0d", k, zeta, exp); end
    @(negedge clk);   // held while not enabled
    checks++;
    if (int'(zeta) != exp) begin failures++; $display("FAIL rom[%0d] not held", k); end
  endtask

  initial begin
    for (int k = 0; k < 128; k++) rd(k, ref_zeta(k));
    rd(1, 2571); rd(2, 2970); rd(127, 1628);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
