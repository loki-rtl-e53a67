// tb_loki_bram: self-checking testbench of the dual-port BRAM. Random
// reads and writes on both ports are checked against a model array,
// including the one-cycle read latency and the holding of read data while
// a port is idle.
module tb_loki_bram;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       en0 = 0, we0 = 0, en1 = 0, we1 = 0;
  logic [7:0] a0 = '0, a1 = '0;
  logic [11:0] wd0 = '0, wd1 = '0, rd0, rd1;
  logic [11:0] model [256];
  int checks = 0, failures = 0;

  loki_bram #(.DEPTH(256), .WIDTH(12)) dut (
    .clk_i(clk), .en0_i(en0), .we0_i(we0), .addr0_i(a0), .wdata0_i(wd0), .rdata0_o(rd0),
    .en1_i(en1), .we1_i(we1), .addr1_i(a1), .wdata1_i(wd1), .rdata1_o(rd1)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] e0, e1;
    logic        c0, c1;
    // fill through both ports
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      en0 = 1; we0 = 1; a0 = 8'(2*i);   wd0 = 12'($urandom); model[2*i]   = wd0;
      en1 = 1; we1 = 1; a1 = 8'(2*i+1); wd1 = 12'($urandom); model[2*i+1] = wd1;
    end
    c0 = 0; c1 = 0; e0 = '0; e1 = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // check the reads issued in the previous cycle (or held data)
      if (c0) begin checks++; if (rd0 !== e0) begin failures++; $display("FAIL p0 %h exp %h", rd0, e0); end end
      if (c1) begin checks++; if (rd1 !== e1) begin failures++; $display("FAIL p1 %h exp %h", rd1, e1); end end
      en0 = 1'($urandom); we0 = 1'($urandom); a0 = 8'($urandom); wd0 = 12'($urandom);
      en1 = 1'($urandom); we1 = 1'($urandom); a1 = 8'($urandom); wd1 = 12'($urandom);
      if (en0 && we0 && en1 && we1 && a0 == a1) a1 = a1 + 8'd1;
      if (en0 && !we0) begin e0 = model[a0]; c0 = 1; end
      if (en1 && !we1) begin e1 = model[a1]; c1 = 1; end
      // a read of an address written by the other port in the same cycle
      // returns the old word
      if (en0 && we0) model[a0] = wd0;
      if (en1 && we1) model[a1] = wd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
