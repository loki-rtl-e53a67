// tb_loki_core: self-checking testbench of the polynomial core.
// Loads two random polynomials and runs NTT(A), NTT(B), PWM, INTT(A); every
// result is read back and compared with the plain-arithmetic reference
// models, the final one also with the schoolbook product a*b in R_q, which
// the chain NTT -> PWM -> INTT must reproduce exactly. An INTT of a random
// polynomial and a read of freshly loaded data are checked too. Each
// operation's start-to-done cycle count is checked against 906 (NTT, INTT)
// and 649 (PWM).
module tb_loki_core;
  import loki_pkg::*;
  import loki_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   start = 0, poly = 0, busy, done;
  op_e    op = OP_NTT;
  logic   load = 0, load_poly = 0, read = 0, read_poly = 0, dvalid;
  caddr_t load_addr = '0, read_addr = '0;
  coef_t  din = '0, dout;

  int checks = 0, failures = 0;

  loki_core dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .op_i(op), .poly_i(poly),
    .busy_o(busy), .done_o(done), .load_i(load), .load_poly_i(load_poly),
    .load_addr_i(load_addr), .din_i(din), .read_i(read), .read_poly_i(read_poly),
    .read_addr_i(read_addr), .dout_o(dout), .dout_valid_o(dvalid)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_poly_t(input logic p, input poly_t v);
    for (int i = 0; i < 256; i++) begin
      load <= 1; load_poly <= p; load_addr <= caddr_t'(i); din <= coef_t'(v[i]);
      @(posedge clk);
    end
    load <= 0;
  endtask

  task automatic read_poly_t(input logic p, output poly_t v);
    int n = 0;
    fork
      begin
        for (int i = 0; i < 256; i++) begin
          read <= 1; read_poly <= p; read_addr <= caddr_t'(i);
          @(posedge clk);
        end
        read <= 0;
      end
      begin
        while (n < 256) begin
          @(posedge clk);
          #1;
          if (dvalid) begin v[n] = int'(dout); n++; end
        end
      end
    join
  endtask

  task automatic run(input op_e o, input logic p, input int exp_lat, input string name);
    int cyc = 0;
    op <= o; poly <= p; start <= 1;
    @(posedge clk);
    start <= 0;
    // cyc counts edges after the one that sampled start; done is sampled by
    // the next edge, which makes the latency cyc + 1
    while (!done) begin @(posedge clk); #1; cyc++; end
    @(posedge clk);
    cyc++;
    checks++;
    if (cyc != exp_lat) begin
      failures++;
      $display("FAIL %s latency %0d, expected %0d", name, cyc, exp_lat);
    end
  endtask

  function automatic void cmp(input poly_t got, input poly_t exp, input string name);
    int bad = 0;
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (bad++ < 4) $display("FAIL %s[%0d] = %0d, expected %0d", name, i, got[i], exp[i]);
      end
    end
  endfunction

  poly_t a, b, c, ra, rb, got;

  initial begin
    for (int i = 0; i < 256; i++) begin
      a[i] = int'($urandom_range(Q - 1));
      b[i] = int'($urandom_range(Q - 1));
      c[i] = int'($urandom_range(Q - 1));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    load_poly_t(0, a);
    load_poly_t(1, b);
    read_poly_t(0, got); cmp(got, a, "load A");
    read_poly_t(1, got); cmp(got, b, "load B");

    run(OP_NTT, 0, 906, "NTT A");
    ra = ntt(a);
    read_poly_t(0, got); cmp(got, ra, "NTT A");
    run(OP_NTT, 1, 906, "NTT B");
    rb = ntt(b);
    read_poly_t(1, got); cmp(got, rb, "NTT B");

    run(OP_PWM, 0, 649, "PWM");
    ra = basemul(ra, rb);
    read_poly_t(0, got); cmp(got, ra, "PWM");

    run(OP_INTT, 0, 906, "INTT A");
    read_poly_t(0, got); cmp(got, invntt(ra), "INTT A");
    cmp(got, schoolbook(a, b), "A*B");

    load_poly_t(1, c);
    run(OP_INTT, 1, 906, "INTT C");
    read_poly_t(1, got); cmp(got, invntt(c), "INTT C");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
