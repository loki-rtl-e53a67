// tb_loki_top: end-to-end testbench of the LOKI accelerator through its
// register bus, at the design's default (and only) size.
//
// Polynomial engine: two random polynomials a, b are loaded over the bus,
// then NTT(A), NTT(B), PWM and INTT(A) are started by register writes; the
// NTT result is read back and compared with a reference NTT, and the final
// result with the schoolbook product a*b in Z_q[X]/(X^256+1). Start-to-done
// times are checked against 906 (NTT, INTT) and 649 (PWM) cycles.
// Keccak engine: SHA3-256("abc") is computed by writing the padded block into
// the lanes, starting a permutation and reading the digest lanes.
// Mechanisms that must occur at least once, counted from the bus and from
// the design's internal signals: each operation, the BRAM ping-pong swap,
// stage-boundary forwarding (diverted write-backs and forwarded reads), each
// output post-processing mode, bus wait states on coefficient reads, error
// responses (unmapped address, access while busy) and a Keccak permutation.
module tb_loki_top;
  import loki_pkg::*;
  import loki_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t req;
  reg_rsp_t rsp;
  logic     ntt_done, kec_done;
  int checks = 0, failures = 0;

  loki_top dut (
    .clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
    .ntt_done_o(ntt_done), .keccak_done_o(kec_done)
  );

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_ntt = 0, n_intt = 0, n_pwm = 0, n_swap = 0, n_divert = 0, n_fwd = 0;
  int n_post_bar = 0, n_post_mm = 0, n_post_none = 0, n_wait = 0, n_err = 0, n_kec = 0;
  logic [1:0] cur_prev = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_core.u_fwd.divert_o) n_divert++;
      if (dut.u_core.u_fwd.hit0_o || dut.u_core.u_fwd.hit1_o) n_fwd++;
      if (dut.u_core.u_ctrl.cur_q != cur_prev) n_swap++;
      cur_prev <= dut.u_core.u_ctrl.cur_q;
      if (dut.u_core.rd_pend) begin
        case (dut.u_core.rd_post)
          POST_BARRETT: n_post_bar++;
          POST_MODMUL:  n_post_mm++;
          default:      n_post_none++;
        endcase
      end
      if (req.valid && !rsp.ready) n_wait++;
      if (req.valid && rsp.ready && rsp.error) n_err++;
      if (kec_done) n_kec++;
    end
  end

  // ---------------- bus tasks ----------------
  task automatic bus(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                     output logic [31:0] rdata, output logic err);
    // drive on a falling edge, look at the response just after it, and
    // finish on the rising edge that accepts it
    @(negedge clk);
    req = '{addr: addr, write: wr, wdata: wdata, wstrb: 4'hF, valid: 1'b1};
    forever begin
      #1;
      if (rsp.ready) break;
      @(negedge clk);
    end
    rdata = rsp.rdata;
    err   = rsp.error;
    @(posedge clk);
    #1;
    req = '0;
  endtask

  task automatic wr32(input logic [31:0] addr, input logic [31:0] d);
    logic [31:0] r; logic e;
    bus(1'b1, addr, d, r, e);
    checks++;
    if (e) begin failures++; $display("FAIL error on write %h", addr); end
  endtask

  task automatic rd32(input logic [31:0] addr, output logic [31:0] d);
    logic e;
    bus(1'b0, addr, '0, d, e);
    checks++;
    if (e) begin failures++; $display("FAIL error on read %h", addr); end
  endtask

  task automatic load(input int p, input poly_t v);
    for (int i = 0; i < 256; i++) wr32(32'h400 + 32'(p) * 32'h400 + 32'(4 * i), 32'(v[i]));
  endtask

  task automatic fetch(input int p, output poly_t v);
    logic [31:0] d;
    for (int i = 0; i < 256; i++) begin
      rd32(32'h400 + 32'(p) * 32'h400 + 32'(4 * i), d);
      v[i] = int'(d);
    end
  endtask

  // start an operation, count cycles to the done pulse, poll status
  task automatic run(input op_e o, input int p, input int exp_lat, input string name);
    int cyc = 0;
    logic [31:0] st, d; logic e;
    wr32(32'h0, {28'd0, 1'(p), 2'(o), 1'b1});
    // a coefficient access while busy must be refused
    bus(1'b0, 32'h400, '0, d, e);
    checks++;
    if (!e) begin failures++; $display("FAIL no error while busy"); end
    cyc = 1;   // the edge that accepted the error response
    while (!ntt_done) begin @(posedge clk); #1; cyc++; end
    @(posedge clk);
    cyc++;
    checks++;
    if (cyc != exp_lat) begin failures++; $display("FAIL %s latency %0d exp %0d", name, cyc, exp_lat); end
    rd32(32'h4, st);
    checks++;
    if (st[1:0] != 2'b10) begin failures++; $display("FAIL status %b", st[1:0]); end
    case (o) OP_NTT: n_ntt++; OP_INTT: n_intt++; default: n_pwm++; endcase
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

  task automatic expect_count(input string name, input int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  poly_t a, b, got, na, nb;
  logic [31:0] d, lo, hi;
  logic e;
  logic [63:0] abc [4];

  initial begin
    req = '0;
    for (int i = 0; i < 256; i++) begin
      a[i] = int'($urandom_range(Q - 1));
      b[i] = int'($urandom_range(Q - 1));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // unmapped address answers with an error
    bus(1'b0, 32'h0000_2000, '0, d, e);
    checks++;
    if (!e) begin failures++; $display("FAIL unmapped address accepted"); end

    load(0, a);
    load(1, b);
    fetch(0, got); cmp(got, a, "load A");

    run(OP_NTT, 0, 906, "NTT A");
    na = ntt(a);
    fetch(0, got); cmp(got, na, "NTT A");
    run(OP_NTT, 1, 906, "NTT B");
    nb = ntt(b);
    fetch(1, got); cmp(got, nb, "NTT B");
    run(OP_PWM, 0, 649, "PWM");
    run(OP_INTT, 0, 906, "INTT A");
    fetch(0, got); cmp(got, schoolbook(a, b), "a*b");

    // Keccak: SHA3-256("abc"), one padded 136-byte block
    for (int l = 0; l < 25; l++) begin
      logic [63:0] v;
      v = (l == 0) ? 64'h0000000006636261 : (l == 16) ? 64'h8000000000000000 : 64'h0;
      wr32(32'h1000 + 32'(8 * l), v[31:0]);
      wr32(32'h1004 + 32'(8 * l), v[63:32]);
    end
    wr32(32'h1100, 32'h1);
    do rd32(32'h1104, d); while (d[1] != 1'b1);
    abc = '{64'hb225e24fa75d983a, 64'hbd90d36b2d175c04, 64'h5b529d3e6e085f85, 64'h3215431145e2bf46};
    for (int l = 0; l < 4; l++) begin
      rd32(32'h1000 + 32'(8 * l), lo);
      rd32(32'h1004 + 32'(8 * l), hi);
      checks++;
      if ({hi, lo} != abc[l]) begin failures++; $display("FAIL digest lane %0d = %h", l, {hi, lo}); end
    end

    expect_count("NTT operations", n_ntt);
    expect_count("INTT operations", n_intt);
    expect_count("PWM operations", n_pwm);
    expect_count("BRAM ping-pong swaps", n_swap);
    expect_count("diverted write-backs", n_divert);
    expect_count("forwarded reads", n_fwd);
    expect_count("read-out with Barrett", n_post_bar);
    expect_count("read-out with INTT scaling", n_post_mm);
    expect_count("read-out without change", n_post_none);
    expect_count("bus wait states", n_wait);
    expect_count("bus error responses", n_err);
    expect_count("Keccak permutations", n_kec);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
