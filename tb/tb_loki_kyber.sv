// tb_loki_kyber: workload testbench. Runs the polynomial arithmetic of
// Kyber's public-key encryption (the core of KeyGen, Encaps and Decaps) for
// the three module ranks K = 2, 3, 4 (Kyber512, Kyber768, Kyber1024) on the
// accelerator, through its register bus, with the testbench acting as the
// host processor.
//
// As in a software/hardware split of Kyber, every NTT, inverse NTT and
// pointwise multiplication (PWM) is done by the accelerator: the host loads
// the operands, starts the operation, waits for done and reads the result
// back. Accumulation of products, noise addition, message encoding and
// decoding stay on the host. Sampling is not modelled bit-exactly: the matrix
// A is drawn uniformly at random and the secret and noise polynomials
// uniformly from [-2, 2], in place of the SHAKE-based samplers.
//
//   KeyGen : s^ = NTT(s), t^_i = tomont(sum_j PWM(A^_ij, s^_j)) + NTT(e_i)
//   Encaps : r^ = NTT(r), u_i = INTT(sum_j PWM(A^_ji, r^_j)) + e1_i,
//            v = INTT(sum_i PWM(t^_i, r^_i)) + e2 + round(q/2)*m
//   Decaps : u^ = NTT(u), m' = decode(v - INTT(sum_i PWM(s^_i, u^_i)))
//
// The hashing of Encaps/Decaps runs on the accelerator's Keccak engine, with
// the host doing padding and absorbing over the bus:
//   H(pk) = SHA3-256(encode(t^) || rho),  m = SHA3-256(seed),
//   (K, coins) = G(m || H(pk)) = SHA3-512(...), and Decaps recomputes G from
//   the recovered message.
// The coins are not expanded into r and e1/e2 (the SHAKE-based samplers are
// replaced as described above), so the hashes are checked on their own.
//
// Checks: t^ against the reference NTT of A*s + e, u and v against schoolbook
// products, the recovered message m' against m (all 256 bits), every digest
// against a software SHA-3, Decaps' G against Encaps' G, and the number
// of accelerator operations against the count the algorithm needs. The cycles
// spent per rank, and the bus-inclusive cycles of one NTT and one PWM, are
// printed. Ciphertext compression is left out; it is host work and does not
// touch the accelerator.
module tb_loki_kyber;
  import loki_pkg::*;
  import loki_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_req_t req;
  reg_rsp_t rsp;
  logic     ntt_done, kec_done;
  int checks = 0, failures = 0;
  longint cycle = 0;

  loki_top dut (
    .clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
    .ntt_done_o(ntt_done), .keccak_done_o(kec_done)
  );

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus access ----------------
  task automatic bus(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                     output logic [31:0] rdata, output logic err);
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
    if (e) begin failures++; $display("FAIL error on write %h", addr); end
  endtask

  task automatic load(input int p, input poly_t v);
    for (int i = 0; i < 256; i++) wr32(32'h400 + 32'(p) * 32'h400 + 32'(4 * i), 32'(v[i]));
  endtask

  task automatic fetch(input int p, output poly_t v);
    logic [31:0] d; logic e;
    for (int i = 0; i < 256; i++) begin
      bus(1'b0, 32'h400 + 32'(p) * 32'h400 + 32'(4 * i), '0, d, e);
      if (e) begin failures++; $display("FAIL error on read"); end
      v[i] = int'(d);
    end
  endtask

  int n_ops = 0;

  task automatic run(input op_e o);
    wr32(32'h0, {28'd0, 1'b0, 2'(o), 1'b1});
    @(posedge clk);
    while (!ntt_done) @(posedge clk);
    n_ops++;
  endtask

  // ---------------- accelerator-backed polynomial operations ----------------
  task automatic hw_ntt(input poly_t x, output poly_t y);
    load(0, x); run(OP_NTT); fetch(0, y);
  endtask

  task automatic hw_intt(input poly_t x, output poly_t y);
    load(0, x); run(OP_INTT); fetch(0, y);
  endtask

  task automatic hw_pwm(input poly_t x, input poly_t z, output poly_t y);
    load(0, x); load(1, z); run(OP_PWM); fetch(0, y);
  endtask

  // SHA-3 on the Keccak engine: the host pads the message, XORs each block into
  // the rate lanes by read-modify-write over the bus and starts a permutation
  int n_kec = 0;

  task automatic hw_sha3(input bytes_t msg, input int rate, input int outlen, output bytes_t out);
    bytes_t m;
    logic [31:0] lo, hi, d; logic e;
    logic [63:0] lane;
    m = msg;
    m.push_back(8'h06);
    while (m.size() % rate != 0) m.push_back(8'h00);
    m[m.size() - 1] |= 8'h80;
    for (int l = 0; l < 25; l++) begin
      wr32(32'h1000 + 32'(8 * l), '0);
      wr32(32'h1004 + 32'(8 * l), '0);
    end
    for (int blk = 0; blk < m.size() / rate; blk++) begin
      for (int l = 0; l < rate / 8; l++) begin
        logic [63:0] v;
        for (int i = 0; i < 8; i++) v[8 * i +: 8] = m[blk * rate + 8 * l + i];
        bus(1'b0, 32'h1000 + 32'(8 * l), '0, lo, e);
        bus(1'b0, 32'h1004 + 32'(8 * l), '0, hi, e);
        v ^= {hi, lo};
        wr32(32'h1000 + 32'(8 * l), v[31:0]);
        wr32(32'h1004 + 32'(8 * l), v[63:32]);
      end
      wr32(32'h1100, 32'h1);
      do bus(1'b0, 32'h1104, '0, d, e); while (d[1] != 1'b1);
      n_kec++;
    end
    out = {};
    for (int l = 0; l < (outlen + 7) / 8; l++) begin
      bus(1'b0, 32'h1000 + 32'(8 * l), '0, lo, e);
      bus(1'b0, 32'h1004 + 32'(8 * l), '0, hi, e);
      lane = {hi, lo};
      for (int i = 0; i < 8; i++) if (8 * l + i < outlen) out.push_back(lane[8 * i +: 8]);
    end
  endtask

  function automatic void cmp_bytes(input bytes_t got, input bytes_t exp, input string name);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s digest mismatch", name);
    end
  endfunction

  function automatic bytes_t rand_bytes(int n);
    bytes_t r;
    for (int i = 0; i < n; i++) r.push_back(8'($urandom_range(255)));
    return r;
  endfunction

  // ---------------- host-side helpers ----------------
  function automatic poly_t padd(poly_t x, poly_t y);
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = md(x[i] + y[i]);
    return r;
  endfunction

  function automatic poly_t psub(poly_t x, poly_t y);
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = md(x[i] - y[i]);
    return r;
  endfunction

  function automatic poly_t pzero();
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = 0;
    return r;
  endfunction

  // multiply by 2^16 mod q, undoing the 2^-16 that PWM leaves in its result
  function automatic poly_t tomont(poly_t x);
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = md(longint'(x[i]) * 65536);
    return r;
  endfunction

  function automatic poly_t small_poly();
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = md(int'($urandom_range(4)) - 2);
    return r;
  endfunction

  function automatic poly_t uniform_poly();
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = int'($urandom_range(Q - 1));
    return r;
  endfunction

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

  // ---------------- one rank ----------------
  localparam int KMAX = 4;

  poly_t a_m  [KMAX][KMAX];   // A in normal form (reference only)
  poly_t ah_m [KMAX][KMAX];   // A^ as the host holds it
  poly_t s [KMAX], sh [KMAX], e [KMAX], t [KMAX], th [KMAX];
  poly_t r [KMAX], rh [KMAX], e1 [KMAX], u [KMAX], uh [KMAX];
  poly_t e2, v, w, acc, prod, tmp, ref_p, msg;

  task automatic run_rank(input int K, input string name);
    longint c0, c1;
    int ops0, kec0, dec_bad;
    bytes_t pk, hpk, seed, mb, gin, gout, gout2;
    c0   = cycle;
    ops0 = n_ops;
    kec0 = n_kec;

    // host-side sampling
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K; j++) begin
        a_m[i][j]  = uniform_poly();
        ah_m[i][j] = ntt(a_m[i][j]);
      end
      s[i] = small_poly(); e[i] = small_poly();
      r[i] = small_poly(); e1[i] = small_poly();
    end
    e2 = small_poly();

    // KeyGen
    for (int j = 0; j < K; j++) hw_ntt(s[j], sh[j]);
    for (int i = 0; i < K; i++) begin
      acc = pzero();
      for (int j = 0; j < K; j++) begin
        hw_pwm(ah_m[i][j], sh[j], prod);
        acc = padd(acc, prod);
      end
      hw_ntt(e[i], tmp);
      th[i] = padd(tomont(acc), tmp);
      // reference: t_i = sum_j A_ij * s_j + e_i, in normal form
      ref_p = e[i];
      for (int j = 0; j < K; j++) ref_p = padd(ref_p, schoolbook(a_m[i][j], s[j]));
      t[i] = ref_p;
      cmp(th[i], ntt(ref_p), $sformatf("%s t^[%0d]", name, i));
    end

    // public key = encode(t^) || rho, 12 bits per coefficient
    pk = {};
    for (int i = 0; i < K; i++)
      for (int c = 0; c < 128; c++) begin
        pk.push_back(8'(th[i][2*c]));
        pk.push_back(8'((th[i][2*c] >> 8) | (th[i][2*c+1] << 4)));
        pk.push_back(8'(th[i][2*c+1] >> 4));
      end
    pk = {pk, rand_bytes(32)};

    // Encaps: hashing
    hw_sha3(pk, 136, 32, hpk);
    cmp_bytes(hpk, sha3(pk, 136, 32), $sformatf("%s H(pk)", name));
    seed = rand_bytes(32);
    hw_sha3(seed, 136, 32, mb);
    cmp_bytes(mb, sha3(seed, 136, 32), $sformatf("%s H(seed)", name));
    for (int i = 0; i < 256; i++) msg[i] = int'(mb[i / 8][i % 8]);
    gin = {mb, hpk};
    hw_sha3(gin, 72, 64, gout);
    cmp_bytes(gout, sha3(gin, 72, 64), $sformatf("%s G(m || H(pk))", name));

    // Encaps: polynomial part
    for (int j = 0; j < K; j++) hw_ntt(r[j], rh[j]);
    for (int i = 0; i < K; i++) begin
      acc = pzero();
      for (int j = 0; j < K; j++) begin
        hw_pwm(ah_m[j][i], rh[j], prod);
        acc = padd(acc, prod);
      end
      hw_intt(acc, tmp);
      u[i] = padd(tmp, e1[i]);
      ref_p = e1[i];
      for (int j = 0; j < K; j++) ref_p = padd(ref_p, schoolbook(a_m[j][i], r[j]));
      cmp(u[i], ref_p, $sformatf("%s u[%0d]", name, i));
    end
    acc = pzero();
    for (int i = 0; i < K; i++) begin
      hw_pwm(th[i], rh[i], prod);
      acc = padd(acc, prod);
    end
    hw_intt(acc, tmp);
    for (int i = 0; i < 256; i++) v[i] = md(tmp[i] + e2[i] + 1665 * msg[i]);
    for (int i = 0; i < 256; i++) ref_p[i] = md(e2[i] + 1665 * msg[i]);
    for (int i = 0; i < K; i++) ref_p = padd(ref_p, schoolbook(t[i], r[i]));
    cmp(v, ref_p, $sformatf("%s v", name));

    // Decaps
    for (int i = 0; i < K; i++) hw_ntt(u[i], uh[i]);
    acc = pzero();
    for (int i = 0; i < K; i++) begin
      hw_pwm(sh[i], uh[i], prod);
      acc = padd(acc, prod);
    end
    hw_intt(acc, w);
    tmp = psub(v, w);
    dec_bad = 0;
    for (int i = 0; i < 256; i++) begin
      int bit_v;
      bit_v = (tmp[i] > 832 && tmp[i] <= 2496) ? 1 : 0;
      checks++;
      if (bit_v != msg[i]) begin
        failures++;
        if (dec_bad++ < 4) $display("FAIL %s message bit %0d", name, i);
      end
    end

    // Decaps: G of the recovered message must match Encaps' G
    mb = {};
    for (int i = 0; i < 32; i++) begin
      byte unsigned bb = 0;
      for (int j = 0; j < 8; j++) bb[j] = (tmp[8*i+j] > 832 && tmp[8*i+j] <= 2496);
      mb.push_back(bb);
    end
    gin = {mb, hpk};
    hw_sha3(gin, 72, 64, gout2);
    cmp_bytes(gout2, gout, $sformatf("%s Decaps G", name));

    // operation count: NTT 4K, INTT K+2, PWM 2K^2+2K
    checks++;
    if (n_ops - ops0 != 4 * K + (K + 2) + 2 * K * K + 2 * K) begin
      failures++;
      $display("FAIL %s used %0d operations", name, n_ops - ops0);
    end
    c1 = cycle;
    $display("%s: %0d polynomial operations, %0d Keccak permutations, %0d cycles including bus transfers",
             name, n_ops - ops0, n_kec - kec0, c1 - c0);
  endtask

  initial begin
    longint c0;
    poly_t x, y, z;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // bus-inclusive cost of single operations
    x = uniform_poly();
    z = uniform_poly();
    c0 = cycle; hw_ntt(x, y);
    $display("NTT with load and read-back: %0d cycles", cycle - c0);
    cmp(y, ntt(x), "single NTT");
    c0 = cycle; hw_pwm(x, z, y);
    $display("PWM with load and read-back: %0d cycles", cycle - c0);
    cmp(y, basemul(x, z), "single PWM");

    run_rank(2, "Kyber512");
    run_rank(3, "Kyber768");
    run_rank(4, "Kyber1024");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
