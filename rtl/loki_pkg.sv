// loki_pkg: constants, types and helper functions shared by the LOKI
// Kyber polynomial accelerator.
//
// Kyber works in R_q = Z_q[X]/(X^256 + 1) with q = 3329. Every coefficient
// inside the accelerator is held as a canonical residue in [0, q), 12 bits
// wide. Twiddle factors are the powers of the 256-th root of unity 17 taken in
// 7-bit bit-reversed order and stored in Montgomery form (times 2^16 mod q),
// as in the Kyber reference software; zeta_mont() computes them so that the
// ROM contents follow from a formula rather than a pasted table.
//
// The register-interface request/response structs follow the usual shape of
// a generic register bus (address, write, write data, byte strobes, valid /
// read data, error, ready); the widths are this design's choice.
package loki_pkg;

  localparam int unsigned KYBER_Q   = 3329;
  localparam int unsigned KYBER_N   = 256;
  localparam int          QINV      = -3327;  // q^-1 mod 2^16, signed
  localparam int unsigned COEF_W    = 12;
  localparam int unsigned ADDR_W    = 8;      // log2(KYBER_N)
  localparam int unsigned ZETA_AW   = 7;      // 128 twiddles
  // Scale factor of the inverse NTT, mont^2/128 mod q (applied with a
  // Montgomery multiplication on read-out).
  localparam int unsigned INTT_F    = 1441;

  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [ADDR_W-1:0] caddr_t;

  // Operations of the polynomial core.
  typedef enum logic [1:0] {
    OP_NTT  = 2'd0,
    OP_INTT = 2'd1,
    OP_PWM  = 2'd2
  } op_e;

  // Post-processing applied by the output stage on read-out.
  typedef enum logic [1:0] {
    POST_NONE    = 2'd0,
    POST_BARRETT = 2'd1,
    POST_MODMUL  = 2'd2
  } post_e;

  // Butterfly unit modes.
  typedef enum logic [1:0] {
    BU_CT  = 2'd0,   // NTT: a + b*w, a - b*w
    BU_GS  = 2'd1,   // INTT: a + b, (a - b)*w
    BU_MUL = 2'd2    // PWM: product, and sum of the last two products
  } bu_mode_e;

  // Multiplier operand choice in BU_MUL mode.
  typedef enum logic {
    MUL_SRC_B  = 1'b0,  // b port
    MUL_SRC_FB = 1'b1   // product captured earlier (held in the BU)
  } mul_src_e;

  // Generic register interface (32-bit).
  typedef struct packed {
    logic [31:0] addr;
    logic        write;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        valid;
  } reg_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        error;
    logic        ready;
  } reg_rsp_t;

  function automatic int unsigned bitrev7(int unsigned k);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 7; i++) r |= ((k >> i) & 1) << (6 - i);
    return r;
  endfunction

  // zeta_mont(k) = 2^16 * 17^bitrev7(k) mod q, canonical.
  function automatic coef_t zeta_mont(int unsigned k);
    int unsigned p;
    p = 65536 % KYBER_Q;
    for (int unsigned i = 0; i < bitrev7(k); i++) p = (p * 17) % KYBER_Q;
    return coef_t'(p);
  endfunction

  // Negation in Z_q of a canonical residue.
  function automatic coef_t neg_q(coef_t x);
    return (x == '0) ? '0 : coef_t'(KYBER_Q - 32'(x));
  endfunction

endpackage
