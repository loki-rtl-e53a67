// loki_brom: twiddle-factor ROM. Entry k holds 2^16 * 17^bitrev7(k) mod q,
// the k-th Kyber twiddle factor in Montgomery form as a canonical residue
// (17 is a primitive 256-th root of unity modulo q = 3329). The NTT uses
// entries 1..127 in increasing order, the inverse NTT the same entries in
// decreasing order, and point-wise multiplication entries 64..127.
//
// One synchronous read port: the entry addressed while en_i=1 appears on
// zeta_o in the next cycle and is held otherwise. The contents are computed
// at elaboration by loki_pkg::zeta_mont(). The document says the twiddles are
// precomputed and stored in this ROM; the Montgomery-form canonical encoding
// and the read timing are this design's choice.
module loki_brom
  import loki_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk_i,
  input  logic          en_i,
  input  logic [AW-1:0] addr_i,
  output coef_t         zeta_o
);
  typedef coef_t rom_t [DEPTH];

  function automatic rom_t init_rom();
    rom_t r;
    for (int unsigned k = 0; k < DEPTH; k++) r[k] = zeta_mont(k);
    return r;
  endfunction

  localparam rom_t ROM = init_rom();

  always_ff @(posedge clk_i) begin
    if (en_i) zeta_o <= ROM[addr_i];
  end
endmodule
