// loki_top: the LOKI accelerator as a memory-mapped peripheral.
//
// One generic register-bus port gives a host processor access to two
// engines: the Kyber polynomial core (NTT, inverse NTT and point-wise
// multiplication of 256-coefficient polynomials modulo q = 3329, see
// loki_core) and the Keccak-f[1600] permutation core (loki_keccak). The
// register map is described in loki_reg_if. ntt_done_o and keccak_done_o
// pulse when an operation completes and may serve as interrupts.
//
// Both engines run on clk_i; rst_ni is an active-low asynchronous reset.
// The document integrates the accelerator into a RISC-V microcontroller
// through such a register interface; sharing one port between the two
// engines is this design's choice.
module loki_top
  import loki_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  reg_req_t reg_req_i,
  output reg_rsp_t reg_rsp_o,
  output logic     ntt_done_o,
  output logic     keccak_done_o
);
  logic        ntt_start, ntt_poly, ntt_busy, ntt_done, ntt_load, ntt_read;
  logic        ntt_cpoly, ntt_dvalid;
  op_e         ntt_op;
  caddr_t      ntt_caddr;
  coef_t       ntt_din, ntt_dout;
  logic        kec_start, kec_busy, kec_done, kec_we;
  logic [1:0]  kec_half;
  logic [4:0]  kec_idx;
  logic [63:0] kec_wdata, kec_rdata;

  loki_reg_if u_regs (
    .clk_i, .rst_ni, .reg_req_i, .reg_rsp_o,
    .ntt_start_o(ntt_start), .ntt_op_o(ntt_op), .ntt_poly_o(ntt_poly),
    .ntt_busy_i(ntt_busy), .ntt_done_i(ntt_done), .ntt_load_o(ntt_load),
    .ntt_read_o(ntt_read), .ntt_cpoly_o(ntt_cpoly), .ntt_caddr_o(ntt_caddr),
    .ntt_din_o(ntt_din), .ntt_dout_i(ntt_dout), .ntt_dvalid_i(ntt_dvalid),
    .kec_start_o(kec_start), .kec_busy_i(kec_busy), .kec_done_i(kec_done),
    .kec_we_o(kec_we), .kec_half_o(kec_half), .kec_idx_o(kec_idx),
    .kec_wdata_o(kec_wdata), .kec_rdata_i(kec_rdata)
  );

  loki_core u_core (
    .clk_i, .rst_ni,
    .start_i(ntt_start), .op_i(ntt_op), .poly_i(ntt_poly),
    .busy_o(ntt_busy), .done_o(ntt_done),
    .load_i(ntt_load), .load_poly_i(ntt_cpoly), .load_addr_i(ntt_caddr), .din_i(ntt_din),
    .read_i(ntt_read), .read_poly_i(ntt_cpoly), .read_addr_i(ntt_caddr),
    .dout_o(ntt_dout), .dout_valid_o(ntt_dvalid)
  );

  loki_keccak u_keccak (
    .clk_i, .rst_ni, .start_i(kec_start), .busy_o(kec_busy), .done_o(kec_done),
    .lane_we_i(kec_we), .lane_half_i(kec_half), .lane_idx_i(kec_idx),
    .lane_wdata_i(kec_wdata), .lane_rdata_o(kec_rdata)
  );

  assign ntt_done_o    = ntt_done;
  assign keccak_done_o = kec_done;
endmodule
