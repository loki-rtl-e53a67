// loki_reg_if: memory-mapped register interface of the LOKI accelerator.
//
// A generic register bus (request: addr, write, wdata, wstrb, valid;
// response: rdata, error, ready; the request is held until ready) is decoded
// into the controls of the polynomial core and of the Keccak core. Byte
// address map (word accesses; wstrb is not used):
//   0x0000 NTT_CTRL    W: [0] start, [2:1] op (0 NTT, 1 INTT, 2 PWM),
//                         [3] polynomial for NTT/INTT (0 A, 1 B)
//                      R: the last written op/polynomial fields
//   0x0004 NTT_STATUS  R: [0] busy, [1] done (set at completion, cleared by
//                         the next start)
//   0x0400 + 4*i       polynomial A, coefficient i (0..255): W loads, R reads
//                      back with the output post-processing
//   0x0800 + 4*i       polynomial B, coefficient i
//   0x1000 + 8*l       Keccak lane l (0..24), low 32 bits; +4 high 32 bits
//   0x1100 KEC_CTRL    W: [0] start a Keccak-f[1600] permutation
//   0x1104 KEC_STATUS  R: [0] busy, [1] done (sticky, cleared by start)
// Every access completes in the cycle it is presented (ready = 1), except a
// coefficient read, which answers two cycles later, once the core's output
// stage has delivered the value. An unmapped address, a coefficient access
// while the polynomial core is busy, or a lane access while the Keccak core
// is busy answers with error = 1.
//
// The document says the accelerator is driven memory-mapped through a
// generic register interface; the address map and the error rules are this
// design's choice.
module loki_reg_if
  import loki_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  reg_req_t    reg_req_i,
  output reg_rsp_t    reg_rsp_o,
  // polynomial core
  output logic        ntt_start_o,
  output op_e         ntt_op_o,
  output logic        ntt_poly_o,
  input  logic        ntt_busy_i,
  input  logic        ntt_done_i,
  output logic        ntt_load_o,
  output logic        ntt_read_o,
  output logic        ntt_cpoly_o,
  output caddr_t      ntt_caddr_o,
  output coef_t       ntt_din_o,
  input  coef_t       ntt_dout_i,
  input  logic        ntt_dvalid_i,
  // Keccak core
  output logic        kec_start_o,
  input  logic        kec_busy_i,
  input  logic        kec_done_i,
  output logic        kec_we_o,
  output logic [1:0]  kec_half_o,
  output logic [4:0]  kec_idx_o,
  output logic [63:0] kec_wdata_o,
  input  logic [63:0] kec_rdata_i
);
  localparam logic [15:0] A_NTT_CTRL   = 16'h0000;
  localparam logic [15:0] A_NTT_STATUS = 16'h0004;
  localparam logic [15:0] A_KEC_CTRL   = 16'h1100;
  localparam logic [15:0] A_KEC_STATUS = 16'h1104;

  logic [15:0] a;
  logic        sel_coef, sel_lane, sel_ntt_ctrl, sel_ntt_stat, sel_kec_ctrl, sel_kec_stat;
  logic        rd_pend_q, ntt_done_q, kec_done_q;
  op_e         op_q;
  logic        poly_q;

  assign a            = reg_req_i.addr[15:0];
  assign sel_coef     = reg_req_i.addr[31:16] == '0 && (a[15:10] == 6'd1 || a[15:10] == 6'd2);
  assign sel_lane     = reg_req_i.addr[31:16] == '0 && a[15:8] == 8'h10 && a[7:3] < 5'd25;
  assign sel_ntt_ctrl = reg_req_i.addr[31:0] == 32'(A_NTT_CTRL);
  assign sel_ntt_stat = reg_req_i.addr[31:0] == 32'(A_NTT_STATUS);
  assign sel_kec_ctrl = reg_req_i.addr[31:0] == 32'(A_KEC_CTRL);
  assign sel_kec_stat = reg_req_i.addr[31:0] == 32'(A_KEC_STATUS);

  logic acc, coef_ok, lane_ok;
  assign acc     = reg_req_i.valid;
  assign coef_ok = sel_coef && !ntt_busy_i;
  assign lane_ok = sel_lane && !kec_busy_i;

  // polynomial core controls
  assign ntt_start_o = acc && reg_req_i.write && sel_ntt_ctrl && reg_req_i.wdata[0];
  assign ntt_op_o    = op_e'(reg_req_i.wdata[2:1]);
  assign ntt_poly_o  = reg_req_i.wdata[3];
  assign ntt_load_o  = acc && reg_req_i.write && coef_ok;
  assign ntt_read_o  = acc && !reg_req_i.write && coef_ok && !rd_pend_q;
  assign ntt_cpoly_o = a[11];
  assign ntt_caddr_o = caddr_t'(a[9:2]);
  assign ntt_din_o   = coef_t'(reg_req_i.wdata);

  // Keccak controls
  assign kec_start_o = acc && reg_req_i.write && sel_kec_ctrl && reg_req_i.wdata[0];
  assign kec_we_o    = acc && reg_req_i.write && lane_ok;
  assign kec_half_o  = a[2] ? 2'b10 : 2'b01;
  assign kec_idx_o   = sel_lane ? a[7:3] : 5'd0;
  assign kec_wdata_o = {reg_req_i.wdata, reg_req_i.wdata};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_pend_q  <= 1'b0;
      ntt_done_q <= 1'b0;
      kec_done_q <= 1'b0;
      op_q       <= OP_NTT;
      poly_q     <= 1'b0;
    end else begin
      if (ntt_read_o)        rd_pend_q <= 1'b1;
      else if (ntt_dvalid_i) rd_pend_q <= 1'b0;
      if (ntt_start_o && !ntt_busy_i) ntt_done_q <= 1'b0;
      else if (ntt_done_i)            ntt_done_q <= 1'b1;
      if (kec_start_o && !kec_busy_i) kec_done_q <= 1'b0;
      else if (kec_done_i)            kec_done_q <= 1'b1;
      if (acc && reg_req_i.write && sel_ntt_ctrl) begin
        op_q   <= ntt_op_o;
        poly_q <= ntt_poly_o;
      end
    end
  end

  always_comb begin
    reg_rsp_o = '{rdata: '0, error: 1'b0, ready: 1'b1};
    if (sel_ntt_ctrl) begin
      reg_rsp_o.rdata = {28'd0, poly_q, op_q, 1'b0};
    end else if (sel_ntt_stat) begin
      reg_rsp_o.rdata = {30'd0, ntt_done_q, ntt_busy_i};
    end else if (sel_kec_ctrl) begin
      reg_rsp_o.rdata = '0;
    end else if (sel_kec_stat) begin
      reg_rsp_o.rdata = {30'd0, kec_done_q, kec_busy_i};
    end else if (sel_coef) begin
      if (!coef_ok && !rd_pend_q) begin
        reg_rsp_o.error = 1'b1;
      end else if (!reg_req_i.write) begin
        reg_rsp_o.ready = rd_pend_q && ntt_dvalid_i;
        reg_rsp_o.rdata = 32'(ntt_dout_i);
      end
    end else if (sel_lane) begin
      if (!lane_ok) reg_rsp_o.error = 1'b1;
      else reg_rsp_o.rdata = a[2] ? kec_rdata_i[63:32] : kec_rdata_i[31:0];
    end else begin
      reg_rsp_o.error = 1'b1;
    end
  end

  // Bus rule: a request stays stable until it is answered.
  a_req_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
      (reg_req_i.valid && !reg_rsp_o.ready) |=> (reg_req_i.valid && $stable(reg_req_i.addr)))
    else $error("loki_reg_if: request changed before ready");
endmodule
