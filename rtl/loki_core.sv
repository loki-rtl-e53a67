// loki_core: the Kyber NTT / INTT / point-wise multiplication accelerator.
//
// Four dual-port BRAMs hold two 256-coefficient polynomials: BRAMs 0/1 are
// polynomial A (first input, and the result of PWM), BRAMs 2/3 polynomial B
// (second input). In each pair one BRAM is "current"; an operation reads the
// current BRAM and writes the other, swapping them every stage. A single
// unified butterfly unit does all arithmetic, a ROM holds the twiddle
// factors, and the control unit sequences everything. Input multiplexers put
// host data (LOAD/DIN) into the BRAMs; output multiplexers pick the BRAM to
// read (READ) and apply the final reduction of the operation (DOUT).
//
// Interface (all synchronous to clk_i, active-low asynchronous reset):
//   start_i/op_i/poly_i  start an operation (NTT or INTT on polynomial
//                        poly_i, or PWM A := A o B); ignored while busy
//   done_o               one-cycle pulse 906 (NTT, INTT) or 649 (PWM)
//                        cycles after start; busy_o high in between
//   load_i               write din_i to coefficient load_addr_i of
//                        polynomial load_poly_i (idle only)
//   read_i               read coefficient read_addr_i of polynomial
//                        read_poly_i (idle only); dout_o is valid with
//                        dout_valid_o two cycles later
// Coefficients are canonical residues in [0, q). Results equal the Kyber
// reference functions poly_ntt, poly_invntt_tomont and
// poly_basemul_montgomery modulo q.
//
// At each NTT/INTT stage boundary the last write-backs of a stage meet the
// first reads of the next on the same BRAM; loki_fwd_buf absorbs them so that
// one butterfly is issued every cycle without stalls.
//
// The block structure follows the document's architecture diagram; the
// stage-boundary forwarding buffer, the register between the input multiplexers and the butterfly unit, the
// one-cycle read latency and the load/read handshake are this design's
// choice.
module loki_core
  import loki_pkg::*;
#(
  parameter int unsigned LAT_NTT = 906,
  parameter int unsigned LAT_PWM = 649
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start_i,
  input  op_e    op_i,
  input  logic   poly_i,
  output logic   busy_o,
  output logic   done_o,
  input  logic   load_i,
  input  logic   load_poly_i,
  input  caddr_t load_addr_i,
  input  coef_t  din_i,
  input  logic   read_i,
  input  logic   read_poly_i,
  input  caddr_t read_addr_i,
  output coef_t  dout_o,
  output logic   dout_valid_o
);
  // ---------------- control unit ----------------
  logic        rd_en, rd_src2_en, brom_en;
  logic [1:0]  rd_src, rd_src2, cur;
  post_e [1:0] post;
  caddr_t      rd_addr0, rd_addr1;
  logic [ZETA_AW-1:0] brom_addr;
  logic        mux_valid, mux_odd;
  op_e         mux_op;
  logic [2:0]  mux_slot;
  logic [1:0]  mux_src, mux_src2;
  logic        wr_we0, wr_we1, wr_pwm;
  logic [1:0]  wr_dst;
  caddr_t      wr_addr0, wr_addr1;
  logic        host_load, host_read;

  assign host_load = load_i && !busy_o;
  assign host_read = read_i && !busy_o;

  loki_ctrl #(.LAT_NTT(LAT_NTT), .LAT_PWM(LAT_PWM)) u_ctrl (
    .clk_i, .rst_ni, .start_i, .op_i, .poly_i,
    .load_i(host_load), .load_poly_i,
    .busy_o, .done_o, .cur_o(cur), .post_o(post),
    .rd_en_o(rd_en), .rd_src_o(rd_src), .rd_src2_en_o(rd_src2_en),
    .rd_src2_o(rd_src2), .rd_addr0_o(rd_addr0), .rd_addr1_o(rd_addr1),
    .brom_en_o(brom_en), .brom_addr_o(brom_addr),
    .mux_valid_o(mux_valid), .mux_op_o(mux_op), .mux_slot_o(mux_slot),
    .mux_odd_o(mux_odd), .mux_src_o(mux_src), .mux_src2_o(mux_src2),
    .wr_we0_o(wr_we0), .wr_we1_o(wr_we1), .wr_dst_o(wr_dst),
    .wr_addr0_o(wr_addr0), .wr_addr1_o(wr_addr1), .wr_pwm_o(wr_pwm)
  );

  // ---------------- BRAMs and their port multiplexers ----------------
  coef_t  out1, out2;
  logic   en0 [4], we0 [4], en1 [4], we1 [4];
  caddr_t a0 [4], a1 [4];
  coef_t  wd0 [4], wd1 [4], rd0 [4], rd1 [4];
  logic [1:0] host_bram;

  assign host_bram = host_load ? {load_poly_i, cur[load_poly_i]}
                               : {read_poly_i, cur[read_poly_i]};

  logic  divert, fhit0, fhit1;
  coef_t fdata0, fdata1;

  loki_fwd_buf #(.PAIRS(5)) u_fwd (
    .clk_i, .rst_ni, .clear_i(start_i && !busy_o),
    .rd_en_i(rd_en), .rd_src_i(rd_src), .rd_addr0_i(rd_addr0), .rd_addr1_i(rd_addr1),
    .wr_en_i(wr_we0 || wr_we1), .wr_dst_i(wr_dst), .wr_addr0_i(wr_addr0),
    .wr_addr1_i(wr_addr1), .wr_data0_i(out1), .wr_data1_i(out2),
    .divert_o(divert), .hit0_o(fhit0), .hit1_o(fhit1), .data0_o(fdata0), .data1_o(fdata1)
  );

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      en0[b] = 1'b0; we0[b] = 1'b0; a0[b] = '0; wd0[b] = '0;
      en1[b] = 1'b0; we1[b] = 1'b0; a1[b] = '0; wd1[b] = '0;
      // port 0: write back, operand read, or host access
      if ((wr_we0 || wr_we1) && wr_dst == 2'(b) && !divert) begin
        en0[b] = wr_we0; we0[b] = 1'b1; a0[b] = wr_addr0; wd0[b] = out1;
        en1[b] = wr_we1; we1[b] = 1'b1; a1[b] = wr_addr1;
        wd1[b] = wr_pwm ? out1 : out2;
      end else if (rd_en && (rd_src == 2'(b) || (rd_src2_en && rd_src2 == 2'(b)))) begin
        en0[b] = 1'b1; a0[b] = rd_addr0;
        en1[b] = 1'b1; a1[b] = rd_addr1;
      end else if ((host_load || host_read) && host_bram == 2'(b)) begin
        en0[b] = 1'b1; we0[b] = host_load;
        a0[b]  = host_load ? load_addr_i : read_addr_i;
        wd0[b] = din_i;
      end
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bram
    loki_bram #(.DEPTH(KYBER_N), .WIDTH(COEF_W)) u_bram (
      .clk_i,
      .en0_i(en0[b]), .we0_i(we0[b]), .addr0_i(a0[b]), .wdata0_i(wd0[b]), .rdata0_o(rd0[b]),
      .en1_i(en1[b]), .we1_i(we1[b]), .addr1_i(a1[b]), .wdata1_i(wd1[b]), .rdata1_o(rd1[b])
    );
  end

  coef_t zeta;
  loki_brom #(.DEPTH(128)) u_brom (
    .clk_i, .en_i(brom_en), .addr_i(brom_addr), .zeta_o(zeta)
  );

  // ---------------- butterfly input multiplexers ----------------
  coef_t    A0, A1, B0, B1;
  coef_t    bu_a, bu_b, bu_tw;
  bu_mode_e bu_mode;
  mul_src_e bu_msrc;
  logic     bu_cap;

  assign A0 = fhit0 ? fdata0 : rd0[mux_src];
  assign A1 = fhit1 ? fdata1 : rd1[mux_src];
  assign B0 = rd0[mux_src2];
  assign B1 = rd1[mux_src2];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bu_a <= '0; bu_b <= '0; bu_tw <= '0;
      bu_mode <= BU_CT; bu_msrc <= MUL_SRC_B; bu_cap <= 1'b0;
    end else begin
      bu_cap  <= 1'b0;
      bu_msrc <= MUL_SRC_B;
      if (mux_valid) begin
        unique case (mux_op)
          OP_NTT: begin
            bu_mode <= BU_CT; bu_a <= A0; bu_b <= A1; bu_tw <= zeta;
          end
          OP_INTT: begin
            // (a - b) * w with w = -zeta equals the reference (b - a) * zeta
            bu_mode <= BU_GS; bu_a <= A0; bu_b <= A1; bu_tw <= neg_q(zeta);
          end
          default: begin
            bu_mode <= BU_MUL;
            bu_a    <= '0;
            unique case (mux_slot)
              3'd0:    begin bu_b <= A1; bu_tw <= B1; bu_cap <= 1'b1; end
              3'd1:    begin bu_b <= A0; bu_tw <= B1; end
              3'd2:    begin bu_b <= A1; bu_tw <= B0; end
              3'd3:    begin bu_b <= A0; bu_tw <= B0; end
              default: begin
                bu_msrc <= MUL_SRC_FB;
                bu_tw   <= mux_odd ? neg_q(zeta) : zeta;
              end
            endcase
          end
        endcase
      end
    end
  end

  loki_butterfly u_bu (
    .clk_i, .rst_ni,
    .mode_i(bu_mode), .mul_src_i(bu_msrc), .cap_i(bu_cap),
    .a_i(bu_a), .b_i(bu_b), .tw_i(bu_tw),
    .out1_o(out1), .out2_o(out2)
  );

  // ---------------- output multiplexers and post-processing ----------------
  logic  rd_pend;
  logic [1:0] rd_bram;
  post_e rd_post;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_pend <= 1'b0; rd_bram <= '0; rd_post <= POST_NONE;
    end else begin
      rd_pend <= host_read;
      if (host_read) begin
        rd_bram <= host_bram;
        rd_post <= post[read_poly_i];
      end
    end
  end

  loki_out_stage u_out (
    .clk_i, .rst_ni,
    .valid_i(rd_pend), .coef_i(rd0[rd_bram]), .post_i(rd_post),
    .valid_o(dout_valid_o), .dout_o(dout_o)
  );
endmodule
