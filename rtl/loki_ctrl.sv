// loki_ctrl: control unit of the polynomial core.
//
// After a start pulse it issues one operation per cycle to the butterfly
// unit and raises done exactly LAT_NTT (NTT, INTT) or LAT_PWM (PWM) cycles
// after the cycle in which start was seen; busy is high in between.
//
//  * NTT / INTT: 7 stages of 128 butterflies, 896 issue cycles. For stage s
//    and butterfly i the NTT uses len = 128>>s, group g = i/len, pair
//    (ja, jb = ja+len) with ja = 2*len*g + i mod len and twiddle index
//    k = 2^s + g; the INTT uses len = 2<<s and k = (128>>s) - 1 - g, i.e.
//    the reference loop orders. Stage s reads one BRAM of the polynomial's
//    pair and writes the other (ping-pong); after the 7 stages the result
//    sits in the other BRAM of the pair, which becomes the current one.
//  * PWM: 128 basemul steps of 5 issue cycles each (640 cycles). Step m
//    reads a0,a1 (coefficients 2m, 2m+1 of polynomial A) and b0,b1 (same of
//    B) once, plus twiddle 64 + m/2 (negated for odd m), then issues the
//    five Montgomery products a1*b1 (captured), a0*b1, a1*b0 (-> r1 = sum
//    of the last two), a0*b0, (a1*b1)*zeta (-> r0 = sum of the last two).
//    The result goes to the other BRAM of polynomial A's pair.
//
// Timing of one issued operation, relative to its issue cycle t:
//   t    BRAM/BROM addresses (rd_o, brom_*_o)
//   t+1  read data valid; operand-select fields on mux_o
//   t+2  operands enter the butterfly unit (registered in the core)
//   t+5  butterfly outputs valid; write fields on wr_o
// so the last NTT write is in cycle 901 and the last PWM write in cycle 645
// after start; the remaining cycles up to LAT_* are idle. The latencies are
// the document's figures (906 and 649 cycles); how the original spends the
// cycles beyond the data path is not known, so here they are a plain wait.
//
// The control unit also tracks, per polynomial, which BRAM of its pair is
// current and which post-processing the output stage must apply (Barrett
// after NTT, scaling by mont^2/128 after INTT, none after PWM or a load).
module loki_ctrl
  import loki_pkg::*;
#(
  parameter int unsigned LAT_NTT = 906,
  parameter int unsigned LAT_PWM = 649
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        start_i,
  input  op_e         op_i,
  input  logic        poly_i,       // NTT/INTT target: 0 = A, 1 = B
  input  logic        load_i,       // a host load to polynomial load_poly_i
  input  logic        load_poly_i,
  output logic        busy_o,
  output logic        done_o,
  output logic [1:0]  cur_o,        // current BRAM of each pair
  output post_e [1:0] post_o,       // post-processing per polynomial
  // read issue (cycle t)
  output logic        rd_en_o,
  output logic [1:0]  rd_src_o,     // BRAM read on both ports
  output logic        rd_src2_en_o, // PWM: also read polynomial B
  output logic [1:0]  rd_src2_o,
  output caddr_t      rd_addr0_o,
  output caddr_t      rd_addr1_o,
  output logic        brom_en_o,
  output logic [ZETA_AW-1:0] brom_addr_o,
  // operand select (cycle t+1)
  output logic        mux_valid_o,
  output op_e         mux_op_o,
  output logic [2:0]  mux_slot_o,
  output logic        mux_odd_o,
  output logic [1:0]  mux_src_o,
  output logic [1:0]  mux_src2_o,
  // write back (cycle t+5)
  output logic        wr_we0_o,
  output logic        wr_we1_o,
  output logic [1:0]  wr_dst_o,
  output caddr_t      wr_addr0_o,
  output caddr_t      wr_addr1_o,
  output logic        wr_pwm_o
);
  localparam int unsigned WR_DLY = 5;   // issue -> write back
  localparam int unsigned NTT_OPS = 896;
  localparam int unsigned PWM_OPS = 640;

  initial begin
    assert (LAT_NTT >= NTT_OPS + WR_DLY + 1) else $fatal(1, "LAT_NTT too small");
    assert (LAT_PWM >= PWM_OPS + WR_DLY + 1) else $fatal(1, "LAT_PWM too small");
  end

  typedef struct packed {
    logic       valid;
    op_e        op;
    logic [2:0] slot;
    logic       odd;
    logic [1:0] src;
    logic [1:0] src2;
    logic [1:0] dst;
    caddr_t     ja;
    caddr_t     jb;
  } iss_t;

  op_e         op_q;
  logic        poly_q;
  logic        busy_q, issuing_q, done_q;
  logic [10:0] cnt_q;
  logic [2:0]  stage_q;    // NTT/INTT stage
  logic [6:0]  idx_q;      // butterfly index within the stage / basemul m
  logic [2:0]  slot_q;     // PWM slot 0..4
  logic [1:0]  cur_q;
  post_e [1:0] post_q;

  // ---------------- issue computation ----------------
  iss_t iss;
  logic [ZETA_AW-1:0] k;
  logic last_op;

  always_comb begin
    logic [7:0] len, g, j;
    logic       bank;
    iss  = '0;
    k    = '0;
    len  = '0; g = '0; j = '0;
    bank = cur_q[poly_q] ^ stage_q[0];
    iss.valid = issuing_q;
    iss.op    = op_q;
    iss.slot  = slot_q;
    unique case (op_q)
      OP_NTT: begin
        len    = 8'(128 >> stage_q);
        g      = 8'(idx_q >> (7 - stage_q));
        j      = 8'(idx_q) & (len - 8'd1);
        iss.ja = caddr_t'((g << (8 - stage_q)) | j);
        iss.jb = iss.ja + len;
        k      = ZETA_AW'((1 << stage_q) + g);
        iss.src  = {poly_q, bank};
        iss.src2 = {poly_q, bank};
        iss.dst  = {poly_q, ~bank};
      end
      OP_INTT: begin
        len    = 8'(2 << stage_q);
        g      = 8'(idx_q >> (stage_q + 1));
        j      = 8'(idx_q) & (len - 8'd1);
        iss.ja = caddr_t'((g << (stage_q + 2)) | j);
        iss.jb = iss.ja + len;
        k      = ZETA_AW'((128 >> stage_q) - 1 - g);
        iss.src  = {poly_q, bank};
        iss.src2 = {poly_q, bank};
        iss.dst  = {poly_q, ~bank};
      end
      default: begin  // OP_PWM
        iss.ja   = caddr_t'({idx_q, 1'b0});
        iss.jb   = caddr_t'({idx_q, 1'b1});
        iss.odd  = idx_q[0];
        k        = ZETA_AW'(7'd64 + {1'b0, idx_q[6:1]});
        iss.src  = {1'b0, cur_q[0]};
        iss.src2 = {1'b1, cur_q[1]};
        iss.dst  = {1'b0, ~cur_q[0]};
      end
    endcase
    if (op_q == OP_PWM) last_op = (idx_q == 7'd127) && (slot_q == 3'd4);
    else                last_op = (stage_q == 3'd6) && (idx_q == 7'd127);
  end

  assign rd_en_o      = iss.valid && (op_q != OP_PWM || slot_q == 3'd0);
  assign rd_src_o     = iss.src;
  assign rd_src2_en_o = iss.valid && op_q == OP_PWM && slot_q == 3'd0;
  assign rd_src2_o    = iss.src2;
  assign rd_addr0_o   = iss.ja;
  assign rd_addr1_o   = iss.jb;
  assign brom_en_o    = rd_en_o;
  assign brom_addr_o  = k;

  // ---------------- issue delay line ----------------
  iss_t dly_q [WR_DLY];
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < WR_DLY; i++) dly_q[i] <= '0;
    end else begin
      dly_q[0] <= iss;
      for (int i = 1; i < WR_DLY; i++) dly_q[i] <= dly_q[i-1];
    end
  end

  assign mux_valid_o = dly_q[0].valid;
  assign mux_op_o    = dly_q[0].op;
  assign mux_slot_o  = dly_q[0].slot;
  assign mux_odd_o   = dly_q[0].odd;
  assign mux_src_o   = dly_q[0].src;
  assign mux_src2_o  = dly_q[0].src2;

  iss_t w;
  assign w          = dly_q[WR_DLY-1];
  assign wr_pwm_o   = (w.op == OP_PWM);
  assign wr_we0_o   = w.valid && (w.op != OP_PWM || w.slot == 3'd4);
  assign wr_we1_o   = w.valid && (w.op != OP_PWM || w.slot == 3'd2);
  assign wr_dst_o   = w.dst;
  assign wr_addr0_o = w.ja;
  assign wr_addr1_o = w.jb;

  // ---------------- sequencing ----------------
  logic [10:0] lat_m1;
  assign lat_m1 = (op_q == OP_PWM) ? 11'(LAT_PWM - 1) : 11'(LAT_NTT - 1);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      op_q <= OP_NTT; poly_q <= 1'b0;
      busy_q <= 1'b0; issuing_q <= 1'b0; done_q <= 1'b0;
      cnt_q <= '0; stage_q <= '0; idx_q <= '0; slot_q <= '0;
      cur_q <= '0; post_q <= {POST_NONE, POST_NONE};
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (load_i) post_q[load_poly_i] <= POST_NONE;
        if (start_i && op_i inside {OP_NTT, OP_INTT, OP_PWM}) begin
          op_q      <= op_i;
          poly_q    <= (op_i == OP_PWM) ? 1'b0 : poly_i;
          busy_q    <= 1'b1;
          issuing_q <= 1'b1;
          cnt_q     <= 11'd1;
          stage_q   <= '0;
          idx_q     <= '0;
          slot_q    <= '0;
        end
      end else begin
        cnt_q <= cnt_q + 11'd1;
        if (issuing_q) begin
          if (last_op) issuing_q <= 1'b0;
          if (op_q == OP_PWM) begin
            if (slot_q == 3'd4) begin
              slot_q <= '0;
              idx_q  <= idx_q + 7'd1;
            end else begin
              slot_q <= slot_q + 3'd1;
            end
          end else begin
            idx_q <= idx_q + 7'd1;
            if (idx_q == 7'd127) stage_q <= stage_q + 3'd1;
          end
        end
        if (cnt_q == lat_m1) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
          cur_q[poly_q] <= ~cur_q[poly_q];
          unique case (op_q)
            OP_NTT:  post_q[poly_q] <= POST_BARRETT;
            OP_INTT: post_q[poly_q] <= POST_MODMUL;
            default: post_q[poly_q] <= POST_NONE;
          endcase
        end
      end
    end
  end

  assign busy_o = busy_q;
  assign done_o = done_q;
  assign cur_o  = cur_q;
  assign post_o = post_q;

  // The write-back stage never runs past the end of an operation.
  a_no_inflight: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                  done_q |-> (!issuing_q && !w.valid))
    else $error("loki_ctrl: done raised with operations in flight");
endmodule
