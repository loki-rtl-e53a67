// loki_fwd_buf: stage-boundary forwarding buffer of the polynomial core.
//
// During NTT/INTT one BRAM of a pair is read while the other is written,
// and the roles swap at every stage. Because a butterfly's results are
// written 5 cycles after its operands were read, the last 5 write-backs of a
// stage fall into the first 5 cycles of the next stage, which already reads
// both ports of the very BRAM those results belong to. Instead of stalling,
// such a write-back is diverted into this buffer (5 butterflies = 10
// coefficients with their addresses), and later reads of those addresses in
// the next stage are served from here. The BRAM copy is never needed: the
// following stage rewrites every coefficient into the other BRAM. This keeps
// the issue rate at one butterfly per cycle across stage boundaries.
//
// Timing: divert_o is combinational in the write-back cycle; a read issued in
// cycle t gives hit*_o/data*_o in cycle t+1, aligned with the BRAM data.
// clear_i (start of an operation) empties the buffer. This mechanism is this
// design's own: the document gives the issue rate, not how it is reached.
module loki_fwd_buf
  import loki_pkg::*;
#(
  parameter int unsigned PAIRS = 5
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       clear_i,
  input  logic       rd_en_i,
  input  logic [1:0] rd_src_i,
  input  caddr_t     rd_addr0_i,
  input  caddr_t     rd_addr1_i,
  input  logic       wr_en_i,
  input  logic [1:0] wr_dst_i,
  input  caddr_t     wr_addr0_i,
  input  caddr_t     wr_addr1_i,
  input  coef_t      wr_data0_i,
  input  coef_t      wr_data1_i,
  output logic       divert_o,
  output logic       hit0_o,
  output logic       hit1_o,
  output coef_t      data0_o,
  output coef_t      data1_o
);
  localparam int unsigned ENTRIES = 2 * PAIRS;

  typedef struct packed {
    logic       valid;
    logic [1:0] bram;
    caddr_t     addr;
    coef_t      data;
  } entry_t;

  entry_t ent_q [ENTRIES];
  logic [$clog2(PAIRS)-1:0] ptr_q;

  assign divert_o = wr_en_i && rd_en_i && (wr_dst_i == rd_src_i);

  // look-up of both read addresses
  logic  h0, h1;
  coef_t d0, d1;
  always_comb begin
    h0 = 1'b0; h1 = 1'b0; d0 = '0; d1 = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (ent_q[e].valid && ent_q[e].bram == rd_src_i) begin
        if (ent_q[e].addr == rd_addr0_i) begin h0 = 1'b1; d0 = ent_q[e].data; end
        if (ent_q[e].addr == rd_addr1_i) begin h1 = 1'b1; d1 = ent_q[e].data; end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= '0;
      ptr_q  <= '0;
      hit0_o <= 1'b0; hit1_o <= 1'b0; data0_o <= '0; data1_o <= '0;
    end else begin
      hit0_o  <= rd_en_i && h0;
      hit1_o  <= rd_en_i && h1;
      data0_o <= d0;
      data1_o <= d1;
      if (clear_i) begin
        for (int e = 0; e < ENTRIES; e++) ent_q[e].valid <= 1'b0;
        ptr_q <= '0;
      end else if (divert_o) begin
        ent_q[2*ptr_q]   <= '{valid: 1'b1, bram: wr_dst_i, addr: wr_addr0_i, data: wr_data0_i};
        ent_q[2*ptr_q+1] <= '{valid: 1'b1, bram: wr_dst_i, addr: wr_addr1_i, data: wr_data1_i};
        ptr_q <= (ptr_q == $clog2(PAIRS)'(PAIRS - 1)) ? '0 : ptr_q + 1'b1;
      end
    end
  end
endmodule
